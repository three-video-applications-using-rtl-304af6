// tb_voting_system: random movement vectors drawn around a few clusters with
// 1..5 targets; global vector, vote count and winner must match a reference
// majority count (agreement within 1 pixel per component, lowest index wins
// ties); valid must pulse one cycle after start.
module tb_voting_system;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, valid;
  logic [2:0] n = '0, votes, winner;
  logic signed [15:0] dy [5], dx [5], gdy, gdx;
  voting_system #(.MAX_TARGETS(5), .TOL(1)) dut (.clk, .rst, .start, .n, .dy, .dx, .valid,
    .gdy, .gdx, .votes, .winner);

  function automatic int ab(int v); return v < 0 ? -v : v; endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      automatic int bc = 0, bi = 0;
      n = 3'($urandom_range(1, 5));
      for (int i = 0; i < 5; i++) begin
        automatic int cl = $urandom_range(0, 2);
        dy[i] = 16'(cl * 7 - 5 + $urandom_range(0, 2));
        dx[i] = 16'(-cl * 4 + 3 + $urandom_range(0, 1));
      end
      for (int i = 0; i < int'(n); i++) begin
        automatic int c = 0;
        for (int j = 0; j < int'(n); j++)
          if (ab(int'(dy[i]) - int'(dy[j])) <= 1 && ab(int'(dx[i]) - int'(dx[j])) <= 1) c++;
        if (c > bc) begin bc = c; bi = i; end
      end
      start = 1;
      @(negedge clk);
      start = 0;
      checks += 3;
      if (!valid) begin failures++; $display("no valid"); end
      if (int'(votes) != bc || int'(winner) != bi) begin
        failures++; $display("votes %0d winner %0d exp %0d %0d", votes, winner, bc, bi);
      end
      if (gdy != dy[bi] || gdx != dx[bi]) begin failures++; $display("vector"); end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("valid longer than a cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
