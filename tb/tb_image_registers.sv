// tb_image_registers: shifts a random stream through a 5-deep and a 4-deep
// instance and checks each window is the last DEPTH pixels, oldest first;
// a cycle without shift holds the window; reset clears it.
module tb_image_registers;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic shift = 0;
  logic [7:0] din = '0;
  logic [4:0][7:0] win5;
  logic [3:0][7:0] win4;
  int hist [$];

  image_registers #(.DEPTH(5)) d5 (.clk, .rst, .shift, .din, .win(win5));
  image_registers #(.DEPTH(4)) d4 (.clk, .rst, .shift, .din, .win(win4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) hist.push_back(0);
    @(negedge clk);
    rst = 0;
    checks++;
    if (win5 != '0 || win4 != '0) begin failures++; $display("not cleared"); end
    for (int k = 0; k < 200; k++) begin
      shift = ($urandom_range(0, 3) != 0);
      din = 8'($urandom_range(0, 255));
      @(negedge clk);
      if (shift) begin hist.push_back(int'(din)); void'(hist.pop_front()); end
      for (int q = 0; q < 5; q++) begin
        checks++;
        if (int'(win5[q]) != hist[q]) begin failures++; $display("win5[%0d] at %0d", q, k); end
      end
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (int'(win4[q]) != hist[q + 1]) begin failures++; $display("win4[%0d] at %0d", q, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
