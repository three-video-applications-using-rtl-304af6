// tb_correlation_registers: random groups of random length; after each group
// the four accumulators (and the four energy accumulators) must hold the
// sums of their terms, first loading.
module tb_correlation_registers;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, first = 0;
  logic [3:0][15:0] term = '0, term2 = '0;
  logic [3:0][31:0] acc, acc2;
  longint model [4], model2 [4];
  correlation_registers dut (.clk, .rst, .en, .first, .term, .term2, .acc, .acc2);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    for (int g = 0; g < 50; g++) begin
      automatic int len = $urandom_range(1, 60);
      for (int k = 0; k < len; k++) begin
        en = ($urandom_range(0, 5) != 0) || k == 0;
        first = (k == 0);
        for (int q = 0; q < 4; q++) begin
          term[q] = 16'($urandom);
          term2[q] = 16'($urandom);
          if (en) model[q] = first ? longint'(term[q]) : model[q] + longint'(term[q]);
          if (en) model2[q] = first ? longint'(term2[q]) : model2[q] + longint'(term2[q]);
        end
        @(negedge clk);
      end
      en = 0;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (longint'(acc[q]) != model[q]) begin failures++; $display("group %0d reg %0d", g, q); end
        checks++;
        if (longint'(acc2[q]) != model2[q]) begin failures++; $display("group %0d energy %0d", g, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
