// tb_convolution_module: random windows against every mask row and random
// coefficient rows; the output must equal the dot product computed here,
// including the largest case 255 * (6+24+36+24+6).
module tb_convolution_module;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  window5_t win;
  coef_row_t coef;
  logic [15:0] prod;
  convolution_module dut (.win, .coef, .prod);

  initial begin
    for (int k = 0; k < 1000; k++) begin
      automatic int e = 0;
      for (int q = 0; q < 5; q++) begin
        win[q]  = (k == 0) ? 8'd255 : 8'($urandom_range(0, 255));
        coef[q] = (k == 0) ? 8'(q == 2 ? 36 : (q == 0 || q == 4) ? 6 : 24)
                           : 8'($urandom_range(0, 36));
        e += int'(win[q]) * int'(coef[q]);
      end
      #1;
      checks++;
      if (int'(prod) != e) begin failures++; $display("got %0d expected %0d", prod, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
