// tb_coeff_rom: every entry equals w^(m)*w^(n) with w^ = [1 4 6 4 1], the
// mask sums to 256 and is symmetric; rows past 4 read as zero.
module tb_coeff_rom;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] row0, row1;
  coef_row_t coef0, coef1;
  int wh [5] = '{1, 4, 6, 4, 1};
  coeff_rom dut (.row0, .row1, .coef0, .coef1);

  initial begin
    automatic int sum = 0;
    for (int m = 0; m < 8; m++) begin
      row0 = 3'(m); row1 = 3'(7 - m);
      #1;
      for (int n = 0; n < 5; n++) begin
        automatic int e0 = (m < 5) ? wh[m] * wh[n] : 0;
        automatic int e1 = (7 - m < 5) ? wh[7 - m] * wh[n] : 0;
        checks += 2;
        if (int'(coef0[n]) != e0) begin failures++; $display("row %0d col %0d", m, n); end
        if (int'(coef1[n]) != e1) begin failures++; $display("port1 row %0d col %0d", 7 - m, n); end
        sum += int'(coef0[n]);
      end
    end
    checks++;
    if (sum != 256) begin failures++; $display("mask sum %0d", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
