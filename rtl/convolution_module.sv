// convolution_module: multiplies five image registers by one mask row.
//
// prod = sum_k win[k]*coef[k], the contribution of one input row to one output
// pixel. Combinational; the register bank accumulates it over the five mask
// rows. With 8-bit pixels and the binomial mask the full 5x5 sum is at most
// 255*256, so 16 bits hold every partial and final result.
module convolution_module
  import pyr_pkg::*;
(
  input  window5_t    win,
  input  coef_row_t   coef,
  output logic [15:0] prod
);
  always_comb begin
    prod = '0;
    for (int k = 0; k < 5; k++)
      prod += 16'(win[k]) * 16'(coef[k]);
  end
endmodule
