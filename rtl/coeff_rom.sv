// coeff_rom: read-only memory of the 5x5 Gaussian mask.
//
// Entry (m,n) is w^(m)*w^(n) with w^ = [1 4 6 4 1]: separable, symmetric and
// summing to 256 (normalised after a shift of 8). The mask shape and its
// properties follow the text; the binomial weights are this design's choice.
// A read returns a whole mask row. Two asynchronous read ports serve the two
// control generators of one pyramidal convolution processor.
module coeff_rom
  import pyr_pkg::*;
(
  input  logic [2:0] row0,
  input  logic [2:0] row1,
  output coef_row_t  coef0,
  output coef_row_t  coef1
);
  // Rows 0..4 of the mask; rows beyond 4 read as zero.
  localparam coef_row_t ROM [5] = '{
    {8'd1, 8'd4,  8'd6,  8'd4,  8'd1},
    {8'd4, 8'd16, 8'd24, 8'd16, 8'd4},
    {8'd6, 8'd24, 8'd36, 8'd24, 8'd6},
    {8'd4, 8'd16, 8'd24, 8'd16, 8'd4},
    {8'd1, 8'd4,  8'd6,  8'd4,  8'd1}
  };

  always_comb begin
    coef0 = (row0 < 3'd5) ? ROM[row0] : '0;
    coef1 = (row1 < 3'd5) ? ROM[row1] : '0;
  end
endmodule
