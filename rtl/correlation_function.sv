// correlation_function: one correlation term between an image and a target
// pixel.
//
// a is the image pixel and b the target pixel. mode CORR_SAD gives |a-b| (sum
// of absolute differences) and CORR_SSD gives (a-b)^2 (sum of squared
// differences); summed over the target, a smaller total is a better match.
// CORR_NCC gives the product a*b on cost and the image energy a*a on energy,
// the two sums that normalised cross correlation needs; the comparators
// rank them (see corr_better in pyr_pkg). energy is 0 in the other modes.
// The three measures are the ones the text lists; the split of NCC into two
// sums compared by cross-multiplication is this design's choice.
// Combinational.
module correlation_function
  import pyr_pkg::*;
(
  input  corr_mode_e  mode,
  input  pixel_t      a,
  input  pixel_t      b,
  output logic [15:0] cost,
  output logic [15:0] energy
);
  logic [PIX_W-1:0] d;
  always_comb begin
    d      = (a > b) ? a - b : b - a;
    energy = '0;
    unique case (mode)
      CORR_SSD: cost = 16'(d) * 16'(d);
      CORR_NCC: begin
        cost   = 16'(a) * 16'(b);
        energy = 16'(a) * 16'(a);
      end
      default:  cost = 16'(d);
    endcase
  end
endmodule
