// image_registers: shift register of the most recent pixels read from memory.
//
// On each shift the new pixel enters at win[DEPTH-1] and the oldest leaves
// win[0], so win[0..DEPTH-1] is a horizontal run of consecutive pixels, oldest
// first. With DEPTH=5 it is the window of the 5x5 convolution; with DEPTH=4 it
// holds the image pixels of four adjacent correlation candidates. Cleared by
// reset.
module image_registers #(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned DW    = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       shift,
  input  logic [DW-1:0]              din,
  output logic [DEPTH-1:0][DW-1:0]   win
);
  always_ff @(posedge clk) begin
    if (rst) win <= '0;
    else if (shift) win <= {din, win[DEPTH-1:1]};
  end
endmodule
