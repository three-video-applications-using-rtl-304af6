// correlation_registers: accumulators of the four candidates in flight.
//
// When en is high each register takes term[q] (first pixel of a candidate
// group, first=1) or adds it. acc holds the correlation sum of each
// candidate and acc2 the image-energy sum used only by normalised cross
// correlation. 32 bits hold an SSD, or a sum of products, over a 128x128
// target. Updates at the clock edge; synchronous reset.
module correlation_registers (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             first,
  input  logic [3:0][15:0] term,
  input  logic [3:0][15:0] term2,
  output logic [3:0][31:0] acc,
  output logic [3:0][31:0] acc2
);
  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      acc2 <= '0;
    end else if (en)
      for (int q = 0; q < 4; q++) begin
        acc[q] <= first ? 32'(term[q]) : acc[q] + 32'(term[q]);
        acc2[q] <= first ? 32'(term2[q]) : acc2[q] + 32'(term2[q]);
      end
  end
endmodule
