// register_bank: accumulators of one output row of the pyramid level.
//
// One 16-bit register per output column. When acc_en is high, column idx is
// loaded with val (first mask row) or has val added (later rows). After the
// last mask row the bank is full and is read out column by column for the
// write-back to the data memory: rd_data is the register at rd_idx one clock
// after rd_idx is presented.
module register_bank #(
  parameter int unsigned N  = 256,   // columns of the widest output row
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          acc_en,
  input  logic          first,
  input  logic [AW-1:0] idx,
  input  logic [15:0]   val,
  input  logic [AW-1:0] rd_idx,
  output logic [15:0]   rd_data
);
  logic [15:0] acc [N];

  always_ff @(posedge clk) begin
    if (acc_en) acc[idx] <= first ? val : acc[idx] + val;
    rd_data <= acc[rd_idx];
  end
endmodule
