// control_generator: chooses the mask row for the input row being read.
//
// A convolution module is assigned one output row orow of the level being
// built. Input (virtual) row vrow contributes to it with mask row
// tap = vrow - 2*orow + 2 when 0 <= tap <= 4. The generator addresses the
// coefficient memory with tap, passes the row read back to its convolution
// module, and flags the first and last contributing rows so the register bank
// knows when to load and when the output row is complete. Purely
// combinational. Virtual rows outside the image are clamped by the address
// generator (edge replication, this design's choice).
module control_generator
  import pyr_pkg::*;
(
  input  logic signed [15:0] vrow,     // virtual input row (may be negative)
  input  logic        [15:0] orow,     // output row served by the module
  output logic        [2:0]  rom_row,  // to coefficient memory
  input  coef_row_t          rom_coef,
  output logic               active,   // this input row contributes
  output logic               first,    // tap 0: accumulator is loaded
  output logic               last,     // tap 4: output row complete
  output coef_row_t          coef
);
  logic signed [17:0] tap;

  always_comb begin
    tap     = 18'(vrow) - 18'(signed'({2'b00, orow}) <<< 1) + 18'sd2;
    active  = (tap >= 0) && (tap <= 4);
    rom_row = active ? tap[2:0] : 3'd7;
    first   = active && (tap == 0);
    last    = active && (tap == 4);
    coef    = active ? rom_coef : '0;
  end
endmodule
