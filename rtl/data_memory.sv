// data_memory: single-port synchronous pixel RAM.
//
// Used three times in the system: as the data (image) memory holding the
// image pyramid and as the target memory holding the target pyramids. One
// access per cycle: a write stores wdata at addr; every cycle the word at addr
// is read and appears on rdata one clock later (read-before-write on a
// collision). The real board keeps these images in external SRAM banks; here
// they are an on-chip array of the same one-cycle behaviour.
module data_memory #(
  parameter int unsigned DEPTH = 348160,  // 512x512 image, four pyramid levels
  parameter int unsigned DW    = 8
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [pyr_pkg::MEM_AW-1:0] addr,
  input  logic [DW-1:0]             wdata,
  output logic [DW-1:0]             rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && addr < DEPTH) mem[addr] <= wdata;
    rdata <= (addr < DEPTH) ? mem[addr] : '0;
  end
endmodule
