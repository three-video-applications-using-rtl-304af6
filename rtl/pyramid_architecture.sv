// pyramid_architecture: builds the Gaussian pyramid of the image in the
// data memory.
//
// Level 0 (2^LOG2_W x 2^LOG2_H pixels) must be in the data memory at address
// 0. On start, the address generator streams the source level through NPROC
// pyramidal convolution processors; each output pixel is
//   g_l(i,j) = (sum_{m,n} w(m,n) g_{l-1}(2i+m, 2j+n) + 128) >> 8
// over the 5x5 binomial mask with edge replication, and the finished rows are
// written back behind the previous level. The memory port is a plain request
// (re/we/addr/wdata) with read data one clock later; the owner multiplexor
// gives this block the bus while busy. cycles holds the clock count of the
// last run (start to done), the figure the text reports per processor count.
module pyramid_architecture
  import pyr_pkg::*;
#(
  parameter int unsigned LOG2_W = 9,
  parameter int unsigned LOG2_H = 9,
  parameter int unsigned LEVELS = 4,
  parameter int unsigned NPROC  = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        irq,
  output mem_req_t    mem,
  input  pixel_t      mem_rdata,
  output logic [31:0] cycles
);
  localparam int unsigned AW = LOG2_W - 1;
  localparam int unsigned N  = 1 << AW;

  logic               pix_valid;
  logic signed [15:0] pix_col, pix_vrow;
  logic [15:0]        j0, out_rows;
  logic [7:0]         rd_bank, wb_bank;
  logic [AW-1:0]      rd_idx;
  pixel_t             rd_data [NPROC];

  address_generator #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS), .NPROC(NPROC),
                      .AW(AW)) u_ag (
    .clk, .rst, .start, .busy, .done, .irq,
    .mem_re(mem.re), .mem_we(mem.we), .mem_addr(mem.addr),
    .pix_valid, .pix_col, .pix_vrow, .j0, .out_rows,
    .rd_bank, .rd_idx, .wb_bank);

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    logic [15:0] orow0;
    logic [1:0]  mod_en;
    always_comb begin
      orow0     = j0 + 16'(2 * p);
      mod_en[0] = orow0 < out_rows;
      mod_en[1] = (orow0 + 16'd1) < out_rows;
    end
    pyramid_processor #(.N(N), .AW(AW)) u_proc (
      .clk, .rst, .pix_valid, .pix(mem_rdata), .pix_col, .pix_vrow,
      .orow0, .mod_en, .rd_sel(rd_bank[0]), .rd_idx, .rd_data(rd_data[p]),
      .row_done());
  end

  assign mem.wdata = rd_data[wb_bank[7:1]];

  always_ff @(posedge clk) begin
    if (rst) cycles <= '0;
    else if (start && !busy) cycles <= 32'd1;
    else if (busy) cycles <= cycles + 32'd1;
  end
endmodule
