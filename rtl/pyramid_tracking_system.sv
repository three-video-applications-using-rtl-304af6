// pyramid_tracking_system: FPGA pyramid and multiresolution correlation
// engine for multiple-target tracking, mosaicking and stabilisation.
//
// The host writes a frame (level 0, 2^LOG2_W x 2^LOG2_H 8-bit pixels, row by
// row from address 0) into the data memory through the host port while the
// system is idle, then pulses start. For the frame the system
//   - builds the Gaussian pyramid (pyramid_architecture, NPROC processors);
//   - except on the first frame, finds every target by coarse-to-fine
//     correlation (multires_controller driving correlation_architecture);
//   - refreshes each target's pyramid in the target memory (target_updater);
//   - votes for the global movement vector (voting_system).
// done pulses at the end; pos_row/pos_col hold each target's top-left corner
// and vec_dy/vec_dx the movement shared by most targets, which the host uses
// to place the frame in a mosaic or to cut the stabilised sub-image. The
// memory bus multiplexor hands the data memory to the host, the pyramid or
// the tracker; a second one hands the target memory to the correlation reads
// or the updater writes. Host reads return data one clock after the address.
// bus_error is set (until reset) if a master ever requests the data memory
// without owning it. bus_owner, corr_done/corr_lvl and update_done report
// progress: who holds the data memory, each finished search window and its
// level, and each refreshed target.
module pyramid_tracking_system
  import pyr_pkg::*;
#(
  parameter int unsigned LOG2_W      = 9,
  parameter int unsigned LOG2_H      = 9,
  parameter int unsigned LEVELS      = 4,
  parameter int unsigned NPROC       = 1,
  parameter int unsigned MAX_TARGETS = 5,
  parameter int unsigned LOG2_TMAX   = 7,
  parameter int unsigned SEARCH_R    = 2
) (
  input  logic               clk,
  input  logic               rst,
  // host memory port
  input  logic               host_re,
  input  logic               host_we,
  input  addr_t              host_addr,
  input  pixel_t             host_wdata,
  output pixel_t             host_rdata,
  // frame control
  input  logic               start,
  input  logic               first_frame,
  input  corr_mode_e         mode,
  input  logic [2:0]         num_targets,
  input  logic [15:0]        tgt_h,
  input  logic [15:0]        tgt_w,
  input  logic [15:0]        init_row [MAX_TARGETS],
  input  logic [15:0]        init_col [MAX_TARGETS],
  output logic               busy,
  output logic               done,
  // results
  output logic [15:0]        pos_row [MAX_TARGETS],
  output logic [15:0]        pos_col [MAX_TARGETS],
  output logic signed [15:0] vec_dy,
  output logic signed [15:0] vec_dx,
  output logic [2:0]         votes,
  output logic [31:0]        pyr_cycles,
  output logic               pyr_irq,
  output logic               bus_error,
  // progress, for the host and for monitoring
  output owner_e             bus_owner,
  output logic               corr_done,    // one search window finished
  output logic [3:0]         corr_lvl,     // its pyramid level
  output logic               update_done   // one target pyramid refreshed
);
  localparam int unsigned DMEM_DEPTH = level_base(LEVELS, LOG2_W, LOG2_H);
  localparam int unsigned TMEM_DEPTH = MAX_TARGETS * tgt_level_base(LEVELS, LOG2_TMAX);

  owner_e      owner;
  logic        tmem_wr;
  mem_req_t    dreq [3];
  mem_req_t    dmem_req, treq [2], tmem_req;
  pixel_t      dmem_rdata, tmem_rdata;
  logic        d_conflict;

  // pyramid
  logic        pyr_start, pyr_done, pyr_busy;
  // correlation
  logic        mr_start, mr_busy, mr_done;
  logic [15:0] mr_row, mr_col;
  logic        c_start, c_done, c_busy, c_found;
  logic [3:0]  c_lvl;
  logic [15:0] c_row_lo, c_row_hi, c_col_lo, c_col_hi, c_th, c_tw;
  logic [2:0]  c_slot, slot;
  logic        img_re, tgt_re;
  addr_t       img_addr, tgt_addr;
  logic [31:0] c_best_val, c_best_den;
  logic [15:0] c_best_row, c_best_col;
  // target update
  logic        up_start, up_busy, up_done, up_rd_re, up_we;
  logic [15:0] up_row, up_col;
  addr_t       up_rd_addr, up_waddr;
  pixel_t      up_wdata;
  // voting
  logic        vote_start, vote_valid;
  logic [2:0]  winner;
  logic signed [15:0] dy [MAX_TARGETS];
  logic signed [15:0] dx [MAX_TARGETS];

  // ---------------- memories and their multiplexors ----------------
  assign dreq[OWN_HOST] = '{re: host_re, we: host_we, addr: host_addr, wdata: host_wdata};
  assign dreq[OWN_TRACKER] = tmem_wr
      ? '{re: up_rd_re, we: 1'b0, addr: up_rd_addr, wdata: '0}
      : '{re: img_re,   we: 1'b0, addr: img_addr,   wdata: '0};

  bus_mux #(.N(3)) u_dmux (
    .sel(owner), .m_req(dreq), .s_req(dmem_req), .grant(), .conflict(d_conflict));

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .we(dmem_req.we), .addr(dmem_req.addr), .wdata(dmem_req.wdata),
    .rdata(dmem_rdata));
  assign host_rdata = dmem_rdata;

  assign treq[0] = '{re: tgt_re, we: 1'b0, addr: tgt_addr, wdata: '0};
  assign treq[1] = '{re: 1'b0, we: up_we, addr: up_waddr, wdata: up_wdata};

  bus_mux #(.N(2)) u_tmux (
    .sel(tmem_wr), .m_req(treq), .s_req(tmem_req), .grant(), .conflict());

  data_memory #(.DEPTH(TMEM_DEPTH)) u_tmem (
    .clk, .we(tmem_req.we), .addr(tmem_req.addr), .wdata(tmem_req.wdata),
    .rdata(tmem_rdata));

  assign bus_owner   = owner;
  assign corr_done   = c_done;
  assign corr_lvl    = c_lvl;
  assign update_done = up_done;

  always_ff @(posedge clk) begin
    if (rst) bus_error <= 1'b0;
    else if (d_conflict) bus_error <= 1'b1;
  end

  // ---------------- pyramid ----------------
  pyramid_architecture #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS),
                         .NPROC(NPROC)) u_pyr (
    .clk, .rst, .start(pyr_start), .busy(pyr_busy), .done(pyr_done), .irq(pyr_irq),
    .mem(dreq[OWN_PYRAMID]), .mem_rdata(dmem_rdata), .cycles(pyr_cycles));

  // ---------------- frame sequencing ----------------
  tracking_controller #(.MAX_TARGETS(MAX_TARGETS)) u_trk (
    .clk, .rst, .start, .first_frame, .num_targets, .init_row, .init_col,
    .busy, .done, .owner, .tmem_wr,
    .pyr_start, .pyr_done,
    .mr_start, .slot, .mr_done, .mr_row, .mr_col,
    .up_start, .up_row, .up_col, .up_done,
    .vote_start, .vote_valid,
    .pos_row, .pos_col, .dy, .dx);

  // ---------------- multiresolution correlation ----------------
  multires_controller #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS),
                        .SEARCH_R(SEARCH_R)) u_mr (
    .clk, .rst, .start(mr_start), .th(tgt_h), .tw(tgt_w), .slot,
    .busy(mr_busy), .done(mr_done), .row(mr_row), .col(mr_col),
    .c_start, .c_lvl, .c_row_lo, .c_row_hi, .c_col_lo, .c_col_hi, .c_th, .c_tw,
    .c_slot, .c_done, .c_best_row, .c_best_col);

  correlation_architecture #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LOG2_TMAX(LOG2_TMAX),
                             .LEVELS(LEVELS)) u_corr (
    .clk, .rst, .start(c_start), .mode, .lvl(c_lvl),
    .row_lo(c_row_lo), .row_hi(c_row_hi), .col_lo(c_col_lo), .col_hi(c_col_hi),
    .th(c_th), .tw(c_tw), .slot(c_slot), .busy(c_busy), .done(c_done),
    .img_re, .img_addr, .img_rdata(dmem_rdata),
    .tgt_re, .tgt_addr, .tgt_rdata(tmem_rdata),
    .best_val(c_best_val), .best_den(c_best_den), .best_row(c_best_row), .best_col(c_best_col), .found(c_found));

  // ---------------- target updating ----------------
  target_updater #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LOG2_TMAX(LOG2_TMAX),
                   .LEVELS(LEVELS)) u_upd (
    .clk, .rst, .start(up_start), .slot, .row(up_row), .col(up_col), .th(tgt_h), .tw(tgt_w),
    .busy(up_busy), .done(up_done), .rd_re(up_rd_re), .rd_addr(up_rd_addr),
    .rd_data(dmem_rdata), .tgt_we(up_we), .tgt_addr(up_waddr), .tgt_wdata(up_wdata));

  // ---------------- voting ----------------
  voting_system #(.MAX_TARGETS(MAX_TARGETS)) u_vote (
    .clk, .rst, .start(vote_start), .n(num_targets), .dy, .dx,
    .valid(vote_valid), .gdy(vec_dy), .gdx(vec_dx), .votes, .winner);
endmodule
