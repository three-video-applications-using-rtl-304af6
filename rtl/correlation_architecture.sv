// correlation_architecture: finds where a target best matches in one search
// window of one pyramid level.
//
// Datapath, following the correlation architecture of the text: four image
// registers and a target register are loaded from the image and target
// memories; four correlation functions compare them and the four correlation
// registers accumulate the terms of four neighbouring candidate positions;
// when a group is complete the local comparator picks the best of the four
// and the global comparator keeps the best so far (Best Global Register,
// Best Row, Best Column). mode selects the measure: SAD or SSD (smaller is
// better) or normalised cross correlation (larger is better), see
// corr_better in pyr_pkg.
//
// Timing: the controller issues a read at cycle t; data returns at t+1 and is
// loaded into the registers at the end of t+1; terms are accumulated at the
// end of t+2; a finished group is compared in cycle t+3. Both memories have a
// one-cycle read latency. done pulses once the best of the window is final.
module correlation_architecture
  import pyr_pkg::*;
#(
  parameter int unsigned LOG2_W    = 9,
  parameter int unsigned LOG2_H    = 9,
  parameter int unsigned LOG2_TMAX = 7,
  parameter int unsigned LEVELS    = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  corr_mode_e  mode,
  input  logic [3:0]  lvl,
  input  logic [15:0] row_lo, row_hi, col_lo, col_hi,
  input  logic [15:0] th, tw,
  input  logic [2:0]  slot,
  output logic        busy,
  output logic        done,
  output logic        img_re,
  output addr_t       img_addr,
  input  pixel_t      img_rdata,
  output logic        tgt_re,
  output addr_t       tgt_addr,
  input  pixel_t      tgt_rdata,
  output logic [31:0] best_val,
  output logic [31:0] best_den,
  output logic [15:0] best_row,
  output logic [15:0] best_col,
  output logic        found
);
  typedef struct packed {
    logic        rd;
    logic        valid;
    logic        first;
    logic        last;
    logic [3:0]  mask;
    logic [15:0] row;
    logic [15:0] col;
  } tag_t;

  tag_t             tag0, tag1, tag2, tag3;
  logic             clear;
  logic [3:0][7:0]  img_win;
  pixel_t           tgt_reg;
  logic [3:0][15:0] term, term2;
  logic [3:0][31:0] acc, acc2;
  logic [31:0]      l_best, l_best2;
  logic [1:0]       l_idx;
  logic             l_any;

  correlation_controller #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LOG2_TMAX(LOG2_TMAX),
                           .LEVELS(LEVELS)) u_ctl (
    .clk, .rst, .start, .lvl, .row_lo, .row_hi, .col_lo, .col_hi, .th, .tw, .slot,
    .busy, .done, .clear, .img_re, .img_addr, .tgt_re, .tgt_addr,
    .t_valid(tag0.valid), .t_first(tag0.first), .t_last(tag0.last), .t_mask(tag0.mask),
    .t_row(tag0.row), .t_col(tag0.col));
  assign tag0.rd = img_re;

  always_ff @(posedge clk) begin
    if (rst) begin
      tag1 <= '0;
      tag2 <= '0;
      tag3 <= '0;
      tgt_reg <= '0;
    end else begin
      tag1 <= tag0;
      tag2 <= tag1;
      tag3 <= tag2;
      if (tag1.rd) tgt_reg <= tgt_rdata;
    end
  end

  // Image registers: one new image pixel per read
  image_registers #(.DEPTH(4), .DW(PIX_W)) u_imgreg (
    .clk, .rst, .shift(tag1.rd), .din(img_rdata), .win(img_win));

  for (genvar q = 0; q < 4; q++) begin : g_cf
    correlation_function u_cf (.mode, .a(img_win[q]), .b(tgt_reg), .cost(term[q]), .energy(term2[q]));
  end

  correlation_registers u_creg (
    .clk, .rst, .en(tag2.valid), .first(tag2.first), .term, .term2, .acc, .acc2);

  local_comparator u_lc (
    .mode, .acc, .acc2, .valid(tag3.mask), .best(l_best), .best2(l_best2), .idx(l_idx),
    .any(l_any));

  global_comparator u_gc (
    .clk, .rst, .clear, .upd(tag3.valid && tag3.last), .mode, .local_any(l_any),
    .local_best(l_best), .local_best2(l_best2), .local_idx(l_idx), .cur_row(tag3.row), .cur_col(tag3.col),
    .best_val, .best_den, .best_row, .best_col, .found);
endmodule
