// correlation_controller: scan of one search window at one pyramid level.
//
// The candidate positions (top-left corners) row_lo..row_hi x col_lo..col_hi
// are taken four columns at a time: the Current Row register r and the
// Current Column register c0 name the group c0..c0+3. For every target row tr
// the controller reads image pixels (r+tr, c0+k) for k = 0..tw+2, one per
// cycle, and target pixel (tr, k-3) alongside. After the first three reads of
// a row the four image registers hold columns c0+k-3 .. c0+k, exactly the
// pixels that candidates c0..c0+3 compare with target column k-3, so four
// correlation terms are produced per cycle. A group costs th*(tw+3) cycles.
//
// Tags issued with each read (valid, first, last, candidate mask, current row
// and column) are delayed by the datapath to match the two-cycle path from
// address to correlation registers. clear empties the global comparator at
// start; done pulses four cycles after the last read, once the last group has
// been compared.
module correlation_controller
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
  input  logic [3:0]  lvl,
  input  logic [15:0] row_lo, row_hi, col_lo, col_hi,
  input  logic [15:0] th, tw,          // target size at this level
  input  logic [2:0]  slot,            // target memory slot
  output logic        busy,
  output logic        done,
  output logic        clear,
  output logic        img_re,
  output addr_t       img_addr,
  output logic        tgt_re,
  output addr_t       tgt_addr,
  output logic        t_valid,
  output logic        t_first,
  output logic        t_last,
  output logic [3:0]  t_mask,
  output logic [15:0] t_row,
  output logic [15:0] t_col
);
  localparam int unsigned SLOT = tgt_level_base(LEVELS, LOG2_TMAX);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [15:0] r, c0, tr, k;
  logic [2:0]  drain;
  logic [4:0]  lw, lh, lt;
  logic [15:0] img_r, img_c, tc;

  always_comb begin
    lw    = 5'(LOG2_W) - 5'(lvl);
    lh    = 5'(LOG2_H) - 5'(lvl);
    lt    = 5'(LOG2_TMAX) - 5'(lvl);
    img_r = r + tr;
    img_c = c0 + k;
    if (img_r >= (16'd1 << lh)) img_r = (16'd1 << lh) - 16'd1;
    if (img_c >= (16'd1 << lw)) img_c = (16'd1 << lw) - 16'd1;
    tc    = (k >= 16'd3) ? k - 16'd3 : 16'd0;
    img_addr = addr_t'(level_base(32'(lvl), LOG2_W, LOG2_H)) + (addr_t'(img_r) << lw)
             + addr_t'(img_c);
    tgt_addr = addr_t'(32'(slot) * SLOT) + addr_t'(tgt_level_base(32'(lvl), LOG2_TMAX))
             + (addr_t'(tr) << lt) + addr_t'(tc);
    img_re  = (state == S_RUN);
    tgt_re  = (state == S_RUN);
    t_valid = (state == S_RUN) && (k >= 16'd3);
    t_first = (tr == 16'd0) && (k == 16'd3);
    t_last  = (tr == th - 16'd1) && (k == tw + 16'd2);
    for (int q = 0; q < 4; q++) t_mask[q] = (c0 + 16'(q)) <= col_hi;
    t_row   = r;
    t_col   = c0;
    busy    = (state != S_IDLE);
    done    = (state == S_DONE);
    clear   = (state == S_IDLE) && start;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      r <= '0; c0 <= '0; tr <= '0; k <= '0;
      drain <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          r  <= row_lo;
          c0 <= col_lo;
          tr <= '0;
          k  <= '0;
        end
        S_RUN: begin
          if (k == tw + 16'd2) begin
            k <= '0;
            if (tr == th - 16'd1) begin
              tr <= '0;
              if (c0 + 16'd4 > col_hi) begin
                c0 <= col_lo;
                if (r == row_hi) begin
                  state <= S_DRAIN;
                  drain <= 3'd3;
                end else begin
                  r <= r + 16'd1;
                end
              end else begin
                c0 <= c0 + 16'd4;
              end
            end else begin
              tr <= tr + 16'd1;
            end
          end else begin
            k <= k + 16'd1;
          end
        end
        S_DRAIN: begin
          drain <= drain - 3'd1;
          if (drain == 0) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
