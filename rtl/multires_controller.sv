// multires_controller: coarse-to-fine (multiresolution) correlation of one
// target.
//
// The search starts at the coarsest level, LEVELS-1, over every position
// where the target fits in the image. The best position found there is
// doubled to give the centre of the search at the next finer level, where
// only a window of +-SEARCH_R positions around it is examined; this repeats
// down to level 0, whose best position (top-left corner, level-0 pixels) is
// the result. At level l the target is (th>>l) x (tw>>l) pixels. The search
// order follows the text; the window radius is this design's choice.
//
// Interface: start with tw/th/slot stable; drives one correlation engine per
// level through c_start / c_done; done pulses with row/col valid.
module multires_controller #(
  parameter int unsigned LOG2_W   = 9,
  parameter int unsigned LOG2_H   = 9,
  parameter int unsigned LEVELS   = 4,
  parameter int unsigned SEARCH_R = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] th, tw,          // level-0 target size
  input  logic [2:0]  slot,
  output logic        busy,
  output logic        done,
  output logic [15:0] row,
  output logic [15:0] col,
  // to the correlation architecture
  output logic        c_start,
  output logic [3:0]  c_lvl,
  output logic [15:0] c_row_lo, c_row_hi, c_col_lo, c_col_hi,
  output logic [15:0] c_th, c_tw,
  output logic [2:0]  c_slot,
  input  logic        c_done,
  input  logic [15:0] c_best_row,
  input  logic [15:0] c_best_col
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_DONE} state_e;
  state_e state;

  logic [15:0] nmax_r, nmax_c, cr, cc;

  // Target size at level l, largest top-left position at level l-1
  always_comb begin
    c_th   = th >> c_lvl;
    c_tw   = tw >> c_lvl;
    nmax_r = (16'd1 << (5'(LOG2_H) - 5'(c_lvl) + 5'd1)) - (th >> (c_lvl - 4'd1));
    nmax_c = (16'd1 << (5'(LOG2_W) - 5'(c_lvl) + 5'd1)) - (tw >> (c_lvl - 4'd1));
    cr     = c_best_row << 1;
    cc     = c_best_col << 1;
    c_slot = slot;
    c_start = (state == S_START);
    busy    = (state != S_IDLE);
    done    = (state == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      c_lvl <= '0;
      c_row_lo <= '0; c_row_hi <= '0; c_col_lo <= '0; c_col_hi <= '0;
      row <= '0;
      col <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_START;
          c_lvl    <= 4'(LEVELS - 1);
          c_row_lo <= '0;
          c_col_lo <= '0;
          c_row_hi <= (16'd1 << (LOG2_H - LEVELS + 1)) - (th >> (LEVELS - 1));
          c_col_hi <= (16'd1 << (LOG2_W - LEVELS + 1)) - (tw >> (LEVELS - 1));
        end
        S_START: state <= S_WAIT;
        S_WAIT: if (c_done) begin
          if (c_lvl == 0) begin
            row   <= c_best_row;
            col   <= c_best_col;
            state <= S_DONE;
          end else begin
            c_lvl    <= c_lvl - 4'd1;
            c_row_lo <= (cr > 16'(SEARCH_R)) ? cr - 16'(SEARCH_R) : 16'd0;
            c_col_lo <= (cc > 16'(SEARCH_R)) ? cc - 16'(SEARCH_R) : 16'd0;
            c_row_hi <= (cr + 16'(SEARCH_R) > nmax_r) ? nmax_r : cr + 16'(SEARCH_R);
            c_col_hi <= (cc + 16'(SEARCH_R) > nmax_c) ? nmax_c : cc + 16'(SEARCH_R);
            state    <= S_START;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
