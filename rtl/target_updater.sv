// target_updater: the target updating process.
//
// Copies the patch of the current frame where a target now lies into that
// target's slot of the target memory, at every pyramid level: at level l the
// (th>>l) x (tw>>l) pixels starting at (row>>l, col>>l) of image level l. The
// next frame is then searched for the object as it last looked, which is what
// makes the tracker follow objects that slowly turn or change shape. Taking
// the target pyramid from the image pyramid, rather than reducing the patch
// again, is this design's choice.
//
// One pixel per cycle: data memory read at t, target memory write at t+1.
// done pulses after the last write.
module target_updater
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
  input  logic [2:0]  slot,
  input  logic [15:0] row, col,        // level-0 top-left corner
  input  logic [15:0] th, tw,          // level-0 target size
  output logic        busy,
  output logic        done,
  output logic        rd_re,
  output addr_t       rd_addr,
  input  pixel_t      rd_data,
  output logic        tgt_we,
  output addr_t       tgt_addr,
  output pixel_t      tgt_wdata
);
  localparam int unsigned SLOT = tgt_level_base(LEVELS, LOG2_TMAX);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LAST, S_DONE} state_e;
  state_e state;

  logic [3:0]  lvl;
  logic [15:0] tr, tc, thl, twl;
  logic        wr_pend;
  addr_t       wr_addr;

  always_comb begin
    thl     = th >> lvl;
    twl     = tw >> lvl;
    rd_re   = (state == S_RUN);
    rd_addr = addr_t'(level_base(32'(lvl), LOG2_W, LOG2_H))
            + (addr_t'((row >> lvl) + tr) << (5'(LOG2_W) - 5'(lvl)))
            + addr_t'((col >> lvl) + tc);
    tgt_we    = wr_pend;
    tgt_addr  = wr_addr;
    tgt_wdata = rd_data;
    busy      = (state != S_IDLE);
    done      = (state == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      lvl     <= '0;
      tr      <= '0;
      tc      <= '0;
      wr_pend <= 1'b0;
      wr_addr <= '0;
    end else begin
      wr_pend <= (state == S_RUN);
      wr_addr <= addr_t'(32'(slot) * SLOT) + addr_t'(tgt_level_base(32'(lvl), LOG2_TMAX))
               + (addr_t'(tr) << (5'(LOG2_TMAX) - 5'(lvl))) + addr_t'(tc);
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          lvl   <= '0;
          tr    <= '0;
          tc    <= '0;
        end
        S_RUN: begin
          if (tc == twl - 16'd1) begin
            tc <= '0;
            if (tr == thl - 16'd1) begin
              tr <= '0;
              if (lvl == 4'(LEVELS - 1)) state <= S_LAST;
              else lvl <= lvl + 4'd1;
            end else begin
              tr <= tr + 16'd1;
            end
          end else begin
            tc <= tc + 16'd1;
          end
        end
        S_LAST: state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
