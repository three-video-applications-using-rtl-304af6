// tracking_controller: frame sequencing of multiresolution multiple-target
// tracking.
//
// Per frame, after start:
//   1. the pyramid architecture builds the pyramid of the new frame;
//   2. on the first frame no correlation is run: each target takes its
//      initial position from the parameter inputs; on later frames the
//      multiresolution correlation is run for targets 0..num_targets-1 in
//      turn, and each target's position and movement (dy,dx) are updated;
//   3. the target updating process copies every target, at its new position,
//      into its slot of the target memory;
//   4. the voting system turns the movements into one global vector.
// This order follows the text. The controller also decides who owns the
// data memory bus (owner) and the target memory (tmem_wr: updater writing,
// else correlation reading). done pulses when the frame is finished.
module tracking_controller
  import pyr_pkg::*;
#(
  parameter int unsigned MAX_TARGETS = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic               first_frame,
  input  logic [2:0]         num_targets,
  input  logic [15:0]        init_row [MAX_TARGETS],
  input  logic [15:0]        init_col [MAX_TARGETS],
  output logic               busy,
  output logic               done,
  output owner_e             owner,
  output logic               tmem_wr,
  // pyramid architecture
  output logic               pyr_start,
  input  logic               pyr_done,
  // multiresolution correlation
  output logic               mr_start,
  output logic [2:0]         slot,
  input  logic               mr_done,
  input  logic [15:0]        mr_row,
  input  logic [15:0]        mr_col,
  // target updating
  output logic               up_start,
  output logic [15:0]        up_row,
  output logic [15:0]        up_col,
  input  logic               up_done,
  // voting
  output logic               vote_start,
  input  logic               vote_valid,
  // target state
  output logic [15:0]        pos_row [MAX_TARGETS],
  output logic [15:0]        pos_col [MAX_TARGETS],
  output logic signed [15:0] dy [MAX_TARGETS],
  output logic signed [15:0] dx [MAX_TARGETS]
);
  typedef enum logic [3:0] {
    S_IDLE, S_PYR_GO, S_PYR_WAIT, S_INIT, S_CORR_GO, S_CORR_WAIT,
    S_UPD_GO, S_UPD_WAIT, S_VOTE, S_VOTE_WAIT, S_DONE
  } state_e;
  state_e state;
  logic   first_q;

  always_comb begin
    busy       = (state != S_IDLE);
    done       = (state == S_DONE);
    pyr_start  = (state == S_PYR_GO);
    mr_start   = (state == S_CORR_GO);
    up_start   = (state == S_UPD_GO);
    vote_start = (state == S_VOTE);
    up_row     = pos_row[slot];
    up_col     = pos_col[slot];
    tmem_wr    = (state == S_UPD_GO) || (state == S_UPD_WAIT);
    unique case (state)
      S_PYR_GO, S_PYR_WAIT:                          owner = OWN_PYRAMID;
      S_CORR_GO, S_CORR_WAIT, S_UPD_GO, S_UPD_WAIT:  owner = OWN_TRACKER;
      default:                                       owner = OWN_HOST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      slot    <= '0;
      first_q <= 1'b0;
      for (int t = 0; t < MAX_TARGETS; t++) begin
        pos_row[t] <= '0;
        pos_col[t] <= '0;
        dy[t]      <= '0;
        dx[t]      <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state   <= S_PYR_GO;
          first_q <= first_frame;
        end
        S_PYR_GO: state <= S_PYR_WAIT;
        S_PYR_WAIT: if (pyr_done) begin
          slot  <= '0;
          state <= first_q ? S_INIT : S_CORR_GO;
        end
        S_INIT: begin
          for (int t = 0; t < MAX_TARGETS; t++) begin
            pos_row[t] <= init_row[t];
            pos_col[t] <= init_col[t];
            dy[t]      <= '0;
            dx[t]      <= '0;
          end
          state <= S_UPD_GO;
        end
        S_CORR_GO: state <= S_CORR_WAIT;
        S_CORR_WAIT: if (mr_done) begin
          pos_row[slot] <= mr_row;
          pos_col[slot] <= mr_col;
          dy[slot]      <= signed'(mr_row) - signed'(pos_row[slot]);
          dx[slot]      <= signed'(mr_col) - signed'(pos_col[slot]);
          if (slot == num_targets - 3'd1) begin
            slot  <= '0;
            state <= S_UPD_GO;
          end else begin
            slot  <= slot + 3'd1;
            state <= S_CORR_GO;
          end
        end
        S_UPD_GO: state <= S_UPD_WAIT;
        S_UPD_WAIT: if (up_done) begin
          if (slot == num_targets - 3'd1) begin
            state <= S_VOTE;
          end else begin
            slot  <= slot + 3'd1;
            state <= S_UPD_GO;
          end
        end
        S_VOTE: state <= S_VOTE_WAIT;
        S_VOTE_WAIT: if (vote_valid) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
