// address_generator: control unit of the pyramidal architecture.
//
// Builds levels 1..LEVELS-1 one after the other. Each level is produced in
// passes of 2*NPROC output rows (two per processor). A pass:
//   READ   - reads the 4*NPROC+3 virtual input rows 2*j0-2 .. 2*j0+4*NPROC of
//            the source level, each from virtual column -2 to W+1, one pixel
//            per cycle; rows and columns outside the image are clamped to the
//            edge (edge replication, this design's choice).
//   DRAIN  - two cycles for the last pixels to reach the register banks.
//   WB     - the banks are full: irq pulses (the "interruption") and every
//            bank holding a real output row is copied to the data memory, one
//            pixel per cycle: bank read at t, memory write at t+1.
//   WB_END - lets the last write use the memory port.
// pix_valid/pix_col/pix_vrow are delayed by the one-cycle memory latency so
// they arrive with the pixel. Cycles per pass: (4*NPROC+3)*(Win+4) + rows*Wout
// + 4, with Win the source and Wout the output width.
module address_generator
  import pyr_pkg::*;
#(
  parameter int unsigned LOG2_W = 9,
  parameter int unsigned LOG2_H = 9,
  parameter int unsigned LEVELS = 4,
  parameter int unsigned NPROC  = 1,
  parameter int unsigned AW     = LOG2_W - 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic               irq,
  // data memory
  output logic               mem_re,
  output logic               mem_we,
  output addr_t              mem_addr,
  // pixel tags, aligned with the memory read data
  output logic               pix_valid,
  output logic signed [15:0] pix_col,
  output logic signed [15:0] pix_vrow,
  output logic [15:0]        j0,          // first output row of this pass
  output logic [15:0]        out_rows,    // height of the level being built
  // write-back
  output logic [7:0]         rd_bank,     // bank read this cycle (2*proc+module)
  output logic [AW-1:0]      rd_idx,
  output logic [7:0]         wb_bank      // bank whose data is written this cycle
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_DRAIN, S_WB, S_WB_END, S_DONE} state_e;
  state_e state;

  localparam int unsigned NB = 2 * NPROC;

  logic [3:0]         lvl;          // level being built
  logic signed [15:0] vr, vc;
  logic [7:0]         b;
  logic [15:0]        i;
  logic [1:0]         drain;
  logic               wb_pend;
  addr_t              wb_addr;

  logic [4:0]         lw, lh;       // log2 of source width and height
  logic signed [15:0] w_in, h_in, w_out, h_out, vr_last;
  logic [15:0]        r_cl, c_cl;
  addr_t              rd_addr;

  always_comb begin
    lw      = 5'(LOG2_W) - 5'(lvl) + 5'd1;
    lh      = 5'(LOG2_H) - 5'(lvl) + 5'd1;
    w_in    = 16'sd1 <<< lw;
    h_in    = 16'sd1 <<< lh;
    w_out   = w_in >>> 1;
    h_out   = h_in >>> 1;
    vr_last = 16'(2 * j0) + 16'(4 * NPROC);
    r_cl    = (vr < 0) ? 16'd0 : (vr >= h_in) ? 16'(h_in - 1) : 16'(vr);
    c_cl    = (vc < 0) ? 16'd0 : (vc >= w_in) ? 16'(w_in - 1) : 16'(vc);
    rd_addr = addr_t'(level_base(32'(lvl) - 1, LOG2_W, LOG2_H))
            + (addr_t'(r_cl) << lw) + addr_t'(c_cl);
    out_rows = 16'(h_out);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      lvl     <= 4'd1;
      j0      <= '0;
      vr      <= '0;
      vc      <= '0;
      b       <= '0;
      i       <= '0;
      drain   <= '0;
      wb_pend <= 1'b0;
      wb_addr <= '0;
      wb_bank <= '0;
      pix_valid <= 1'b0;
      pix_col   <= '0;
      pix_vrow  <= '0;
    end else begin
      pix_valid <= (state == S_READ);
      pix_col   <= vc;
      pix_vrow  <= vr;
      wb_pend   <= 1'b0;
      case (state)
        S_IDLE: if (start && LEVELS > 1) begin
          state <= S_READ;
          lvl   <= 4'd1;
          j0    <= '0;
          vr    <= -16'sd2;
          vc    <= -16'sd2;
        end
        S_READ: begin
          if (vc == w_in + 16'sd1) begin
            vc <= -16'sd2;
            vr <= vr + 16'sd1;
            if (vr == vr_last) begin
              state <= S_DRAIN;
              drain <= 2'd1;
            end
          end else begin
            vc <= vc + 16'sd1;
          end
        end
        S_DRAIN: begin
          if (drain == 0) begin
            state <= S_WB;
            b     <= '0;
            i     <= '0;
          end
          drain <= drain - 2'd1;
        end
        S_WB: begin
          if (16'(j0 + 16'(b)) >= 16'(h_out)) begin
            state <= S_WB_END;
          end else begin
            wb_pend <= 1'b1;
            wb_bank <= b;
            wb_addr <= addr_t'(level_base(32'(lvl), LOG2_W, LOG2_H))
                     + (addr_t'(j0 + 16'(b)) << (lw - 5'd1)) + addr_t'(i);
            if (i == 16'(w_out - 1)) begin
              i <= '0;
              b <= b + 8'd1;
              if (b == 8'(NB - 1)) state <= S_WB_END;
            end else begin
              i <= i + 16'd1;
            end
          end
        end
        S_WB_END: begin
          state <= S_READ;
          vc    <= -16'sd2;
          if (j0 + 16'(NB) >= 16'(h_out)) begin
            if (lvl == 4'(LEVELS - 1)) begin
              state <= S_DONE;
            end else begin
              lvl <= lvl + 4'd1;
              j0  <= '0;
              vr  <= -16'sd2;
            end
          end else begin
            j0 <= j0 + 16'(NB);
            vr <= 16'(2 * (j0 + 16'(NB))) - 16'sd2;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy     = (state != S_IDLE);
    done     = (state == S_DONE);
    irq      = (state == S_DRAIN) && (drain == 0);
    rd_bank  = b;
    rd_idx   = AW'(i);
    mem_re   = (state == S_READ);
    mem_we   = wb_pend;
    mem_addr = wb_pend ? wb_addr : rd_addr;
  end
endmodule
