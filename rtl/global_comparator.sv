// global_comparator: Best Global Register with Best Row / Best Column.
//
// clear empties the register (no best yet). When upd is high and the local
// comparator has a valid result strictly better than the stored one (or none
// is stored), the value and its energy sum are taken and Best Row/Best Column
// are loaded from the current row and the current column plus the local
// index, so the first best candidate in scan order is kept. Better means
// smaller for SAD/SSD and larger normalised correlation for NCC
// (corr_better). Updates at the clock edge; found tells whether any
// candidate was taken since clear.
module global_comparator
  import pyr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        upd,
  input  corr_mode_e  mode,
  input  logic        local_any,
  input  logic [31:0] local_best,
  input  logic [31:0] local_best2,
  input  logic [1:0]  local_idx,
  input  logic [15:0] cur_row,
  input  logic [15:0] cur_col,
  output logic [31:0] best_val,
  output logic [31:0] best_den,
  output logic [15:0] best_row,
  output logic [15:0] best_col,
  output logic        found
);
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      best_val <= '1;
      best_den <= '0;
      best_row <= '0;
      best_col <= '0;
      found    <= 1'b0;
    end else if (upd && local_any &&
                 (!found || corr_better(mode, local_best, local_best2, best_val, best_den))) begin
      best_val <= local_best;
      best_den <= local_best2;
      best_row <= cur_row;
      best_col <= cur_col + 16'(local_idx);
      found    <= 1'b1;
    end
  end
endmodule
