// tb_global_comparator: random sequences of local results; the best value,
// row and column (current column + local index) must track a reference that
// keeps the first strict minimum (SAD/SSD) or the first strict maximum of
// n^2/d with d > 0 (NCC, exact 64-bit arithmetic on values below 2^20);
// clear must empty it.
module tb_global_comparator;
  import pyr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, upd = 0, local_any = 0, found;
  logic [31:0] local_best = '0, local_best2 = '0, best_val, best_den;
  corr_mode_e mode = CORR_SAD;
  logic [1:0] local_idx = '0;
  logic [15:0] cur_row = '0, cur_col = '0, best_row, best_col;
  longint mv, md; int mr, mc; bit mf;
  global_comparator dut (.clk, .rst, .clear, .upd, .mode, .local_any, .local_best, .local_best2,
    .local_idx, .cur_row, .cur_col, .best_val, .best_den, .best_row, .best_col, .found);

  function automatic bit beats(bit ncc, longint n, longint d, longint bn, longint bd);
    if (!ncc) return n < bn;
    if (d == 0) return 0;
    if (bd == 0) return 1;
    return n * n * bd > bn * bn * d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < 30; s++) begin
      clear = 1; mf = 0;
      mode = (s % 3 == 2) ? CORR_NCC : corr_mode_e'(s % 2);
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < 50; k++) begin
        upd = ($urandom_range(0, 3) != 0);
        local_any = ($urandom_range(0, 7) != 0);
        local_best = 32'($urandom_range(0, 1000));
        local_best2 = (mode == CORR_NCC) ? 32'($urandom_range(0, 1000)) : '0;
        local_idx = 2'($urandom);
        cur_row = 16'($urandom_range(0, 500));
        cur_col = 16'($urandom_range(0, 500));
        if (upd && local_any &&
            (!mf || beats(mode == CORR_NCC, local_best, local_best2, mv, md))) begin
          mv = local_best; md = local_best2; mr = cur_row; mc = cur_col + local_idx; mf = 1;
        end
        @(negedge clk);
        checks++;
        if (found != mf || (mf && (longint'(best_val) != mv || longint'(best_den) != md || int'(best_row) != mr
                                   || int'(best_col) != mc))) begin
          failures++; $display("seq %0d step %0d", s, k);
        end
      end
      upd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
