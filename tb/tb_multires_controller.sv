// tb_multires_controller: a model correlation engine answers each search
// with a chosen best position. The controller must search the whole image at
// level 3, then windows of +-2 around twice the previous answer (clipped to
// where the target fits) at levels 2, 1, 0, with the target halved per level,
// and return the level-0 answer. Two runs: one in the middle of the image and
// one against the corners, where the windows are clipped.
module tb_multires_controller;
  localparam int LW = 9, LH = 9, LEVELS = 4, R = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, c_start, c_done = 0;
  logic [15:0] th = 16'd40, tw = 16'd60, row, col;
  logic [3:0] c_lvl;
  logic [15:0] c_row_lo, c_row_hi, c_col_lo, c_col_hi, c_th, c_tw, c_best_row = '0, c_best_col = '0;
  logic [2:0] c_slot;
  int ans_r [4], ans_c [4];

  multires_controller #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEVELS), .SEARCH_R(R)) dut (
    .clk, .rst, .start, .th, .tw, .slot(3'd3), .busy, .done, .row, .col, .c_start, .c_lvl,
    .c_row_lo, .c_row_hi, .c_col_lo, .c_col_hi, .c_th, .c_tw, .c_slot, .c_done, .c_best_row,
    .c_best_col);

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    int pr = 0, pc = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int l = LEVELS - 1; l >= 0; l--) begin
      automatic int hl = (1 << LH) >> l, wl = (1 << LW) >> l;
      automatic int mr = hl - (40 >> l), mc = wl - (60 >> l);
      automatic int elo_r = (l == LEVELS - 1) ? 0 : mx(2 * pr - R, 0);
      automatic int ehi_r = (l == LEVELS - 1) ? mr : mn(2 * pr + R, mr);
      automatic int elo_c = (l == LEVELS - 1) ? 0 : mx(2 * pc - R, 0);
      automatic int ehi_c = (l == LEVELS - 1) ? mc : mn(2 * pc + R, mc);
      while (!c_start) @(negedge clk);
      checks += 3;
      if (int'(c_lvl) != l || int'(c_th) != (40 >> l) || int'(c_tw) != (60 >> l) || c_slot != 3) begin
        failures++; $display("level %0d: lvl %0d size %0dx%0d", l, c_lvl, c_th, c_tw);
      end
      if (int'(c_row_lo) != elo_r || int'(c_row_hi) != ehi_r) begin
        failures++; $display("level %0d rows %0d..%0d exp %0d..%0d", l, c_row_lo, c_row_hi, elo_r, ehi_r);
      end
      if (int'(c_col_lo) != elo_c || int'(c_col_hi) != ehi_c) begin
        failures++; $display("level %0d cols %0d..%0d exp %0d..%0d", l, c_col_lo, c_col_hi, elo_c, ehi_c);
      end
      repeat (5) @(negedge clk);
      pr = mn(mx(ans_r[l], elo_r), ehi_r); pc = mn(mx(ans_c[l], elo_c), ehi_c);
      c_best_row = 16'(pr); c_best_col = 16'(pc); c_done = 1;
      @(negedge clk);
      c_done = 0;
    end
    while (!done) @(negedge clk);
    checks++;
    if (int'(row) != pr || int'(col) != pc) begin
      failures++; $display("result (%0d,%0d) exp (%0d,%0d)", row, col, pr, pc);
    end
  endtask

  initial begin
    @(negedge clk);
    rst = 0;
    ans_r = '{0: 201, 1: 101, 2: 50, 3: 25};
    ans_c = '{0: 139, 1: 70, 2: 34, 3: 17};
    run();
    ans_r = '{0: 471, 1: 236, 2: 118, 3: 59};
    ans_c = '{0: 0, 1: 0, 2: 0, 3: 0};
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
