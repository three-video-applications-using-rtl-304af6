// tb_correlation_controller: a 3x6 window at level 1 of a 32x32 image with a
// 3x4 target in slot 2. Every issued image and target address and every tag
// must follow the scan order (rows, groups of four columns, target rows,
// k = 0..tw+2) computed here; done must come four cycles after the last read.
module tb_correlation_controller;
  import pyr_pkg::*;
  localparam int LW = 5, LH = 5, LT = 3, LEVELS = 2;
  localparam int SLOT = tgt_level_base(LEVELS, LT);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, clear, img_re, tgt_re, t_valid, t_first, t_last;
  addr_t img_addr, tgt_addr;
  logic [3:0] t_mask;
  logic [15:0] t_row, t_col;
  int last_rd = 0, ncyc = 0, done_at = 0;

  correlation_controller #(.LOG2_W(LW), .LOG2_H(LH), .LOG2_TMAX(LT), .LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .lvl(4'd1), .row_lo(16'd4), .row_hi(16'd6), .col_lo(16'd3),
    .col_hi(16'd8), .th(16'd3), .tw(16'd4), .slot(3'd2), .busy, .done, .clear,
    .img_re, .img_addr, .tgt_re, .tgt_addr, .t_valid, .t_first, .t_last, .t_mask, .t_row,
    .t_col);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    start = 1;
    #1;
    checks++;
    if (!clear) begin failures++; $display("no clear at start"); end
    @(negedge clk);
    start = 0;
    for (int r = 4; r <= 6; r++)
      for (int c0 = 3; c0 <= 8; c0 += 4)
        for (int tr = 0; tr < 3; tr++)
          for (int k = 0; k < 7; k++) begin
            automatic int ia = level_base(1, LW, LH) + (r + tr) * 16 + c0 + k;
            automatic int ta = 2 * SLOT + tgt_level_base(1, LT) + tr * 4 + (k >= 3 ? k - 3 : 0);
            automatic int m = 0;
            for (int q = 0; q < 4; q++) if (c0 + q <= 8) m |= 1 << q;
            checks += 3;
            if (!img_re || !tgt_re || int'(img_addr) != ia || int'(tgt_addr) != ta) begin
              failures++; $display("r%0d c%0d tr%0d k%0d addr %0d/%0d", r, c0, tr, k, img_addr, tgt_addr);
            end
            if (t_valid != (k >= 3) || t_first != (tr == 0 && k == 3) || t_last != (tr == 2 && k == 6)) begin
              failures++; $display("flags r%0d c%0d tr%0d k%0d", r, c0, tr, k);
            end
            if (int'(t_mask) != m || int'(t_row) != r || int'(t_col) != c0) begin
              failures++; $display("tag r%0d c%0d", r, c0);
            end
            @(negedge clk);
          end
    while (!done && ncyc < 20) begin ncyc++; @(negedge clk); end
    checks += 2;
    if (ncyc != 4) begin failures++; $display("done after %0d cycles", ncyc); end
    if (img_re) begin failures++; $display("reads after the scan"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
