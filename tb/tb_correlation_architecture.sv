// tb_correlation_architecture: exhaustive search windows on random images.
// The target memory holds a noisy copy of an image patch; for SAD, SSD and NCC and
// for windows whose width is and is not a multiple of four, at level 0 and
// level 1, the best position and value are compared with a brute-force search
// done here (first minimum of SAD/SSD, or first maximum of the normalised
// correlation sum(i*t)/sqrt(sum(i*i)) worked out in floating point, in
// row-major order), and the cycle count with
// groups*th*(tw+3)+6 (start to done).
module tb_correlation_architecture;
  import pyr_pkg::*;
  localparam int LW = 5, LH = 5, LT = 3, LEVELS = 2;
  localparam int W = 1 << LW, H = 1 << LH, TM = 1 << LT;
  localparam int IDEPTH = level_base(LEVELS, LW, LH);
  localparam int SLOT = tgt_level_base(LEVELS, LT);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  corr_mode_e  mode = CORR_SAD;
  logic [3:0]  lvl = '0;
  logic [15:0] row_lo = '0, row_hi = '0, col_lo = '0, col_hi = '0, th = '0, tw = '0;
  logic [2:0]  slot = 3'd1;
  logic        busy, done, img_re, tgt_re, found;
  addr_t       img_addr, tgt_addr;
  pixel_t      img_rdata, tgt_rdata;
  logic [31:0] best_val, best_den;
  logic [15:0] best_row, best_col;

  correlation_architecture #(.LOG2_W(LW), .LOG2_H(LH), .LOG2_TMAX(LT), .LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .mode, .lvl, .row_lo, .row_hi, .col_lo, .col_hi, .th, .tw, .slot,
    .busy, .done, .img_re, .img_addr, .img_rdata, .tgt_re, .tgt_addr, .tgt_rdata,
    .best_val, .best_den, .best_row, .best_col, .found);

  data_memory #(.DEPTH(IDEPTH)) u_img (.clk, .we(1'b0), .addr(img_addr), .wdata('0),
                                       .rdata(img_rdata));
  data_memory #(.DEPTH(4 * SLOT)) u_tgt (.clk, .we(1'b0), .addr(tgt_addr), .wdata('0),
                                         .rdata(tgt_rdata));

  int im [IDEPTH];
  int tg [4 * SLOT];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l, input int md, input int r0, input int c0, input int h,
                     input int w, input int rlo, input int rhi, input int clo, input int chi);
    int wl = W >> l, hl = H >> l, lt = TM >> l;
    int ib = level_base(l, LW, LH), tb0 = 1 * SLOT + tgt_level_base(l, LT);
    int bv = -1, bd = 0, br = 0, bc = 0, groups, ncyc;
    real bs = -1.0;
    // target: patch at (r0,c0) with small noise
    for (int tr = 0; tr < h; tr++)
      for (int tc = 0; tc < w; tc++) begin
        automatic int v = im[ib + (r0 + tr) * wl + c0 + tc] + $urandom_range(0, 2) - 1;
        v = v < 0 ? 0 : (v > 255 ? 255 : v);
        tg[tb0 + tr * lt + tc] = v;
        u_tgt.mem[tb0 + tr * lt + tc] = pixel_t'(v);
      end
    for (int r = rlo; r <= rhi; r++)
      for (int c = clo; c <= chi; c++) begin
        automatic int s = 0, e = 0;
        for (int tr = 0; tr < h; tr++)
          for (int tc = 0; tc < w; tc++) begin
            automatic int iv = im[ib + (r + tr) * wl + c + tc];
            automatic int d = iv - tg[tb0 + tr * lt + tc];
            if (md == 2) begin
              s += iv * tg[tb0 + tr * lt + tc];
              e += iv * iv;
            end else s += (md == 1) ? d * d : (d < 0 ? -d : d);
          end
        if (md == 2) begin
          if (e > 0 && real'(s) / $sqrt(real'(e)) > bs) begin
            bs = real'(s) / $sqrt(real'(e)); bv = s; bd = e; br = r; bc = c;
          end
        end else if (bv < 0 || s < bv) begin bv = s; br = r; bc = c; end
      end
    groups = (rhi - rlo + 1) * ((chi - clo + 4) / 4);
    @(posedge clk);
    mode <= corr_mode_e'(md); lvl <= 4'(l); th <= 16'(h); tw <= 16'(w);
    row_lo <= 16'(rlo); row_hi <= 16'(rhi); col_lo <= 16'(clo); col_hi <= 16'(chi);
    start <= 1;
    @(posedge clk);
    start <= 0;
    ncyc = 1;
    while (!done) begin @(posedge clk); ncyc++; end
    checks += 4;
    checks += 1;
    if (int'(best_den) != bd) begin
      failures++;
      $display("energy sum %0d expected %0d", best_den, bd);
    end
    if (int'(best_val) != bv || int'(best_row) != br || int'(best_col) != bc || !found) begin
      failures++;
      $display("l=%0d mode=%0d got (%0d,%0d)=%0d exp (%0d,%0d)=%0d", l, md, best_row, best_col,
               best_val, br, bc, bv);
    end
    if (br != r0 || bc != c0) $display("note: reference best differs from the patch origin");
    if (ncyc != groups * h * (w + 3) + 6) begin
      failures++;
      $display("cycles %0d expected %0d", ncyc, groups * h * (w + 3) + 6);
    end
    $display("l=%0d mode=%0d best (%0d,%0d) value %0d in %0d cycles", l, md, best_row,
             best_col, best_val, ncyc);
  endtask

  initial begin
    for (int a = 0; a < IDEPTH; a++) begin
      im[a] = $urandom_range(0, 255);
      u_img.mem[a] = pixel_t'(im[a]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 0, 9, 13, 6, 5, 0, H - 6, 0, W - 5);     // whole image, SAD
    run(0, 1, 20, 3, 7, 8, 15, 24, 1, 10);          // window, SSD, 10 columns
    run(0, 0, 4, 22, 8, 8, 2, 6, 19, 24);           // 6 columns
    run(1, 0, 5, 6, 4, 3, 0, (H >> 1) - 4, 0, (W >> 1) - 3);  // level 1
    run(1, 1, 10, 1, 3, 4, 8, 12, 0, 4);
    run(0, 2, 9, 13, 6, 5, 0, H - 6, 0, W - 5);     // whole image, NCC
    run(0, 2, 4, 22, 8, 8, 2, 6, 19, 24);
    run(1, 2, 5, 6, 4, 3, 0, (H >> 1) - 4, 0, (W >> 1) - 3);
    // a black region: candidates with no image energy must never be chosen
    for (int a = 0; a < 6 * W; a++) begin im[a] = 0; u_img.mem[a] = '0; end
    run(0, 2, 8, 4, 4, 4, 0, 10, 0, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
