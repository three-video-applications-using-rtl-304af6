// tb_pyramid_tracking_system: end-to-end tracking of four textured objects
// over four frames on a flat background.
//
// Frame 1 (first frame) only builds the pyramid and stores the targets at
// their given positions. In frames 2 to 4 three objects move together and a
// fourth moves its own way; the system must find every object exactly,
// report the common movement as the global vector and out-vote the fourth.
// Frame 3 uses SSD and frame 4 normalised cross correlation. NCC without
// mean removal tells nearly flat, blurred coarse patches apart only by a
// small margin, so frame 4 moves the objects by whole pixels of the
// coarsest level, where the coarse target is an exact copy. Level-1 and level-2 pyramid pixels are
// read back through the host port and compared with a reference REDUCE. The
// test counts each mechanism it must see: pyramid write-back interrupts, the
// first-frame path, correlation runs at every level, target updates, a
// rejected outlier, both correlation measures and each bus owner.
module tb_pyramid_tracking_system;
  import pyr_pkg::*;
  localparam int LW = 7, LH = 7, LEVELS = 3, LT = 5, TS = 16;
  localparam int W = 1 << LW, H = 1 << LH, NT = 4, MAXT = 5;
  localparam int WATCHDOG = 2_000_000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               host_re = 0, host_we = 0, start = 0, first_frame = 0;
  addr_t              host_addr = '0;
  pixel_t             host_wdata = '0, host_rdata;
  corr_mode_e         mode = CORR_SAD;
  logic [2:0]         num_targets = 3'(NT);
  logic [15:0]        tgt_h = 16'(TS), tgt_w = 16'(TS);
  logic [15:0]        init_row [MAXT], init_col [MAXT], pos_row [MAXT], pos_col [MAXT];
  logic               busy, done, pyr_irq, bus_error;
  logic signed [15:0] vec_dy, vec_dx;
  logic [2:0]         votes;
  logic [31:0]        pyr_cycles;
  owner_e             bus_owner;
  logic               corr_done, update_done;
  logic [3:0]         corr_lvl;

  pyramid_tracking_system #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEVELS), .LOG2_TMAX(LT)) dut (
    .clk, .rst, .host_re, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .first_frame, .mode, .num_targets, .tgt_h, .tgt_w, .init_row, .init_col,
    .busy, .done, .pos_row, .pos_col, .vec_dy, .vec_dx, .votes, .pyr_cycles, .pyr_irq,
    .bus_error, .bus_owner, .corr_done, .corr_lvl, .update_done);

  // ---------------- scene model ----------------
  int tex [NT][TS * TS];
  int orow [NT], ocol [NT];
  int frame [H * W];
  int lvl1 [(H / 2) * (W / 2)];

  function automatic int scene(int r, int c);
    for (int n = 0; n < NT; n++)
      if (r >= orow[n] && r < orow[n] + TS && c >= ocol[n] && c < ocol[n] + TS)
        return tex[n][(r - orow[n]) * TS + (c - ocol[n])];
    return 20;
  endfunction

  function automatic int wh(int k);
    case (k) 0, 4: return 1; 1, 3: return 4; default: return 6; endcase
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_irq = 0, n_corr = 0, n_corr_lvl0 = 0, n_corr_top = 0, n_upd = 0, n_first = 0;
  int n_outlier = 0, n_sad = 0, n_ssd = 0, n_ncc = 0, n_own_host = 0, n_own_pyr = 0, n_own_trk = 0;
  always @(posedge clk) if (!rst) begin
    if (pyr_irq) n_irq++;
    if (corr_done) begin
      n_corr++;
      if (corr_lvl == 0) n_corr_lvl0++;
      if (corr_lvl == 4'(LEVELS - 1)) n_corr_top++;
    end
    if (update_done) n_upd++;
    case (bus_owner)
      OWN_HOST: n_own_host++;
      OWN_PYRAMID: n_own_pyr++;
      default: n_own_trk++;
    endcase
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_frame();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) frame[r * W + c] = scene(r, c);
    for (int a = 0; a < H * W; a++) begin
      host_we <= 1; host_addr <= addr_t'(a); host_wdata <= pixel_t'(frame[a]);
      @(posedge clk);
    end
    host_we <= 0;
  endtask

  task automatic check_pyramid();
    // level 1 reference, then sampled pixels of levels 1 and 2 via the host port
    for (int j = 0; j < H / 2; j++)
      for (int i = 0; i < W / 2; i++) begin
        automatic int s = 0;
        for (int m = -2; m <= 2; m++)
          for (int n = -2; n <= 2; n++)
            s += wh(m + 2) * wh(n + 2) * frame[clampi(2 * j + m, 0, H - 1) * W
                                               + clampi(2 * i + n, 0, W - 1)];
        lvl1[j * (W / 2) + i] = (s + 128) >> 8;
      end
    for (int k = 0; k < 40; k++) begin
      automatic int l = 1 + (k % 2);
      automatic int wl = W >> l, hl = H >> l;
      automatic int j = $urandom_range(0, hl - 1), i = $urandom_range(0, wl - 1);
      automatic int e = 0;
      if (l == 1) e = lvl1[j * wl + i];
      else begin
        automatic int s = 0;
        for (int m = -2; m <= 2; m++)
          for (int n = -2; n <= 2; n++)
            s += wh(m + 2) * wh(n + 2) * lvl1[clampi(2 * j + m, 0, (H / 2) - 1) * (W / 2)
                                              + clampi(2 * i + n, 0, (W / 2) - 1)];
        e = (s + 128) >> 8;
      end
      host_re <= 1;
      host_addr <= addr_t'(level_base(l, LW, LH) + j * wl + i);
      @(posedge clk);
      host_re <= 0;
      @(posedge clk);
      checks++;
      if (int'(host_rdata) != e) begin
        failures++;
        $display("pyramid level %0d (%0d,%0d): got %0d expected %0d", l, j, i, host_rdata, e);
      end
    end
  endtask

  task automatic run_frame(input bit first, input corr_mode_e md);
    int t0;
    @(posedge clk);
    first_frame <= first; mode <= md; start <= 1;
    t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    $display("frame done in %0d cycles (pyramid %0d)", cyc - t0, pyr_cycles);
    if (first) n_first++;
    if (md == CORR_SAD) n_sad++;
    else if (md == CORR_SSD) n_ssd++;
    else n_ncc++;
  endtask

  task automatic check_positions(input int gdy, input int gdx, input bit expect_votes);
    for (int n = 0; n < NT; n++) begin
      checks += 2;
      if (int'(pos_row[n]) != orow[n] || int'(pos_col[n]) != ocol[n]) begin
        failures++;
        $display("target %0d at (%0d,%0d) expected (%0d,%0d)", n, pos_row[n], pos_col[n],
                 orow[n], ocol[n]);
      end
    end
    checks += 2;
    if (int'(vec_dy) != gdy || int'(vec_dx) != gdx) begin
      failures++;
      $display("global vector (%0d,%0d) expected (%0d,%0d)", vec_dy, vec_dx, gdy, gdx);
    end
    if (expect_votes) begin
      checks++;
      if (votes != 3'(NT - 1)) begin
        failures++;
        $display("votes %0d expected %0d", votes, NT - 1);
      end else if (int'(votes) < NT) n_outlier++;
    end
  endtask

  task automatic move(input int dy, input int dx, input int ody, input int odx);
    for (int n = 0; n < NT - 1; n++) begin orow[n] += dy; ocol[n] += dx; end
    orow[NT - 1] += ody; ocol[NT - 1] += odx;
  endtask

  task automatic mech(input string name, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never happened: %s", name);
    end else $display("mechanism %-28s %0d", name, count);
  endtask

  initial begin
    // objects: distinct brightness and random texture
    for (int n = 0; n < NT; n++)
      for (int k = 0; k < TS * TS; k++) tex[n][k] = 60 + 50 * n + $urandom_range(0, 30);
    orow[0] = H / 10;     ocol[0] = W / 10;
    orow[1] = H / 10;     ocol[1] = W / 2;
    orow[2] = H / 2;      ocol[2] = W / 6;
    orow[3] = H / 2 + 8;  ocol[3] = W / 2 + 10;
    for (int n = 0; n < MAXT; n++) begin
      init_row[n] = (n < NT) ? 16'(orow[n]) : '0;
      init_col[n] = (n < NT) ? 16'(ocol[n]) : '0;
    end
    repeat (3) @(posedge clk);
    rst = 0;

    load_frame();
    run_frame(1, CORR_SAD);
    check_pyramid();
    check_positions(0, 0, 0);

    move(3, -2, -4, 5);
    load_frame();
    run_frame(0, CORR_SAD);
    check_positions(3, -2, 1);

    move(-2, 4, 5, 5);
    load_frame();
    run_frame(0, CORR_SSD);
    check_pyramid();
    check_positions(-2, 4, 1);

    // NCC frame: moves by whole coarsest-level pixels (see header)
    move(1 << (LEVELS - 1), -(1 << (LEVELS - 1)), -(1 << (LEVELS - 1)), 1 << (LEVELS - 1));
    load_frame();
    run_frame(0, CORR_NCC);
    check_positions(1 << (LEVELS - 1), -(1 << (LEVELS - 1)), 1);

    checks++;
    if (bus_error) begin failures++; $display("bus conflict seen"); end

    mech("pyramid write-back interrupt", n_irq);
    mech("first-frame initialisation", n_first);
    mech("coarsest-level full search", n_corr_top);
    mech("level-0 refinement", n_corr_lvl0);
    mech("target update", n_upd);
    mech("outlier out-voted", n_outlier);
    mech("SAD frame", n_sad);
    mech("SSD frame", n_ssd);
    mech("NCC frame", n_ncc);
    mech("host owns memory bus", n_own_host);
    mech("pyramid owns memory bus", n_own_pyr);
    mech("tracker owns memory bus", n_own_trk);
    checks += 2;
    if (n_upd != 4 * NT) begin
      failures++;
      $display("target updates %0d expected %0d", n_upd, 4 * NT);
    end
    if (n_corr != 3 * NT * LEVELS) begin
      failures++;
      $display("correlation runs %0d expected %0d", n_corr, 3 * NT * LEVELS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
