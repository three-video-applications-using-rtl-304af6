// tb_tracking_workload: the tracking performance measurement at full size
// (512x512 frames, four levels, one pyramidal convolution processor).
// For each target size of the reported measurements, 40x40, 60x120 (60 wide,
// 120 tall) and 80x80, a first frame stores five textured objects as
// targets; then five frames track 1, 2, 3, 4 and 5 targets while those
// objects move. Every position and the global movement vector are checked.
// For each frame the total cycles and the cycles spent after the pyramid
// (correlation, target update, vote) are printed, to compare with the
// latency and throughput figures reported for the original implementation.
module tb_tracking_workload;
  import pyr_pkg::*;
  localparam int LW = 9, LH = 9, W = 512, H = 512, NT = 5;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               host_re = 0, host_we = 0, start = 0, first_frame = 0;
  addr_t              host_addr = '0;
  pixel_t             host_wdata = '0, host_rdata;
  corr_mode_e         mode = CORR_SAD;
  logic [2:0]         num_targets = 3'd5;
  logic [15:0]        tgt_h = '0, tgt_w = '0;
  logic [15:0]        init_row [NT], init_col [NT], pos_row [NT], pos_col [NT];
  logic               busy, done, pyr_irq, bus_error, corr_done, update_done;
  logic signed [15:0] vec_dy, vec_dx;
  logic [2:0]         votes;
  logic [31:0]        pyr_cycles;
  owner_e             bus_owner;
  logic [3:0]         corr_lvl;

  pyramid_tracking_system dut (
    .clk, .rst, .host_re, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .first_frame, .mode, .num_targets, .tgt_h, .tgt_w, .init_row, .init_col,
    .busy, .done, .pos_row, .pos_col, .vec_dy, .vec_dx, .votes, .pyr_cycles, .pyr_irq,
    .bus_error, .bus_owner, .corr_done, .corr_lvl, .update_done);

  int th, tw;
  int orow [NT], ocol [NT];
  byte unsigned tex [NT][128 * 128];

  function automatic int scene(int r, int c);
    for (int n = 0; n < NT; n++)
      if (r >= orow[n] && r < orow[n] + th && c >= ocol[n] && c < ocol[n] + tw)
        return int'(tex[n][(r - orow[n]) * 128 + (c - ocol[n])]);
    return 10;
  endfunction

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_frame();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        host_we <= 1; host_addr <= addr_t'(r * W + c); host_wdata <= pixel_t'(scene(r, c));
        @(posedge clk);
      end
    host_we <= 0;
  endtask

  task automatic run_frame(input bit first, input int n, output int total, output int track);
    int t0;
    @(posedge clk);
    first_frame <= first; num_targets <= 3'(n); start <= 1;
    t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    total = cyc - t0;
    track = total - int'(pyr_cycles);
  endtask

  initial begin
    automatic int sizes_h [3] = '{40, 120, 80};
    automatic int sizes_w [3] = '{40, 60, 80};
    automatic int r0 [NT] = '{40, 40, 40, 290, 290};
    automatic int c0 [NT] = '{30, 200, 370, 100, 300};
    for (int n = 0; n < NT; n++)
      for (int k = 0; k < 128 * 128; k++) tex[n][k] = 8'(40 + 40 * n + $urandom_range(0, 25));
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 3; s++) begin
      automatic int total, track;
      th = sizes_h[s]; tw = sizes_w[s];
      tgt_h = 16'(th); tgt_w = 16'(tw);
      for (int n = 0; n < NT; n++) begin
        orow[n] = r0[n]; ocol[n] = c0[n];
        init_row[n] = 16'(orow[n]); init_col[n] = 16'(ocol[n]);
      end
      load_frame();
      run_frame(1, NT, total, track);
      $display("target %0dx%0d (w x h): first frame %0d cycles", tw, th, total);
      for (int n = 1; n <= NT; n++) begin
        automatic int dy = (n % 2) ? 3 : -3, dx = (n % 2) ? -2 : 2;
        for (int k = 0; k < n; k++) begin orow[k] += dy; ocol[k] += dx; end
        load_frame();
        run_frame(0, n, total, track);
        for (int k = 0; k < n; k++) begin
          checks++;
          if (int'(pos_row[k]) != orow[k] || int'(pos_col[k]) != ocol[k]) begin
            failures++;
            $display("size %0dx%0d, %0d targets: target %0d at (%0d,%0d) expected (%0d,%0d)",
                     tw, th, n, k, pos_row[k], pos_col[k], orow[k], ocol[k]);
          end
        end
        checks++;
        if (int'(vec_dy) != dy || int'(vec_dx) != dx || int'(votes) != n) begin
          failures++;
          $display("vector (%0d,%0d) votes %0d", vec_dy, vec_dx, votes);
        end
        $display("target %0dx%0d, %0d targets: frame %0d cycles (%0.2f ms at 25 MHz), %0d after the pyramid",
                 tw, th, n, total, real'(total) / 25000.0, track);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
