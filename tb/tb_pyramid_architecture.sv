// tb_pyramid_architecture: builds the pyramid of a random 32x16 image with one
// and with three pyramidal convolution processors and compares every pixel of
// levels 1 and 2 with a reference REDUCE computed here (5x5 binomial mask,
// edge replication, rounding). Also checks the cycle count of each run against
// the schedule (4P+3 input rows of W+4 reads per pass, 2 drain cycles, one
// write per output pixel, pass overheads) and that the write-back interrupt
// fires once per pass.
module tb_pyramid_architecture;
  import pyr_pkg::*;
  localparam int LW = 5, LH = 4, LEVELS = 3;
  localparam int W = 1 << LW, H = 1 << LH;
  localparam int DEPTH = level_base(LEVELS, LW, LH);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int img [DEPTH];   // reference pyramid

  // two systems side by side: NPROC = 1 and NPROC = 3
  logic       start [2];
  logic       busy [2], done [2], irq [2];
  mem_req_t   req [2], mreq [2];
  pixel_t     rdata [2];
  logic [31:0] cycles [2];
  logic       ld_we;
  addr_t      ld_addr;
  pixel_t     ld_data;
  int         irqs [2];

  pyramid_architecture #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEVELS), .NPROC(1)) dut1 (
    .clk, .rst, .start(start[0]), .busy(busy[0]), .done(done[0]), .irq(irq[0]),
    .mem(req[0]), .mem_rdata(rdata[0]), .cycles(cycles[0]));
  pyramid_architecture #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEVELS), .NPROC(3)) dut3 (
    .clk, .rst, .start(start[1]), .busy(busy[1]), .done(done[1]), .irq(irq[1]),
    .mem(req[1]), .mem_rdata(rdata[1]), .cycles(cycles[1]));

  for (genvar s = 0; s < 2; s++) begin : g_mem
    always_comb begin
      mreq[s] = req[s];
      if (ld_we) mreq[s] = '{re: 1'b0, we: 1'b1, addr: ld_addr, wdata: ld_data};
    end
    data_memory #(.DEPTH(DEPTH)) u_mem (
      .clk, .we(mreq[s].we), .addr(mreq[s].addr), .wdata(mreq[s].wdata), .rdata(rdata[s]));
    always_ff @(posedge clk) if (irq[s]) irqs[s] <= irqs[s] + 1;
  end

  function automatic int wh(int k);
    case (k) 0, 4: return 1; 1, 3: return 4; default: return 6; endcase
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int expected_cycles(int p);
    int total = 2, nb = 2 * p;
    for (int l = 1; l < LEVELS; l++) begin
      automatic int wi = W >> (l - 1), wo = W >> l, ho = H >> l;
      for (int j0 = 0; j0 < ho; j0 += nb) begin
        automatic int rows = (ho - j0 < nb) ? ho - j0 : nb;
        total += (4 * p + 3) * (wi + 4) + 2 + rows * wo + ((rows < nb) ? 1 : 0) + 1;
      end
    end
    return total;
  endfunction

  function automatic int passes(int p);
    int n = 0;
    for (int l = 1; l < LEVELS; l++) n += ((H >> l) + 2 * p - 1) / (2 * p);
    return n;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start[0] = 0; start[1] = 0; ld_we = 0; ld_addr = '0; ld_data = '0;
    irqs[0] = 0; irqs[1] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // level 0: random image, loaded into both memories
    for (int a = 0; a < W * H; a++) begin
      img[a] = $urandom_range(0, 255);
      ld_we <= 1; ld_addr <= addr_t'(a); ld_data <= pixel_t'(img[a]);
      @(posedge clk);
    end
    ld_we <= 0;
    // reference pyramid
    for (int l = 1; l < LEVELS; l++) begin
      automatic int wi = W >> (l - 1), hi = H >> (l - 1), bi = level_base(l - 1, LW, LH);
      automatic int wo = W >> l, ho = H >> l, bo = level_base(l, LW, LH);
      for (int j = 0; j < ho; j++)
        for (int i = 0; i < wo; i++) begin
          automatic int s = 0;
          for (int m = -2; m <= 2; m++)
            for (int n = -2; n <= 2; n++)
              s += wh(m + 2) * wh(n + 2) *
                   img[bi + clampi(2 * j + m, 0, hi - 1) * wi + clampi(2 * i + n, 0, wi - 1)];
          img[bo + j * wo + i] = (s + 128) >> 8;
        end
    end
    for (int s = 0; s < 2; s++) begin
      @(posedge clk);
      start[s] <= 1;
      @(posedge clk);
      start[s] <= 0;
      while (!done[s]) @(posedge clk);
      @(posedge clk);
    end
    // compare both memories with the reference
    for (int a = W * H; a < DEPTH; a++) begin
      checks += 2;
      if (int'(g_mem[0].u_mem.mem[a]) != img[a]) begin
        failures++;
        if (failures < 10) $display("NPROC=1 addr %0d got %0d exp %0d", a, g_mem[0].u_mem.mem[a], img[a]);
      end
      if (int'(g_mem[1].u_mem.mem[a]) != img[a]) begin
        failures++;
        if (failures < 10) $display("NPROC=3 addr %0d got %0d exp %0d", a, g_mem[1].u_mem.mem[a], img[a]);
      end
    end
    for (int s = 0; s < 2; s++) begin
      automatic int p = (s == 0) ? 1 : 3;
      checks++;
      if (int'(cycles[s]) != expected_cycles(p)) begin
        failures++;
        $display("NPROC=%0d cycles %0d expected %0d", p, cycles[s], expected_cycles(p));
      end
      checks++;
      if (irqs[s] != passes(p)) begin
        failures++;
        $display("NPROC=%0d interrupts %0d expected %0d", p, irqs[s], passes(p));
      end
      $display("NPROC=%0d: %0d cycles, %0d write-back interrupts", p, cycles[s], irqs[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
