// tb_pyramid_workload: the pyramid performance measurement at full size.
// A random 512x512 image is reduced to levels 1..3 by four pyramid
// architectures with 1, 2, 3 and 4 pyramidal convolution processors. Every
// output pixel of each is compared with a reference REDUCE, and each cycle
// count with the schedule of the address generator. The counts are printed
// next to the figures reported for the original implementation
// (696,613 / 464,444 / 386,923 / 348,568 cycles) and converted to frame time
// and frames per second at 25 MHz.
module tb_pyramid_workload;
  import pyr_pkg::*;
  localparam int LW = 9, LH = 9, LEVELS = 4;
  localparam int W = 1 << LW, H = 1 << LH;
  localparam int DEPTH = level_base(LEVELS, LW, LH);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int img [DEPTH];
  int reported [4] = '{696613, 464444, 386923, 348568};

  logic        start = 0;
  logic        done [4];
  logic [31:0] cycles [4];
  logic        ld_we = 0;
  addr_t       ld_addr = '0;
  pixel_t      ld_data = '0;

  for (genvar s = 0; s < 4; s++) begin : g_sys
    mem_req_t req, mreq;
    pixel_t   rdata;
    logic     busy, irq;
    pyramid_architecture #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEVELS), .NPROC(s + 1)) u_pyr (
      .clk, .rst, .start, .busy, .done(done[s]), .irq, .mem(req), .mem_rdata(rdata),
      .cycles(cycles[s]));
    always_comb begin
      mreq = req;
      if (ld_we) mreq = '{re: 1'b0, we: 1'b1, addr: ld_addr, wdata: ld_data};
    end
    data_memory #(.DEPTH(DEPTH)) u_mem (
      .clk, .we(mreq.we), .addr(mreq.addr), .wdata(mreq.wdata), .rdata(rdata));
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

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int a = 0; a < W * H; a++) begin
      img[a] = $urandom_range(0, 255);
      ld_we <= 1; ld_addr <= addr_t'(a); ld_data <= pixel_t'(img[a]);
      @(posedge clk);
    end
    ld_we <= 0;
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
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!(done[0])) @(posedge clk);   // one processor is the slowest
    @(posedge clk);
    for (int a = W * H; a < DEPTH; a++) begin
      checks += 4;
      if (int'(g_sys[0].u_mem.mem[a]) != img[a]) failures++;
      if (int'(g_sys[1].u_mem.mem[a]) != img[a]) failures++;
      if (int'(g_sys[2].u_mem.mem[a]) != img[a]) failures++;
      if (int'(g_sys[3].u_mem.mem[a]) != img[a]) failures++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(cycles[s]) != expected_cycles(s + 1)) begin
        failures++;
        $display("NPROC=%0d cycles %0d expected %0d", s + 1, cycles[s], expected_cycles(s + 1));
      end
      $display("NPROC=%0d: %0d cycles (reported %0d), %0.2f ms, %0.2f frames/s at 25 MHz",
               s + 1, cycles[s], reported[s], real'(cycles[s]) / 25000.0,
               25.0e6 / real'(cycles[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
