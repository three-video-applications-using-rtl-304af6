// tb_target_updater: with a random 32x32 three-level pyramid in the data
// memory, copies a 9x7 target at (13,10) into slot 1 and checks every pixel
// of every level of the slot, that nothing outside it is written and the
// number of cycles (one per pixel, plus two).
module tb_target_updater;
  import pyr_pkg::*;
  localparam int LW = 5, LH = 5, LT = 4, LEVELS = 3;
  localparam int IDEPTH = level_base(LEVELS, LW, LH), SLOT = tgt_level_base(LEVELS, LT);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, rd_re, tgt_we;
  addr_t rd_addr, tgt_addr;
  pixel_t rd_data, tgt_wdata;
  int writes = 0, ncyc = 0;
  int tmem [3 * SLOT];

  target_updater #(.LOG2_W(LW), .LOG2_H(LH), .LOG2_TMAX(LT), .LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .slot(3'd1), .row(16'd13), .col(16'd10), .th(16'd9), .tw(16'd7),
    .busy, .done, .rd_re, .rd_addr, .rd_data, .tgt_we, .tgt_addr, .tgt_wdata);
  data_memory #(.DEPTH(IDEPTH)) u_mem (.clk, .we(1'b0), .addr(rd_addr), .wdata('0), .rdata(rd_data));

  always @(posedge clk) if (!rst && tgt_we) begin
    writes++;
    if (int'(tgt_addr) < 3 * SLOT) tmem[tgt_addr] = int'(tgt_wdata);
    else begin failures++; $display("write outside memory %0d", tgt_addr); end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int total = 0;
    for (int a = 0; a < IDEPTH; a++) u_mem.mem[a] = 8'($urandom);
    for (int a = 0; a < 3 * SLOT; a++) tmem[a] = -1;
    @(negedge clk);
    rst = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin ncyc++; @(negedge clk); end
    for (int l = 0; l < LEVELS; l++) begin
      automatic int wl = 32 >> l, st = 16 >> l;
      for (int tr = 0; tr < (9 >> l); tr++)
        for (int tc = 0; tc < (7 >> l); tc++) begin
          automatic int e = int'(u_mem.mem[level_base(l, LW, LH) + ((13 >> l) + tr) * wl + (10 >> l) + tc]);
          automatic int a = SLOT + tgt_level_base(l, LT) + tr * st + tc;
          checks++;
          total++;
          if (tmem[a] != e) begin failures++; $display("level %0d (%0d,%0d) got %0d exp %0d", l, tr, tc, tmem[a], e); end
        end
    end
    checks += 2;
    if (writes != total) begin failures++; $display("%0d writes, expected %0d", writes, total); end
    if (ncyc != total + 1) begin failures++; $display("%0d cycles, expected %0d", ncyc, total + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
