// tb_address_generator: runs the controller for an 8x8 image, one level,
// one processor, with a memory model answering reads. Every read address
// must follow the pass schedule (virtual rows 2*j0-2..2*j0+4, columns -2..9,
// clamped), every write must go to level 1 in row order, the tags must match
// the reads one clock later and irq must pulse once per pass.
module tb_address_generator;
  import pyr_pkg::*;
  localparam int LW = 3, LH = 3, W = 8, H = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, irq, mem_re, mem_we, pix_valid;
  addr_t mem_addr;
  logic signed [15:0] pix_col, pix_vrow;
  logic [15:0] j0, out_rows;
  logic [7:0] rd_bank, wb_bank;
  logic [1:0] rd_idx;
  int exp_rd [$], exp_wr [$], exp_tag [$];
  int nirq = 0, prev_rd_col = 0, prev_rd = 0;

  address_generator #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(2), .NPROC(1), .AW(2)) dut (
    .clk, .rst, .start, .busy, .done, .irq, .mem_re, .mem_we, .mem_addr, .pix_valid,
    .pix_col, .pix_vrow, .j0, .out_rows, .rd_bank, .rd_idx, .wb_bank);

  function automatic int cl(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (irq) nirq++;
    if (mem_re) begin
      checks++;
      if (exp_rd.size() == 0 || int'(mem_addr) != exp_rd[0]) begin
        failures++; $display("read addr %0d", mem_addr);
      end
      if (exp_rd.size() > 0) void'(exp_rd.pop_front());
    end
    if (mem_we) begin
      checks++;
      if (exp_wr.size() == 0 || int'(mem_addr) != exp_wr[0]) begin
        failures++; $display("write addr %0d", mem_addr);
      end
      if (exp_wr.size() > 0) void'(exp_wr.pop_front());
    end
    if (pix_valid) begin
      checks++;
      if (exp_tag.size() == 0 || int'(pix_col) != exp_tag[0]) begin
        failures++; $display("tag col %0d", pix_col);
      end
      if (exp_tag.size() > 0) void'(exp_tag.pop_front());
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j0v = 0; j0v < H / 2; j0v += 2) begin
      for (int v = 2 * j0v - 2; v <= 2 * j0v + 4; v++)
        for (int c = -2; c <= W + 1; c++) begin
          exp_rd.push_back(cl(v, H - 1) * W + cl(c, W - 1));
          exp_tag.push_back(c);
        end
      for (int r = j0v; r < j0v + 2; r++)
        for (int i = 0; i < W / 2; i++) exp_wr.push_back(W * H + r * (W / 2) + i);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 4;
    if (exp_rd.size() != 0) begin failures++; $display("%0d reads missing", exp_rd.size()); end
    if (exp_wr.size() != 0) begin failures++; $display("%0d writes missing", exp_wr.size()); end
    if (exp_tag.size() != 0) begin failures++; $display("%0d tags missing", exp_tag.size()); end
    if (nirq != 2) begin failures++; $display("irq %0d", nirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
