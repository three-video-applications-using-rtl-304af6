// tb_pyramid_processor: streams the seven virtual rows 0..6 of a random 8x8
// image (columns -2..9, edges replicated) into one processor serving output
// rows 1 and 2, then reads both register banks and compares all eight
// results with a REDUCE computed here; row_done must pulse once per row.
module tb_pyramid_processor;
  import pyr_pkg::*;
  localparam int W = 8, H = 8, N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ndone = 0;

  logic pix_valid = 0;
  pixel_t pix = '0, rd_data;
  logic signed [15:0] pix_col = '0, pix_vrow = '0;
  logic rd_sel = 0;
  logic [1:0] rd_idx = '0, row_done;
  int img [H][W];

  pyramid_processor #(.N(N)) dut (
    .clk, .rst, .pix_valid, .pix, .pix_col, .pix_vrow, .orow0(16'd1), .mod_en(2'b11),
    .rd_sel, .rd_idx, .rd_data, .row_done);

  function automatic int wh(int k);
    case (k) 0, 4: return 1; 1, 3: return 4; default: return 6; endcase
  endfunction
  function automatic int cl(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  always @(posedge clk) if (!rst) ndone += int'(row_done[0]) + int'(row_done[1]);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = $urandom_range(0, 255);
    @(negedge clk);
    rst = 0;
    for (int v = 0; v <= 6; v++)
      for (int c = -2; c <= W + 1; c++) begin
        pix_valid = 1; pix = pixel_t'(img[cl(v, H - 1)][cl(c, W - 1)]);
        pix_col = 16'(c); pix_vrow = 16'(v);
        @(negedge clk);
      end
    pix_valid = 0;
    repeat (3) @(negedge clk);
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < N; i++) begin
        automatic int s = 0, j = 1 + m;
        for (int a = -2; a <= 2; a++)
          for (int b = -2; b <= 2; b++)
            s += wh(a + 2) * wh(b + 2) * img[cl(2 * j + a, H - 1)][cl(2 * i + b, W - 1)];
        rd_sel = m[0]; rd_idx = 2'(i);
        @(negedge clk);
        checks++;
        if (int'(rd_data) != (s + 128) >> 8) begin
          failures++; $display("row %0d col %0d got %0d exp %0d", j, i, rd_data, (s + 128) >> 8);
        end
      end
    checks++;
    if (ndone != 2 * N) begin failures++; $display("row_done pulses %0d", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
