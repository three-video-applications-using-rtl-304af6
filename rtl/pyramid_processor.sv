// pyramid_processor: one processor of pyramidal convolution.
//
// Two convolution modules, each with its own control generator and register
// bank, share one set of five image registers and one coefficient memory.
// Module 0 builds output row orow0 and module 1 row orow0+1, so the seven
// input rows 2*orow0-2 .. 2*orow0+4 are read once for both rows.
//
// Timing: pix/pix_col/pix_vrow arrive with pix_valid in the cycle the memory
// returns the pixel. It is shifted into the image registers at the next edge;
// in the following cycle the window holds virtual columns col-4..col. When col
// is even and at least 2, the window is centred on input column col-2, which
// is output column (col-2)/2, and each module whose control generator marks
// the row active accumulates into that column. Write-back: rd_sel picks the
// module, rd_idx the column; rd_data, (acc+128)>>8, follows one clock later.
module pyramid_processor
  import pyr_pkg::*;
#(
  parameter int unsigned N  = 256,          // register bank columns
  parameter int unsigned AW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               pix_valid,
  input  pixel_t             pix,
  input  logic signed [15:0] pix_col,
  input  logic signed [15:0] pix_vrow,
  input  logic [15:0]        orow0,        // output row of module 0
  input  logic [1:0]         mod_en,       // module m holds a real output row
  input  logic               rd_sel,
  input  logic [AW-1:0]      rd_idx,
  output pixel_t             rd_data,
  output logic [1:0]         row_done      // module finished its last mask row
);
  window5_t           win;
  logic               v_d;
  logic signed [15:0] col_d, vrow_d;
  logic               emit;
  logic [AW-1:0]      oidx;
  logic [2:0]         rom_row [2];
  coef_row_t          rom_coef [2];
  logic [15:0]        rd_acc [2];
  logic               rd_sel_d;

  image_registers #(.DEPTH(5), .DW(PIX_W)) u_imgreg (
    .clk, .rst, .shift(pix_valid), .din(pix), .win(win));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_d    <= 1'b0;
      col_d  <= '0;
      vrow_d <= '0;
    end else begin
      v_d    <= pix_valid;
      col_d  <= pix_col;
      vrow_d <= pix_vrow;
    end
    rd_sel_d <= rd_sel;
  end

  always_comb begin
    emit = v_d && !col_d[0] && (col_d >= 16'sd2);
    oidx = AW'((col_d - 16'sd2) >>> 1);
  end

  coeff_rom u_rom (
    .row0(rom_row[0]), .row1(rom_row[1]), .coef0(rom_coef[0]), .coef1(rom_coef[1]));

  for (genvar m = 0; m < 2; m++) begin : g_mod
    logic        active, first, last;
    coef_row_t   coef;
    logic [15:0] prod;

    control_generator u_cg (
      .vrow(vrow_d), .orow(orow0 + 16'(m)), .rom_row(rom_row[m]), .rom_coef(rom_coef[m]),
      .active, .first, .last, .coef);

    convolution_module u_conv (.win, .coef, .prod);

    register_bank #(.N(N), .AW(AW)) u_bank (
      .clk, .acc_en(emit && active && mod_en[m]), .first, .idx(oidx), .val(prod),
      .rd_idx, .rd_data(rd_acc[m]));

    assign row_done[m] = emit && last && mod_en[m];
  end

  logic [16:0] rounded;
  always_comb begin
    rounded = 17'(rd_sel_d ? rd_acc[1] : rd_acc[0]) + 17'd128;
    rd_data = rounded[NORM_SHIFT +: PIX_W];
  end
endmodule
