// pyr_pkg: types, constants and address helpers shared by the pyramid and
// tracking hardware.
//
// Memory layout (this design's choice): the data memory holds the image
// pyramid level after level, level 0 at address 0, each level stored row by
// row with a power-of-two width. The target memory holds one fixed-size slot
// per target; inside a slot, level l of the target pyramid is stored with a
// row stride of TMAX>>l. The 5x5 mask is the separable binomial kernel
// w(m,n) = w^(m) w^(n) with w^ = [1 4 6 4 1]/16, so the 25 integer weights
// sum to 256 and a result is normalised by a shift of 8.
package pyr_pkg;

  parameter int unsigned PIX_W  = 8;   // pixel width
  parameter int unsigned COEF_W = 8;   // mask coefficient width
  parameter int unsigned MEM_AW = 20;  // address width of both memories
  parameter int unsigned NORM_SHIFT = 8;  // log2 of the sum of the mask

  typedef logic [PIX_W-1:0]           pixel_t;
  typedef logic [4:0][COEF_W-1:0]     coef_row_t;  // one row of the 5x5 mask
  typedef logic [4:0][PIX_W-1:0]      window5_t;   // five image registers
  typedef logic [MEM_AW-1:0]          addr_t;

  // Correlation measure of Section "Correlation Measures"
  typedef enum logic [1:0] {CORR_SAD = 2'd0, CORR_SSD = 2'd1, CORR_NCC = 2'd2} corr_mode_e;

  // Which master owns the data memory bus
  typedef enum logic [1:0] {OWN_HOST = 2'd0, OWN_PYRAMID = 2'd1, OWN_TRACKER = 2'd2} owner_e;

  // One memory request
  typedef struct packed {
    logic   re;
    logic   we;
    addr_t  addr;
    pixel_t wdata;
  } mem_req_t;

  // First address of image pyramid level lvl
  function automatic int unsigned level_base(int unsigned lvl, int unsigned log2_w,
                                             int unsigned log2_h);
    int unsigned b = 0;
    for (int unsigned k = 0; k < 8; k++)
      if (k < lvl) b += 1 << (log2_w - k + log2_h - k);
    return b;
  endfunction

  // First address of level lvl inside a target slot
  function automatic int unsigned tgt_level_base(int unsigned lvl, int unsigned log2_tmax);
    int unsigned b = 0;
    for (int unsigned k = 0; k < 8; k++)
      if (k < lvl) b += 1 << (2 * (log2_tmax - k));
    return b;
  endfunction

  // True when candidate a is a strictly better match than candidate b.
  // SAD/SSD: n is the sum of differences, smaller is better (d unused).
  // NCC: n = sum(img*tgt), d = sum(img^2); the target's own energy is the
  // same for every candidate, so n/sqrt(d) ranks candidates like the full
  // normalised cross correlation. Larger is better, compared without a
  // square root or a division as n_a^2 * d_b > n_b^2 * d_a. A flat black
  // patch (d = 0) has no defined correlation and loses to any other.
  function automatic logic corr_better(corr_mode_e m, logic [31:0] an, logic [31:0] ad,
                                       logic [31:0] bn, logic [31:0] bd);
    logic [95:0] lhs, rhs;
    if (m != CORR_NCC) return an < bn;
    if (ad == '0) return 1'b0;
    if (bd == '0) return 1'b1;
    lhs = 96'(64'(an) * 64'(an)) * 96'(bd);
    rhs = 96'(64'(bn) * 64'(bn)) * 96'(ad);
    return lhs > rhs;
  endfunction

endpackage
