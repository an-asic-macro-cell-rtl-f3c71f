// norm_round -- common normalization and rounding of the complex product.
//
// The real and imaginary sums leave the final adders as PW-bit two's-
// complement integers, on the scale where 2^(PW-2) stands for 1.0 times
// 2^e_i. Because both parts share one exponent they are shifted together:
//   1. take magnitudes; the leading one of (|re| | |im|) is the leading one
//      of the larger part, and its leading-zero count lz sets the shift;
//   2. shift both magnitudes left by lz, so the larger has its top bit set;
//   3. keep the top FW bits and round to nearest (ties away from zero) on
//      the next bit; if the larger part rounds up to 2^FW, both parts are
//      instead rounded one bit further left and the exponent grows by one;
//   4. exponent = e_i + 1 - lz (+1 on that rounding overflow).
// An exponent above 2^EW-1 saturates each non-zero magnitude to 2^FW-1 and sets
// ovf_o; one below 0 flushes the result to zero and sets unf_o. A part whose
// rounded magnitude is zero gets sign 0, and an all-zero product gives the
// all-zero word.
//
// A single normalization after the final adders, with one shift of the
// fractions and one adjustment of the exponent, follows the published
// design; the rounding mode, the range handling and the full-range shifter
// are this design's choices.
//
// Interface: re_i, im_i (PW bits), e_i (XW-bit signed, from exp_adder) in;
// p_o (packed word), ovf_o, unf_o out. Purely combinational.
module norm_round
  import cplx_pkg::*;
#(
  parameter int unsigned PW = cplx_pkg::PROD_W,
  parameter int unsigned FW = cplx_pkg::FRAC_W,
  parameter int unsigned EW = cplx_pkg::EXP_W,
  parameter int unsigned XW = cplx_pkg::EXPS_W
) (
  input  logic [PW-1:0]        re_i,
  input  logic [PW-1:0]        im_i,
  input  logic signed [XW-1:0] e_i,
  output logic [EW+2*FW+1:0]   p_o,
  output logic                 ovf_o,
  output logic                 unf_o
);

  localparam int unsigned MAGW = PW - 1;   // |sum| < 2^(PW-1)
  localparam int unsigned LZW  = $clog2(MAGW + 1);

  logic            re_neg, im_neg;
  logic [MAGW-1:0] re_mag, im_mag, or_mag;
  logic [LZW-1:0]  lz;
  logic [MAGW-1:0] re_nrm, im_nrm;
  logic [FW:0]     re_r0, im_r0;   // rounded at the normal position
  logic [FW-1:0]   re_r1, im_r1;   // rounded one bit further left
  logic            rnd_ovf;
  logic [FW-1:0]   re_m, im_m;
  logic signed [XW-1:0] e_adj;

  assign re_neg = re_i[PW-1];
  assign im_neg = im_i[PW-1];
  assign re_mag = MAGW'(re_neg ? -re_i : re_i);
  assign im_mag = MAGW'(im_neg ? -im_i : im_i);
  assign or_mag = re_mag | im_mag;

  // leading-zero count of or_mag
  always_comb begin
    lz = LZW'(MAGW);
    for (int k = 0; k < MAGW; k++)
      if (or_mag[k]) lz = LZW'(MAGW - 1 - k);
  end

  assign re_nrm = re_mag << lz;
  assign im_nrm = im_mag << lz;

  assign re_r0 = {1'b0, re_nrm[MAGW-1 -: FW]} + (FW+1)'(re_nrm[MAGW-1-FW]);
  assign im_r0 = {1'b0, im_nrm[MAGW-1 -: FW]} + (FW+1)'(im_nrm[MAGW-1-FW]);
  assign re_r1 = {1'b0, re_nrm[MAGW-1 -: FW-1]} + FW'(re_nrm[MAGW-FW]);
  assign im_r1 = {1'b0, im_nrm[MAGW-1 -: FW-1]} + FW'(im_nrm[MAGW-FW]);
  assign rnd_ovf = re_r0[FW] | im_r0[FW];

  assign re_m  = rnd_ovf ? re_r1 : re_r0[FW-1:0];
  assign im_m  = rnd_ovf ? im_r1 : im_r0[FW-1:0];
  assign e_adj = e_i + XW'(1) - XW'(lz) + XW'(rnd_ovf);

  cplx_word_t res;

  always_comb begin
    ovf_o = 1'b0;
    unf_o = 1'b0;
    res   = '0;
    if (or_mag != '0) begin
      if (e_adj > signed'(XW'((1 << EW) - 1))) begin
        ovf_o       = 1'b1;
        res.exp     = '1;
        res.re_sign = re_neg;
        res.re_mag  = (re_mag != '0) ? '1 : '0;
        res.im_sign = im_neg;
        res.im_mag  = (im_mag != '0) ? '1 : '0;
      end else if (e_adj < 0) begin
        unf_o = 1'b1;
      end else begin
        res.exp     = EW'(e_adj);
        res.re_sign = re_neg & (re_m != '0);
        res.re_mag  = re_m;
        res.im_sign = im_neg & (im_m != '0);
        res.im_mag  = im_m;
      end
    end
  end

  assign p_o = res;

endmodule
