// cplx_mult -- combinational multiplier for packed floating-point complex
// numbers, P = W * Z with W = a + ib and Z = c + id.
//
//   Re P = ac - bd        Im P = ad + bc
//
// The shared exponents are added once (exp_adder). The four 13-bit
// mantissas are converted from sign-magnitude to two's complement. Only a
// and b are Booth-encoded (booth_enc), and their digits are shared: the
// digits of a select multiples of c and of d (AC, AD), the digits of b
// select multiples of d and of c (BD, BC). The BD selector flips every digit
// sign, so its rows sum to -bd. The rows of AC and -BD enter one Modified
// Wallace Tree of 4:2 counters (mwt) and the rows of BC and AD another, so
// each part needs just one carry-propagate final adder (final_adder) and no
// separate product adders. A single normalization and rounding step
// (norm_round) then packs the result with one shared exponent.
//
// This block structure (two shared Booth encoders, four selectors, two
// combined trees, two tuned final adders, one normalizer) follows the
// published architecture. The number format's sign convention and bias,
// radix-4 Booth recoding, tree arrangement and rounding are this design's
// choices and are described in the sub-modules.
//
// Interface: w_i, z_i (32-bit packed words: exponent 31..26, real sign 25,
// real magnitude 24..13, imaginary sign 12, imaginary magnitude 11..0) in;
// p_o (same format), ovf_o (exponent overflow, saturated) and unf_o
// (exponent underflow, flushed to zero) out. No clock: the result is valid
// one combinational delay after the inputs settle.
module cplx_mult
  import cplx_pkg::*;
#(
  parameter int unsigned EW   = cplx_pkg::EXP_W,
  parameter int unsigned FW   = cplx_pkg::FRAC_W,
  parameter int          BIAS = cplx_pkg::EXP_BIAS
) (
  input  logic [EW+2*FW+1:0] w_i,
  input  logic [EW+2*FW+1:0] z_i,
  output logic [EW+2*FW+1:0] p_o,
  output logic               ovf_o,
  output logic               unf_o
);

  localparam int unsigned N    = FW + 1;
  localparam int unsigned ND   = (N + 1) / 2;
  localparam int unsigned W2   = 2 * N;
  localparam int unsigned NR   = 2 * ND + 2;

  if (EW != cplx_pkg::EXP_W || FW != cplx_pkg::FRAC_W) begin : g_bad_fmt
    $error("cplx_mult: word format is fixed by cplx_pkg");
  end

  cplx_word_t wq, zq;
  assign wq = w_i;
  assign zq = z_i;

  // ---- exponent path ----
  logic signed [EXPS_W-1:0] e_sum;
  exp_adder #(.EW(EW), .BIAS(BIAS), .XW(EXPS_W)) u_exp (
    .ea_i(wq.exp), .eb_i(zq.exp), .e_o(e_sum)
  );

  // ---- mantissas, two's complement ----
  logic [N-1:0] a, b, c, d;
  assign a = sm_to_tc(wq.re_sign, wq.re_mag);
  assign b = sm_to_tc(wq.im_sign, wq.im_mag);
  assign c = sm_to_tc(zq.re_sign, zq.re_mag);
  assign d = sm_to_tc(zq.im_sign, zq.im_mag);

  // ---- shared Booth encoders ----
  booth_digit_t dig_a [ND];
  booth_digit_t dig_b [ND];
  booth_enc #(.N(N)) u_enc_a (.y_i(a), .dig_o(dig_a));
  booth_enc #(.N(N)) u_enc_b (.y_i(b), .dig_o(dig_b));

  // ---- partial-product selectors ----
  logic [W2-1:0] pp_ac [ND], pp_bd [ND], pp_bc [ND], pp_ad [ND];
  logic [W2-1:0] ng_ac, ng_bd, ng_bc, ng_ad;

  pp_select #(.N(N), .PW(W2)) u_sel_ac (.x_i(c), .dig_i(dig_a), .negate_i(1'b0), .rows_o(pp_ac), .negbits_o(ng_ac));
  pp_select #(.N(N), .PW(W2)) u_sel_bd (.x_i(d), .dig_i(dig_b), .negate_i(1'b1), .rows_o(pp_bd), .negbits_o(ng_bd));
  pp_select #(.N(N), .PW(W2)) u_sel_bc (.x_i(c), .dig_i(dig_b), .negate_i(1'b0), .rows_o(pp_bc), .negbits_o(ng_bc));
  pp_select #(.N(N), .PW(W2)) u_sel_ad (.x_i(d), .dig_i(dig_a), .negate_i(1'b0), .rows_o(pp_ad), .negbits_o(ng_ad));

  // ---- combined trees ----
  logic [W2-1:0] re_rows [NR], im_rows [NR];
  always_comb begin
    for (int i = 0; i < ND; i++) begin
      re_rows[i]      = pp_ac[i];
      re_rows[ND + i] = pp_bd[i];
      im_rows[i]      = pp_bc[i];
      im_rows[ND + i] = pp_ad[i];
    end
    re_rows[2*ND]     = ng_ac;
    re_rows[2*ND + 1] = ng_bd;
    im_rows[2*ND]     = ng_bc;
    im_rows[2*ND + 1] = ng_ad;
  end

  logic [W2-1:0] re_s, re_c, im_s, im_c;
  mwt #(.PW(W2), .NROWS(NR)) u_tree_re (.rows_i(re_rows), .sum_o(re_s), .carry_o(re_c));
  mwt #(.PW(W2), .NROWS(NR)) u_tree_im (.rows_i(im_rows), .sum_o(im_s), .carry_o(im_c));

  // ---- final adders ----
  logic [W2-1:0] re_sum, im_sum;
  final_adder #(.PW(W2)) u_fa_re (.a_i(re_s), .b_i(re_c), .s_o(re_sum));
  final_adder #(.PW(W2)) u_fa_im (.a_i(im_s), .b_i(im_c), .s_o(im_sum));

  // ---- normalization and rounding ----
  norm_round #(.PW(W2), .FW(FW), .EW(EW), .XW(EXPS_W)) u_norm (
    .re_i(re_sum), .im_i(im_sum), .e_i(e_sum),
    .p_o(p_o), .ovf_o(ovf_o), .unf_o(unf_o)
  );

endmodule
