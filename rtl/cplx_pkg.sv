// cplx_pkg -- shared types and constants of the packed complex multiplier.
//
// A complex number travels as one 32-bit word: a 6-bit exponent shared by
// both parts (bits 31..26), then the real part as sign (bit 25) and 12-bit
// magnitude (bits 24..13), then the imaginary part as sign (bit 12) and
// 12-bit magnitude (bits 11..0). The field layout follows the published
// format; reading each part as sign-magnitude, the value
// (-1)^S * M/4096 * 2^(E-BIAS) and the bias of 32 are this design's choices.
//
// Inside the multiplier each part becomes a 13-bit two's-complement mantissa
// (range -4095..4095), so a product such as ac-bd fits 26 signed bits, which
// is the width of the Wallace trees and final adders.
package cplx_pkg;

  localparam int unsigned EXP_W    = 6;        // shared exponent width
  localparam int unsigned FRAC_W    = 12;       // magnitude bits per part
  localparam int unsigned MANT_W    = FRAC_W + 1;   // two's-complement mantissa width
  localparam int unsigned PROD_W    = 2 * MANT_W;   // product / tree / adder width
  localparam int unsigned N_DIG  = (MANT_W + 1) / 2;  // radix-4 Booth digits
  localparam int unsigned N_ROWS = 2 * N_DIG + 2;  // rows into one tree
  localparam int          EXP_BIAS  = 32;
  localparam int unsigned EXPS_W    = 9;        // signed width of exponent sums

  // Packed word as laid out in memory and on the bus.
  typedef struct packed {
    logic [EXP_W-1:0] exp;
    logic          re_sign;
    logic [FRAC_W-1:0] re_mag;
    logic          im_sign;
    logic [FRAC_W-1:0] im_mag;
  } cplx_word_t;

  // One radix-4 Booth digit: value = (neg ? -1 : 1) * (one ? 1 : two ? 2 : 0).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  // Sign-magnitude part to two's-complement mantissa.
  function automatic logic signed [MANT_W-1:0] sm_to_tc(input logic s, input logic [FRAC_W-1:0] m);
    logic signed [MANT_W-1:0] v;
    v = signed'({1'b0, m});
    return s ? -v : v;
  endfunction

endpackage
