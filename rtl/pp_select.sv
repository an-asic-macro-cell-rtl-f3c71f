// pp_select -- partial-product selector ("Select AC/BD/BC/AD").
//
// Applies the Booth digits of one multiplier operand to a multiplicand x.
// Row i is 0, x or 2x chosen by digit i, ones'-complemented when the digit
// is negative, sign-extended to PW bits and shifted left by 2i. The +1 that
// completes each two's-complement negation is placed at bit 2i of a separate
// correction row, negbits_o, which enters the Wallace tree as one more row.
//
// negate_i turns the selector into the -BD selector of the real part: each
// digit's sign is flipped, so the rows sum to -(b*d) with no extra adder.
// The four selectors sharing two encoders follow the published architecture;
// full sign extension and the separate correction row are this design's
// choices.
//
// Interface: x_i (N-bit two's complement), dig_i[NDIG], negate_i in;
// rows_o[NDIG] and negbits_o out, all PW bits. Sum of all outputs modulo
// 2^PW equals (negate_i ? -1 : 1) * x * y. Purely combinational.
module pp_select
  import cplx_pkg::*;
#(
  parameter int unsigned N    = cplx_pkg::MANT_W,
  parameter int unsigned NDIG = (N + 1) / 2,
  parameter int unsigned PW   = 2 * N
) (
  input  logic [N-1:0]  x_i,
  input  booth_digit_t  dig_i [NDIG],
  input  logic          negate_i,
  output logic [PW-1:0] rows_o [NDIG],
  output logic [PW-1:0] negbits_o
);

  always_comb begin
    negbits_o = '0;
    for (int i = 0; i < NDIG; i++) begin
      logic [N:0]    mag;   // 0, x or 2x, N+1 bits signed
      logic          neg;
      logic [PW-1:0] ext;
      if (dig_i[i].one)      mag = {x_i[N-1], x_i};
      else if (dig_i[i].two) mag = {x_i, 1'b0};
      else                   mag = '0;
      neg = dig_i[i].neg ^ negate_i;
      if (neg) mag = ~mag;
      ext = PW'(signed'(mag));
      rows_o[i] = ext << (2 * i);
      negbits_o[2*i] = neg;
    end
  end

endmodule
