// booth_enc -- radix-4 (modified) Booth recoder for one multiplier operand.
//
// The complex multiplier encodes a and b once each and shares the digits:
// the digits of a drive the AC and AD selectors, those of b the BC and BD
// selectors. That sharing of the encoders follows the published
// architecture; the choice of radix 4 is this design's own.
//
// Digit i looks at the bit triple y[2i+1], y[2i], y[2i-1] (y[-1] = 0, y
// sign-extended above its top bit) and has value -2*y[2i+1] + y[2i] + y[2i-1].
// A digit of value 0 is always encoded with neg = 0.
//
// Interface: y_i (N-bit two's complement) in, dig_o[NDIG] out, digit 0 is
// the least significant. Purely combinational.
module booth_enc
  import cplx_pkg::*;
#(
  parameter int unsigned N    = cplx_pkg::MANT_W,
  parameter int unsigned NDIG = (N + 1) / 2
) (
  input  logic [N-1:0]  y_i,
  output booth_digit_t  dig_o [NDIG]
);

  // y extended: one zero below bit 0, sign copies above bit N-1
  logic [2*NDIG:0] ye;
  assign ye = {{(2*NDIG+1-N-1){y_i[N-1]}}, y_i, 1'b0};

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      logic b2, b1, b0;
      b2 = ye[2*i+2];
      b1 = ye[2*i+1];
      b0 = ye[2*i];
      dig_o[i].one = b1 ^ b0;
      dig_o[i].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      dig_o[i].neg = b2 & ~(b1 & b0);
    end
  end

endmodule
