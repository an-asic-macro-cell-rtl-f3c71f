// tb_cplx_ref_pkg -- reference model of the packed complex multiplication,
// written with plain integer arithmetic and no knowledge of the hardware's
// shifter or rounding circuit.
//
// Word: exponent [31:26], real sign [25], real magnitude [24:13], imaginary
// sign [12], imaginary magnitude [11:0]; value (-1)^S * M/4096 * 2^(E-32).
// ref_pack() takes the exact integer sums re, im (scale 2^24 = 1.0 * 2^e)
// and finds the smallest right shift k for which the larger magnitude,
// rounded to nearest with ties away from zero, fits 12 bits; the result
// exponent is e + k - 12. Out of range exponents saturate (above 63) or
// flush to zero (below 0).
package tb_cplx_ref_pkg;

  function automatic longint rshift_round(input longint x, input int k);
    if (k <= 0) return x << (-k);
    return (x + (longint'(1) << (k - 1))) >> k;
  endfunction

  // returns {ovf, unf, word}
  function automatic logic [33:0] ref_pack(input longint re, input longint im, input int e);
    longint mr, mi, mx, rr, ri;
    int k, ex;
    logic [31:0] w;
    logic ovf, unf;
    mr = (re < 0) ? -re : re;
    mi = (im < 0) ? -im : im;
    mx = (mr > mi) ? mr : mi;
    w = '0; ovf = 0; unf = 0;
    if (mx != 0) begin
      k = -30;
      while (rshift_round(mx, k) > 4095) k++;
      // smallest k: step back while the next smaller still fits
      while (rshift_round(mx, k - 1) <= 4095 && k > -30) k--;
      rr = rshift_round(mr, k);
      ri = rshift_round(mi, k);
      ex = e + k - 12;
      if (ex > 63) begin
        ovf = 1;
        w = {6'd63, re < 0, (mr != 0) ? 12'hFFF : 12'h000, im < 0, (mi != 0) ? 12'hFFF : 12'h000};
      end else if (ex < 0) begin
        unf = 1;
      end else begin
        w = {ex[5:0], (re < 0) && (rr != 0), rr[11:0], (im < 0) && (ri != 0), ri[11:0]};
      end
    end
    return {ovf, unf, w};
  endfunction

  function automatic longint sm_val(input logic s, input logic [11:0] m);
    return s ? -longint'(m) : longint'(m);
  endfunction

  // full reference multiply of two packed words
  function automatic logic [33:0] ref_mult(input logic [31:0] w, input logic [31:0] z);
    longint a, b, c, d;
    int e;
    a = sm_val(w[25], w[24:13]);
    b = sm_val(w[12], w[11:0]);
    c = sm_val(z[25], z[24:13]);
    d = sm_val(z[12], z[11:0]);
    e = int'(w[31:26]) + int'(z[31:26]) - 32;
    return ref_pack(a * c - b * d, a * d + b * c, e);
  endfunction

endpackage
