// exp_adder -- adds the shared exponents of the two operands.
//
// Both operands carry one exponent for their real and imaginary parts, so a
// single addition serves the whole complex product, as in the published
// design. The bias removed here (BIAS, 32 by default) and the signed XW-bit
// result are this design's choices; range checks happen after
// normalization, where the exponent is adjusted once more.
//
// Interface: ea_i, eb_i (EW bits, biased) in; e_o = ea_i + eb_i - BIAS as
// an XW-bit signed number out. Purely combinational.
module exp_adder #(
  parameter int unsigned EW   = cplx_pkg::EXP_W,
  parameter int          BIAS = cplx_pkg::EXP_BIAS,
  parameter int unsigned XW   = cplx_pkg::EXPS_W
) (
  input  logic [EW-1:0]        ea_i,
  input  logic [EW-1:0]        eb_i,
  output logic signed [XW-1:0] e_o
);

  assign e_o = signed'(XW'(ea_i)) + signed'(XW'(eb_i)) - XW'(BIAS);

endmodule
