// rdc_row -- one level of the Modified Wallace Tree: W cells of rdc side by
// side, compressing four W-bit rows into two.
//
// Bit k takes bit k of the four inputs and the COUT of bit k-1 as its CIN
// (CIN of bit 0 is 0). Its S goes to bit k of sum_o, its C to bit k+1 of
// carry_o. Because COUT never depends on CIN, the chain is one cell deep.
// C and COUT of the top bit are dropped: the tree works modulo 2^W.
//
// Interface: a_i..d_i in, sum_o and carry_o out, with
// a+b+c+d = sum+carry (mod 2^W). Purely combinational.
module rdc_row #(
  parameter int unsigned W = cplx_pkg::PROD_W
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  logic [W:0] cchain;  // cchain[k] is the CIN of bit k
  logic [W:0] cvec;    // C of bit k lands at weight k+1

  assign cchain[0] = 1'b0;
  assign cvec[0]   = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_bit
    rdc u_rdc (
      .i1  (a_i[k]),
      .i2  (b_i[k]),
      .i3  (c_i[k]),
      .i4  (d_i[k]),
      .cin (cchain[k]),
      .s   (sum_o[k]),
      .c   (cvec[k+1]),
      .cout(cchain[k+1])
    );
  end

  assign carry_o = cvec[W-1:0];

endmodule
