// rdc -- Reduced Delay Counter, a 4:2 counter built from library-style gates.
//
// Five inputs of equal weight (I1..I4 and CIN from the neighbouring lower
// bit) are reduced to a sum S of weight 1 and two carries C and COUT of
// weight 2:  I1+I2+I3+I4+CIN = S + 2*(C + COUT).  COUT depends only on
// I2, I3, I4, never on CIN, so a row of these cells has no rippling carry.
//
// The gate list follows the published cell: an XOR of I1 and CIN, a 3-input
// XNOR of I2, I3, I4, an XNOR combining the two into S; a NAND and a NOR of
// I1 and CIN feeding an inverting 2:1 mux whose select is the 3-input XNOR,
// giving C; three 2-input NANDs over the pairs of I2, I3, I4 and a 3-input
// NAND giving COUT. Which input pin meets which net was read from the
// drawing and checked against the arithmetic identity above.
//
// Purely combinational.
module rdc (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic s,
  output logic c,
  output logic cout
);

  logic eo;      // EOP:   I1 xor CIN
  logic en3;     // EN3P:  xnor of I2, I3, I4
  logic nd, nr;  // ND2, NR2 of I1 and CIN
  logic n23, n24, n34;

  assign eo  = i1 ^ cin;
  assign en3 = ~(i2 ^ i3 ^ i4);
  assign s   = ~(eo ^ en3);            // ENP

  assign nd  = ~(i1 & cin);
  assign nr  = ~(i1 | cin);
  // MUX21LP with inverted output: select high picks the NAND input
  assign c   = ~(en3 ? nd : nr);

  assign n23  = ~(i2 & i3);
  assign n24  = ~(i2 & i4);
  assign n34  = ~(i3 & i4);
  assign cout = ~(n23 & n24 & n34);    // ND3P

endmodule
