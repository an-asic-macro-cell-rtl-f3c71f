// final_adder -- the carry-propagate adder after the Modified Wallace Tree.
//
// Adds the tree's sum and carry vectors. The low bits 0..12 arrive early
// from the tree, so they go through a Variable Block Adder section with
// blocks of 1, 1, 3, 5 and 3 bits (from the least significant end). The
// high bits 13..25 are added twice, by two identical VBA sections with
// blocks 1, 3, 5, 3, 1, one assuming a carry-in of 0 and one of 1; the
// carry-out of the low section then picks one of them in a 13-bit
// multiplexer (a two-section conditional-sum adder). The 13/13 split and
// the block sizes follow the published adder; the carry-skip form of each
// block is this design's reading of "variable block adder".
//
// Interface: a_i, b_i (PW bits) in; s_o = a_i + b_i modulo 2^PW out. The
// carry out of bit PW-1 is dropped, as the product sums it adds always fit
// in PW signed bits. Purely combinational.
module final_adder #(
  parameter int unsigned PW   = cplx_pkg::PROD_W,
  parameter int unsigned LO_W = 13
) (
  input  logic [PW-1:0] a_i,
  input  logic [PW-1:0] b_i,
  output logic [PW-1:0] s_o
);

  localparam int unsigned HI_W = PW - LO_W;

  if (PW != 26 || LO_W != 13) begin : g_bad_size
    $error("final_adder: block sizes are laid out for 13 + 13 bits");
  end

  logic              lo_cout;
  logic [HI_W-1:0]   hi_s0, hi_s1;
  logic              hi_c0_unused, hi_c1_unused;

  vba_section #(.W(LO_W), .NB(5), .BLK('{1, 1, 3, 5, 3})) u_lo (
    .a_i(a_i[LO_W-1:0]), .b_i(b_i[LO_W-1:0]), .cin_i(1'b0),
    .s_o(s_o[LO_W-1:0]), .cout_o(lo_cout)
  );

  vba_section #(.W(HI_W), .NB(5), .BLK('{1, 3, 5, 3, 1})) u_hi0 (
    .a_i(a_i[PW-1:LO_W]), .b_i(b_i[PW-1:LO_W]), .cin_i(1'b0),
    .s_o(hi_s0), .cout_o(hi_c0_unused)
  );

  vba_section #(.W(HI_W), .NB(5), .BLK('{1, 3, 5, 3, 1})) u_hi1 (
    .a_i(a_i[PW-1:LO_W]), .b_i(b_i[PW-1:LO_W]), .cin_i(1'b1),
    .s_o(hi_s1), .cout_o(hi_c1_unused)
  );

  // 13-bit multiplexer
  assign s_o[PW-1:LO_W] = lo_cout ? hi_s1 : hi_s0;

endmodule
