// vba_section -- one section of a Variable Block Adder (carry-skip adder
// with blocks of unequal size).
//
// The W bits are cut into NB blocks, BLK[0] being the least significant.
// Inside a block the carry ripples bit by bit. When every bit of a block
// propagates (a^b all ones), the block's carry-in is passed straight to its
// carry-out, skipping the ripple; otherwise the rippled carry is used. Block
// sizes are chosen by the instantiating adder to match when its input bits
// arrive.
//
// Interface: a_i, b_i, cin_i in; s_o (W bits) and cout_o out, with
// {cout_o, s_o} = a_i + b_i + cin_i. Purely combinational.
module vba_section #(
  parameter int unsigned W       = 13,
  parameter int unsigned NB      = 5,
  parameter int unsigned BLK[NB] = '{1, 1, 3, 5, 3}
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         cin_i,
  output logic [W-1:0] s_o,
  output logic         cout_o
);

  function automatic int unsigned blk_sum(input int unsigned upto);
    int unsigned t = 0;
    for (int unsigned k = 0; k < upto; k++) t += BLK[k];
    return t;
  endfunction

  if (blk_sum(NB) != W) begin : g_bad_blocks
    $error("vba_section: block sizes must add up to W");
  end

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = blk_sum(k);
    localparam int unsigned SZ = BLK[k];

    logic          ci;          // carry into this block
    logic          co;          // carry out of this block
    logic [SZ-1:0] p;
    logic          ripple_out;

    if (k == 0) begin : g_first
      assign ci = cin_i;
    end else begin : g_next
      assign ci = g_blk[k-1].co;
    end

    assign p = a_i[LO +: SZ] ^ b_i[LO +: SZ];

    always_comb begin
      logic cy;
      cy = ci;
      for (int unsigned j = 0; j < SZ; j++) begin
        s_o[LO+j] = p[j] ^ cy;
        cy        = (a_i[LO+j] & b_i[LO+j]) | (p[j] & cy);
      end
      ripple_out = cy;
    end

    // carry skip
    assign co = (&p) ? ci : ripple_out;
  end

  assign cout_o = g_blk[NB-1].co;

endmodule
