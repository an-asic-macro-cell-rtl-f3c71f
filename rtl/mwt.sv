// mwt -- Modified Wallace Tree: one combined 4:2-counter tree per result part.
//
// The real part's tree takes the partial products of AC and of -BD together
// (the imaginary part's those of BC and AD), so the two products are never
// formed separately and need no adder of their own: only one final adder
// follows. The tree is built from rows of the Reduced Delay Counter (rdc).
// Sharing one tree between two products, and building it from 4:2 RDC
// cells, follows the published design; the exact arrangement below, three
// levels 16 -> 8 -> 4 -> 2, is this design's own.
//
// Input rows: 7 Booth rows of each product and the two correction rows
// holding the +1 bits of negated Booth rows, 16 in all.
//
// Interface: rows_i[16] of PW bits in; sum_o and carry_o out, with
// sum_o + carry_o equal to the sum of all rows modulo 2^PW. Purely
// combinational.
module mwt #(
  parameter int unsigned PW    = cplx_pkg::PROD_W,
  parameter int unsigned NROWS = cplx_pkg::N_ROWS
) (
  input  logic [PW-1:0] rows_i [NROWS],
  output logic [PW-1:0] sum_o,
  output logic [PW-1:0] carry_o
);

  // Three levels of 4:2 reduction need exactly sixteen rows.
  if (NROWS != 16) begin : g_bad_rows
    $error("mwt: NROWS must be 16");
  end

  logic [PW-1:0] l1 [8];
  logic [PW-1:0] l2 [4];

  for (genvar g = 0; g < 4; g++) begin : g_lvl1
    rdc_row #(.W(PW)) u_row (
      .a_i(rows_i[4*g]), .b_i(rows_i[4*g+1]), .c_i(rows_i[4*g+2]), .d_i(rows_i[4*g+3]),
      .sum_o(l1[2*g]), .carry_o(l1[2*g+1])
    );
  end

  for (genvar g = 0; g < 2; g++) begin : g_lvl2
    rdc_row #(.W(PW)) u_row (
      .a_i(l1[4*g]), .b_i(l1[4*g+1]), .c_i(l1[4*g+2]), .d_i(l1[4*g+3]),
      .sum_o(l2[2*g]), .carry_o(l2[2*g+1])
    );
  end

  rdc_row #(.W(PW)) u_lvl3 (
    .a_i(l2[0]), .b_i(l2[1]), .c_i(l2[2]), .d_i(l2[3]),
    .sum_o(sum_o), .carry_o(carry_o)
  );

endmodule
