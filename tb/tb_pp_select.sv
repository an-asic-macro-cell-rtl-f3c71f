// tb_pp_select -- the rows and correction bits of the partial-product
// selector must add up (mod 2^26) to x*y, or -x*y when negate_i is set.
// The Booth digits are produced here by the testbench's own recoder, so the
// selector is checked alone. Random operands plus the extreme values.
module tb_pp_select;
  import cplx_pkg::*;
  localparam int N = 13, ND = 7, PW = 26;
  logic [N-1:0]  x;
  booth_digit_t  dig [ND];
  logic          negate;
  logic [PW-1:0] rows [ND];
  logic [PW-1:0] negbits;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pp_select #(.N(N), .PW(PW)) dut (.x_i(x), .dig_i(dig), .negate_i(negate), .rows_o(rows), .negbits_o(negbits));

  // independent recoder: digit i = y[2i-1] + y[2i] - 2*y[2i+1]
  function automatic void recode(input int yv);
    logic [15:0] ye;
    ye = 16'(yv) << 1;  // sign bits of yv fill the top
    for (int i = 0; i < ND; i++) begin
      int dv;
      logic [2:0] t;
      t = ye[2*i +: 3];
      dv = int'(t[0]) + int'(t[1]) - 2 * int'(t[2]);
      dig[i].neg = dv < 0;
      dig[i].one = (dv == 1) || (dv == -1);
      dig[i].two = (dv == 2) || (dv == -2);
    end
  endfunction

  task automatic run(input int xv, input int yv, input bit ng);
    logic [PW-1:0] tot, expv;
    x = N'(xv);
    negate = ng;
    recode(yv);
    #1;
    tot = negbits;
    for (int i = 0; i < ND; i++) tot += rows[i];
    expv = PW'(ng ? -(xv * yv) : xv * yv);
    checks++;
    if (tot != expv) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d neg=%0d got=%h exp=%h", xv, yv, ng, tot, expv);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ext [6] = '{0, 1, -1, 4095, -4095, -4096};
    foreach (ext[i]) foreach (ext[j]) for (int n = 0; n < 2; n++) run(ext[i], ext[j], 1'(n));
    for (int t = 0; t < 4000; t++)
      run(int'($urandom_range(8191)) - 4096, int'($urandom_range(8191)) - 4096, 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
