// tb_norm_round -- normalization and rounding against the integer reference
// model in tb_cplx_ref_pkg. Drives random 26-bit sums of every magnitude
// scale and random exponent sums, plus values chosen to round up into the
// next power of two, zero, overflow and underflow; each of those cases is
// counted and must occur.
module tb_norm_round;
  import tb_cplx_ref_pkg::*;
  localparam int PW = 26;
  logic [PW-1:0] re, im;
  logic signed [8:0] e;
  logic [31:0] p;
  logic ovf, unf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_zero = 0, n_rndup = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  norm_round dut (.re_i(re), .im_i(im), .e_i(e), .p_o(p), .ovf_o(ovf), .unf_o(unf));

  function automatic longint rand_sum();
    longint v;
    int sh;
    sh = $urandom_range(25);
    v = longint'($urandom) & ((longint'(1) << sh) - 1);
    if (v > 33538050) v = 33538050;   // |ac-bd| <= 2*4095^2
    return ($urandom_range(1) != 0) ? -v : v;
  endfunction

  task automatic run(input longint rv, input longint iv, input int ev);
    logic [33:0] expv;
    re = PW'(rv);
    im = PW'(iv);
    e = 9'(ev);
    #1;
    expv = ref_pack(rv, iv, ev);
    checks++;
    if ({ovf, unf, p} != expv) begin
      failures++;
      if (failures < 10) $display("FAIL re=%0d im=%0d e=%0d got=%b/%b/%h exp=%b/%b/%h",
                                  rv, iv, ev, ovf, unf, p, expv[33], expv[32], expv[31:0]);
    end
    if (ovf) n_ovf++;
    if (unf) n_unf++;
    if (rv == 0 && iv == 0) n_zero++;
    if (dut.rnd_ovf) n_rndup++;
    @(posedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, 0, 10);
    run(33538050, -33538050, 94);
    run(-33538050, 1, -32);
    run(1, 0, 0);
    run(-1, 1, 40);
    // round up into the next power of two
    for (int k = 0; k < 12; k++) run((longint'(8191) << k) | ((longint'(1) << k) - 1), 5, 20);
    for (int t = 0; t < 20000; t++) run(rand_sum(), rand_sum(), int'($urandom_range(126)) - 32);
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_rndup == 0) begin
      failures++;
      $display("FAIL case never exercised");
    end
    $display("overflow=%0d underflow=%0d zero=%0d round-up renormalize=%0d", n_ovf, n_unf, n_zero, n_rndup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
