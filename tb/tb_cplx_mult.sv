// tb_cplx_mult -- end-to-end test of the complex multiplier at its default
// size. Random packed operands of every magnitude scale, sign and exponent
// are multiplied and the 32-bit result and flags are compared with the
// integer reference model in tb_cplx_ref_pkg. The multiplier is
// combinational: each result is checked one time unit after its inputs
// change, i.e. with zero clock cycles of latency.
//
// Each mechanism of the datapath is counted and must happen at least once:
// negative Booth digits in the shared encoders, the -BD sign flip producing
// a negative row, the final adders' low-section carry choosing the
// carry-in-1 high section, a carry skipping a whole VBA block, the shared
// normalizing shift (left shifts by several bits), rounding into the next
// power of two, exponent overflow, underflow and a zero product.
module tb_cplx_mult;
  import tb_cplx_ref_pkg::*;
  logic [31:0] w, z, p;
  logic ovf, unf;
  int checks = 0, failures = 0;
  int n_negdig = 0, n_bdneg = 0, n_sel1 = 0, n_skip = 0, n_lshift = 0;
  int n_rndup = 0, n_ovf = 0, n_unf = 0, n_zero = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cplx_mult dut (.w_i(w), .z_i(z), .p_o(p), .ovf_o(ovf), .unf_o(unf));

  function automatic logic [11:0] rand_mag();
    int sh;
    sh = $urandom_range(12);
    return 12'($urandom & ((1 << sh) - 1));
  endfunction

  function automatic logic [31:0] rand_word();
    return {6'($urandom), 1'($urandom), rand_mag(), 1'($urandom), rand_mag()};
  endfunction

  task automatic run(input logic [31:0] wv, input logic [31:0] zv);
    logic [33:0] expv;
    w = wv;
    z = zv;
    #1;
    expv = ref_mult(wv, zv);
    checks++;
    if ({ovf, unf, p} != expv) begin
      failures++;
      if (failures < 10) $display("FAIL w=%h z=%h got=%b/%b/%h exp=%b/%b/%h",
                                  wv, zv, ovf, unf, p, expv[33], expv[32], expv[31:0]);
    end
    for (int i = 0; i < 7; i++) if (dut.dig_a[i].neg || dut.dig_b[i].neg) n_negdig++;
    if (dut.ng_bd != 0) n_bdneg++;
    if (dut.u_fa_re.lo_cout || dut.u_fa_im.lo_cout) n_sel1++;
    if ((&dut.u_fa_re.u_lo.g_blk[3].p) && dut.u_fa_re.u_lo.g_blk[3].ci) n_skip++;
    if (dut.u_norm.lz > 2 && !unf && p != 0) n_lshift++;
    if (dut.u_norm.rnd_ovf) n_rndup++;
    if (ovf) n_ovf++;
    if (unf) n_unf++;
    if (p == 0 && !unf) n_zero++;
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (1 + 0i) * (1 + 0i) with full-scale mantissas: 0.5 * 0.5 = 0.25
    run({6'd32, 1'b0, 12'h800, 1'b0, 12'h000}, {6'd32, 1'b0, 12'h800, 1'b0, 12'h000});
    // largest magnitudes, all sign combinations
    for (int s = 0; s < 16; s++)
      run({6'd33, s[0], 12'hFFF, s[1], 12'hFFF}, {6'd31, s[2], 12'hFFF, s[3], 12'hFFF});
    // zero operand
    run({6'd40, 1'b1, 12'h000, 1'b0, 12'h000}, rand_word());
    // exponent extremes
    run({6'd63, 1'b0, 12'hFFF, 1'b0, 12'h001}, {6'd63, 1'b1, 12'hFFF, 1'b0, 12'h010});
    run({6'd0, 1'b0, 12'h001, 1'b0, 12'h001}, {6'd0, 1'b1, 12'h001, 1'b0, 12'h000});
    for (int t = 0; t < 30000; t++) run(rand_word(), rand_word());
    $display("negative Booth digits=%0d  -BD negated rows=%0d  carry-select cin=1=%0d  block skip=%0d",
             n_negdig, n_bdneg, n_sel1, n_skip);
    $display("left shift>2=%0d  round-up renormalize=%0d  overflow=%0d  underflow=%0d  zero=%0d",
             n_lshift, n_rndup, n_ovf, n_unf, n_zero);
    checks++;
    if (n_negdig == 0 || n_bdneg == 0 || n_sel1 == 0 || n_skip == 0 || n_lshift == 0 ||
        n_rndup == 0 || n_ovf == 0 || n_unf == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
