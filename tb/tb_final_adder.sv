// tb_final_adder -- the 26-bit final adder must equal a + b mod 2^26.
// Besides random operands it drives patterns that make whole blocks
// propagate (so carries skip them) and that make the low 13-bit section
// produce a carry (so the carry-in-1 copy of the high section is chosen);
// both events are counted and must occur.
module tb_final_adder;
  localparam int PW = 26;
  logic [PW-1:0] a, b, s;
  int checks = 0, failures = 0;
  int n_select_hi1 = 0, n_skip = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  final_adder #(.PW(PW)) dut (.a_i(a), .b_i(b), .s_o(s));

  task automatic run(input logic [PW-1:0] av, input logic [PW-1:0] bv);
    a = av;
    b = bv;
    #1;
    checks++;
    if (s != PW'(av + bv)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h exp=%h", av, bv, s, PW'(av + bv));
    end
    // low section carry out, worked out here
    if ((27'(av[12:0]) + 27'(bv[12:0])) >> 13 != 0) n_select_hi1++;
    // a block of five propagate bits (low section bits 5..9) fed a carry
    if ((av[9:5] ^ bv[9:5]) == 5'h1F && ((27'(av[4:0]) + 27'(bv[4:0])) >> 5) != 0) n_skip++;
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run('0, '0);
    run('1, 26'd1);
    run(26'h1FFF, 26'd1);
    run(26'h2AAAAAA, 26'h1555555);
    run(26'h2AAAAAA, 26'h1555556);
    for (int t = 0; t < 3000; t++) run(PW'($urandom), PW'($urandom));
    // all-propagate with random carry injection
    for (int t = 0; t < 1000; t++) begin
      logic [PW-1:0] r;
      r = PW'($urandom);
      run(r, ~r + PW'($urandom_range(3)));
    end
    checks++;
    if (n_select_hi1 == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised: select_hi1=%0d skip=%0d", n_select_hi1, n_skip);
    end
    $display("carry-select picked cin=1 copy %0d times, 5-bit block skipped %0d times", n_select_hi1, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
