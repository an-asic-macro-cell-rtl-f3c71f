// tb_exp_adder -- exhaustive check of the exponent adder: for every pair of
// 6-bit exponents, e_o must equal ea + eb - 32.
module tb_exp_adder;
  logic [5:0] ea, eb;
  logic signed [8:0] e;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  exp_adder dut (.ea_i(ea), .eb_i(eb), .e_o(e));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        ea = 6'(i);
        eb = 6'(j);
        #1;
        checks++;
        if (int'(e) != i + j - 32) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, e);
        end
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
