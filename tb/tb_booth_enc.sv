// tb_booth_enc -- exhaustive check of the radix-4 Booth recoder over all
// 8192 13-bit operands: the digits, weighted by 4^i, must add up to the
// operand; no digit may be both 1 and 2; a zero digit must not be negative.
module tb_booth_enc;
  import cplx_pkg::*;
  localparam int N = 13, ND = 7;
  logic [N-1:0] y;
  booth_digit_t dig [ND];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_enc #(.N(N)) dut (.y_i(y), .dig_o(dig));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int sum;
      bit bad;
      y = N'(v);
      @(posedge clk);
      sum = 0;
      bad = 0;
      for (int i = 0; i < ND; i++) begin
        int dv;
        dv = dig[i].one ? 1 : dig[i].two ? 2 : 0;
        if (dig[i].neg) dv = -dv;
        sum += dv * (4 ** i);
        if (dig[i].one && dig[i].two) bad = 1;
        if (dig[i].neg && !dig[i].one && !dig[i].two) bad = 1;
      end
      checks++;
      if (sum != int'(signed'(y)) || bad) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d sum=%0d bad=%0d", signed'(y), sum, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
