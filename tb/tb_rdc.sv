// tb_rdc -- exhaustive check of the 4:2 Reduced Delay Counter: for all 32
// input combinations, I1+I2+I3+I4+CIN must equal S + 2*(C+COUT), and COUT
// must not change when only CIN changes.
module tb_rdc;
  logic i1, i2, i3, i4, cin, s, c, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rdc dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {i1, i2, i3, i4} = 4'(v);
        cin = 1'(ci);
        @(posedge clk);
        checks++;
        if (int'(s) + 2 * (int'(c) + int'(cout)) != $countones({i1, i2, i3, i4, cin})) begin
          failures++;
          $display("FAIL v=%0d cin=%0d s=%b c=%b cout=%b", v, ci, s, c, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL cout depends on cin v=%0d", v);
          end
        end
        // COUT is the majority of I2, I3, I4
        checks++;
        if (cout != ((i2 & i3) | (i2 & i4) | (i3 & i4))) begin
          failures++;
          $display("FAIL cout v=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
