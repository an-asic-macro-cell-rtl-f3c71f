// tb_mwt -- the Modified Wallace Tree must keep the sum of its 16 input
// rows: sum_o + carry_o equals the sum of all rows modulo 2^26. Random rows,
// all-ones rows (every counter saturated) and single-row patterns.
module tb_mwt;
  localparam int PW = 26, NR = 16;
  logic [PW-1:0] rows [NR];
  logic [PW-1:0] s, c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mwt #(.PW(PW), .NROWS(NR)) dut (.rows_i(rows), .sum_o(s), .carry_o(c));

  task automatic check();
    logic [PW-1:0] tot;
    #1;
    tot = '0;
    for (int i = 0; i < NR; i++) tot += rows[i];
    checks++;
    if (PW'(s + c) != tot) begin
      failures++;
      if (failures < 10) $display("FAIL got=%h exp=%h", PW'(s + c), tot);
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
    for (int i = 0; i < NR; i++) rows[i] = '1;
    check();
    for (int j = 0; j < NR; j++) begin
      for (int i = 0; i < NR; i++) rows[i] = '0;
      rows[j] = PW'($urandom);
      check();
    end
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NR; i++) rows[i] = PW'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
