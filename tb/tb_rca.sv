// tb_rca: exhaustive test of rca at N = 8 and a random test at N = 13 against integer addition, both carry-in values.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_rca;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;
  logic        cin, co8, co13;
  rca #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(co8));
  rca #(.N(13)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(co13));

  initial begin
    a13 = '0; b13 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(i); b8 = 8'(j); cin = ci[0]; #1;
          check({co8, s8} == 9'(i + j + ci), $sformatf("n8 a=%0d b=%0d cin=%0d", i, j, ci));
        end
    for (int t = 0; t < 5000; t++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); cin = 1'($urandom);
      if (t == 0) begin a13 = '1; b13 = '0; cin = 1'b1; end
      #1;
      check({co13, s13} == 14'(a13) + 14'(b13) + 14'(cin), $sformatf("n13 a=%0d b=%0d", a13, b13));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
