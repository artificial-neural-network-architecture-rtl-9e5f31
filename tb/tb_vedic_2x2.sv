// tb_vedic_2x2: exhaustive test of the 2x2 Vedic multiplier against integer multiplication.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_vedic_2x2;
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

  logic [1:0] a, b;
  logic [3:0] r;
  vedic_2x2 dut (.a(a), .b(b), .r(r));
  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j); #1;
        check(r == 4'(i * j), $sformatf("%0d*%0d=%0d", i, j, r));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
