// tb_vedic_4x4: exhaustive test of the 4x4 Vedic multiplier against integer multiplication.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_vedic_4x4;
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

  logic [3:0] a, b;
  logic [7:0] p;
  vedic_4x4 dut (.a(a), .b(b), .p(p));
  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        check(p == 8'(i * j), $sformatf("%0d*%0d=%0d", i, j, p));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
