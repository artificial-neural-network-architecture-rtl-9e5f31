// tb_vedic_8x8: exhaustive test of the 8x8 Vedic multiplier against integer multiplication, including 205 x 3 = 615.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_vedic_8x8;
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

  logic [7:0]  a, b;
  logic [15:0] p;
  vedic_8x8 dut (.a(a), .b(b), .p(p));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        check(p == 16'(i * j), $sformatf("%0d*%0d=%0d", i, j, p));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
