// tb_bec: exhaustive test of the binary to excess-1 converter at N = 6: y = x + 1 mod 64.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_bec;
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

  logic [5:0] x, y;
  bec #(.N(6)) dut (.x(x), .y(y));

  initial begin
    for (int i = 0; i < 64; i++) begin
      x = 6'(i); #1;
      check(y == 6'(i + 1), $sformatf("x=%0d y=%0d", i, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
