// tb_half_sum_gen: exhaustive test of the half sum generation unit (N = 5). Checks the arithmetic identity a + b = s0 + 2*c0 and that s0 and c0 never overlap.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_half_sum_gen;
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

  localparam int N = 5;
  logic [N-1:0] a, b, s0, c0;
  half_sum_gen #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = 0; j < 2**N; j++) begin
        a = N'(i); b = N'(j); #1;
        check(int'(s0) + 2 * int'(c0) == i + j, $sformatf("sum identity a=%0d b=%0d", i, j));
        check((s0 & c0) == '0, $sformatf("overlap a=%0d b=%0d", i, j));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
