// tb_full_sum_gen: full sum generation unit (N = 5). With half sum a ^ b and the true carry word of a + b + cin it must give the low N bits of a + b + cin.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_full_sum_gen;
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
  logic [N-1:0] s0, c, s;
  logic         cin;
  full_sum_gen #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .s(s));

  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = 0; j < 2**N; j++)
        for (int ci = 0; ci < 2; ci++) begin
          s0  = N'(i ^ j);
          for (int k = 0; k < N; k++) begin
            int m;
            m = (1 << (k + 1)) - 1;
            c[k] = 1'(((i & m) + (j & m) + ci) >> (k + 1));
          end
          cin = ci[0]; #1;
          check(s == N'(i + j + ci), $sformatf("a=%0d b=%0d cin=%0d", i, j, ci));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
