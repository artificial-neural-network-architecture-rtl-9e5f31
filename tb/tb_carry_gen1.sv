// tb_carry_gen1: exhaustive test of carry generation unit CG1 (N = 6). Each carry bit i must equal the carry out of bit i of a + b + 1, taken from integer addition of the low i+1 bits.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_carry_gen1;
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

  localparam int N = 6;
  logic [N-1:0] a, b, s0, c0, cw;
  carry_gen1 #(.N(N)) dut (.s0(s0), .c0(c0), .c1_1(cw));

  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = 0; j < 2**N; j++) begin
        a = N'(i); b = N'(j);
        s0 = a ^ b; c0 = a & b; #1;
        for (int k = 0; k < N; k++) begin
          int m, ref_c;
          m = (1 << (k + 1)) - 1;
          ref_c = (((i & m) + (j & m) + 1) >> (k + 1)) & 1;
          check(cw[k] == ref_c[0], $sformatf("a=%0d b=%0d bit %0d", i, j, k));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
