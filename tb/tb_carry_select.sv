// tb_carry_select: carry selection unit (N = 5). Carry word pairs come from every a, b; the selected word must equal the true carries of a + b + cin, for both cin values.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_carry_select;
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
  logic [N-1:0] c1_0, c1_1, c;
  logic         cin, cout;
  carry_select #(.N(N)) dut (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c), .cout(cout));

  function automatic logic [N-1:0] carries(int x, int y, int ci);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) begin
      int m;
      m = (1 << (k + 1)) - 1;
      r[k] = 1'(((x & m) + (y & m) + ci) >> (k + 1));
    end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = 0; j < 2**N; j++)
        for (int ci = 0; ci < 2; ci++) begin
          c1_0 = carries(i, j, 0);
          c1_1 = carries(i, j, 1);
          cin  = ci[0]; #1;
          check(c == carries(i, j, ci), $sformatf("a=%0d b=%0d cin=%0d", i, j, ci));
          check(cout == 1'((i + j + ci) >> N), $sformatf("cout a=%0d b=%0d cin=%0d", i, j, ci));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
