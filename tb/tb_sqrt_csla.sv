// tb_sqrt_csla: square-root carry select adder in both group styles, at 16, 24 and 41 bits (the widths used in the neuron), against integer addition. Random operands plus carry-chain corner cases (all ones + 1, alternating patterns).
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_sqrt_csla;
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

  import ann_pkg::*;
  logic [40:0] a, b;
  logic        cin;
  logic [15:0] s16a, s16b;
  logic [23:0] s24a, s24b;
  logic [40:0] s41a, s41b;
  logic        c16a, c16b, c24a, c24b, c41a, c41b;

  sqrt_csla dut16a (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16a), .cout(c16a));
  sqrt_csla #(.WIDTH(16), .STYLE(ADDER_BEC)) dut16b (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16b), .cout(c16b));
  sqrt_csla #(.WIDTH(24), .STYLE(ADDER_ADP)) dut24a (.a(a[23:0]), .b(b[23:0]), .cin(cin), .s(s24a), .cout(c24a));
  sqrt_csla #(.WIDTH(24), .STYLE(ADDER_BEC)) dut24b (.a(a[23:0]), .b(b[23:0]), .cin(cin), .s(s24b), .cout(c24b));
  sqrt_csla #(.WIDTH(41), .STYLE(ADDER_ADP)) dut41a (.a(a), .b(b), .cin(cin), .s(s41a), .cout(c41a));
  sqrt_csla #(.WIDTH(41), .STYLE(ADDER_BEC)) dut41b (.a(a), .b(b), .cin(cin), .s(s41b), .cout(c41b));

  task automatic apply(input logic [40:0] x, input logic [40:0] y, input logic ci);
    logic [41:0] r41;
    logic [24:0] r24;
    logic [16:0] r16;
    a = x; b = y; cin = ci; #1;
    r16 = 17'(x[15:0]) + 17'(y[15:0]) + 17'(ci);
    r24 = 25'(x[23:0]) + 25'(y[23:0]) + 25'(ci);
    r41 = 42'(x) + 42'(y) + 42'(ci);
    check({c16a, s16a} == r16, $sformatf("16 adp %h+%h+%0d", x[15:0], y[15:0], ci));
    check({c16b, s16b} == r16, $sformatf("16 bec %h+%h+%0d", x[15:0], y[15:0], ci));
    check({c24a, s24a} == r24, $sformatf("24 adp %h+%h+%0d", x[23:0], y[23:0], ci));
    check({c24b, s24b} == r24, $sformatf("24 bec %h+%h+%0d", x[23:0], y[23:0], ci));
    check({c41a, s41a} == r41, $sformatf("41 adp %h+%h+%0d", x, y, ci));
    check({c41b, s41b} == r41, $sformatf("41 bec %h+%h+%0d", x, y, ci));
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, 41'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply({21{2'b01}}, {21{2'b10}}, 1'b1);
    apply({21{2'b01}}, {21{2'b10}}, 1'b0);
    // a carry entering each group boundary in turn
    for (int k = 0; k < 41; k++) apply((41'd1 << k) - 1, 41'd1, 1'b0);
    for (int t = 0; t < 30000; t++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
