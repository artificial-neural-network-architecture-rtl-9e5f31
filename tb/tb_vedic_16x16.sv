// tb_vedic_16x16: 16x16 Vedic multiplier in both adder styles against integer multiplication: corner operands, every single-bit pair, and random operands.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_vedic_16x16;
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
  logic [15:0] a, b;
  logic [31:0] pa, pb;
  vedic_16x16                      dut_a (.a(a), .b(b), .p(pa));
  vedic_16x16 #(.STYLE(ADDER_BEC)) dut_b (.a(a), .b(b), .p(pb));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] r;
    a = x; b = y; #1;
    r = 32'(x) * 32'(y);
    check(pa == r, $sformatf("adp %0d*%0d=%0d", x, y, pa));
    check(pb == r, $sformatf("bec %0d*%0d=%0d", x, y, pb));
  endtask

  initial begin
    apply(16'hFFFF, 16'hFFFF);
    apply(16'd205, 16'd3);
    apply(16'h0000, 16'hFFFF);
    apply(16'h00FF, 16'hFF00);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) apply(16'd1 << i, (16'd1 << j) | 16'd1);
    for (int t = 0; t < 50000; t++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
