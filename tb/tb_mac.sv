// tb_mac: multiply-accumulate unit. First replays the published simulation on the default 8-bit MAC: with reset held, 205 x 3 gives a product of 615 and a clear accumulator; after reset is released the accumulator grows by 615 on every clock. Then random clr/en/operand sequences on the 8-bit and a 16-bit MAC are compared cycle by cycle with an integer model (acc changes exactly one clock after the operands are applied).
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_mac;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  logic        rst_n, clr, en;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [23:0] acc8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [39:0] acc16;

  mac dut8 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a8), .b(b8),
            .product(p8), .acc(acc8));
  mac #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a16), .b(b16),
                       .product(p16), .acc(acc16));

  longint m8, m16;

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b1;
    a8 = 8'd205; b8 = 8'd3; a16 = 16'd205; b16 = 16'd3;
    repeat (3) @(posedge clk);
    #1;
    check(p8 == 16'd615, $sformatf("product 205*3 = %0d", p8));
    check(acc8 == '0, "accumulator clear under reset");
    @(negedge clk) rst_n = 1'b1;
    for (int k = 1; k <= 6; k++) begin
      @(posedge clk); #1;
      check(acc8 == 24'(615 * k), $sformatf("accumulation step %0d: %0d", k, acc8));
      check(acc16 == 40'(615 * k), $sformatf("16-bit accumulation step %0d: %0d", k, acc16));
    end
    m8 = 615 * 6; m16 = 615 * 6;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      clr = ($urandom % 8) == 0;
      en  = ($urandom % 4) != 0;
      a8  = 8'($urandom); b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (t % 97 == 0) begin a16 = '1; b16 = '1; a8 = '1; b8 = '1; end
      #1;
      check(p8 == 16'(a8) * 16'(b8), "product 8");
      check(p16 == 32'(a16) * 32'(b16), "product 16");
      if (en) begin
        m8  = (clr ? 0 : m8)  + longint'(a8) * longint'(b8);
        m16 = (clr ? 0 : m16) + longint'(a16) * longint'(b16);
      end else if (clr) begin
        m8 = 0; m16 = 0;
      end
      m8  = m8  & ((64'd1 << 24) - 1);
      m16 = m16 & ((64'd1 << 40) - 1);
      @(posedge clk); #1;
      check(acc8 == 24'(m8), $sformatf("acc8 t=%0d %0d != %0d", t, acc8, m8));
      check(acc16 == 40'(m16), $sformatf("acc16 t=%0d %0d != %0d", t, acc16, m16));
    end
    // asynchronous reset clears mid-sum
    @(negedge clk); rst_n = 1'b0; #1;
    check(acc8 == '0 && acc16 == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
