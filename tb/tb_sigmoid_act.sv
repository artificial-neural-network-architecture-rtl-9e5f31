// tb_sigmoid_act: activation unit at its default format (41-bit z with 16 fractional bits, Q1.8 output). Every output is compared with a real-valued evaluation of the piecewise-linear sigmoid rounded to 8 fractional bits (exact match), with the exact logistic function (within 0.02 plus half an output step), and fire with the sign of z. z sweeps -8..8 in steps of 1/256, plus random and extreme values.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_sigmoid_act;
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

  logic signed [40:0] z;
  logic        [8:0]  y;
  logic               fire;
  int seg_hits [8];

  sigmoid_act dut (.z(z), .y(y), .fire(fire));

  function automatic real plan(input real v);
    real av, f;
    av = (v < 0.0) ? -v : v;
    if (av >= 5.0)        f = 1.0;
    else if (av >= 2.375) f = av / 32.0 + 0.84375;
    else if (av >= 1.0)   f = av / 8.0 + 0.625;
    else                  f = av / 4.0 + 0.5;
    return (v < 0.0) ? 1.0 - f : f;
  endfunction

  task automatic apply(input logic signed [40:0] zi);
    real zr, ref_y, exact;
    int  ref_q, seg;
    real av;
    z = zi; #1;
    zr    = real'(zi) / 65536.0;
    ref_y = plan(zr);
    ref_q = int'($floor(ref_y * 256.0 + 0.5));
    exact = 1.0 / (1.0 + $exp(-zr));
    check(int'(y) == ref_q, $sformatf("z=%f y=%0d expected %0d", zr, y, ref_q));
    check((real'(y) / 256.0 - exact) < 0.0220 && (exact - real'(y) / 256.0) < 0.0220,
          $sformatf("accuracy z=%f y=%0d", zr, y));
    check(fire == (zi >= 0), $sformatf("fire z=%f", zr));
    av  = (zr < 0.0) ? -zr : zr;
    seg = (av >= 5.0) ? 3 : (av >= 2.375) ? 2 : (av >= 1.0) ? 1 : 0;
    seg_hits[seg + ((zr < 0.0) ? 4 : 0)]++;
  endtask

  initial begin
    for (int i = -8 * 256; i <= 8 * 256; i++) apply(41'(i) <<< 8);
    for (int t = 0; t < 20000; t++) apply(41'(signed'($urandom % 1048576) - 524288));
    apply({1'b0, {40{1'b1}}});
    apply({1'b1, {40{1'b0}}});
    apply(41'sd0);
    apply(-41'sd1);
    for (int s = 0; s < 8; s++) check(seg_hits[s] > 0, $sformatf("segment %0d never used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
