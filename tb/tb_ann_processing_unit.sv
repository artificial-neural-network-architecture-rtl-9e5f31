// tb_ann_processing_unit: end-to-end test of the neuron processing unit at
// its default parameters (16-bit Vedic multiplier, 40-bit accumulator,
// Q1.8 sigmoid output, reduced area-delay-power adders).
//
// Streams 3000 input vectors of 1 to 8 (x, w) pairs, with idle cycles inside
// some vectors and some vectors starting right after the previous one's last
// pair. For each vector the threshold is chosen so that z = sum - threshold
// falls in a chosen region of the sigmoid (each linear segment, each sign,
// saturation). An independent model computes the sum with 64-bit integers
// and y from a real-valued piecewise-linear sigmoid rounded to 8 fractional
// bits. Checked per vector: the accumulated sum right after the edge that
// takes the last pair, y and fire, and that out_valid is high exactly one
// clock edge later. Every mechanism (each sigmoid segment of
// either sign, fire = 0 and 1, back-to-back vectors, idle gaps, one-element
// vectors) must occur at least once.
// Ends with one TB_RESULT line; a watchdog stops a hung run and counts a failure.
module tb_ann_processing_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NV = 3000;

  initial begin
    repeat (200000) @(posedge clk);
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

  logic        rst_n, in_valid, in_first, in_last;
  logic [15:0] x, w;
  logic [39:0] threshold;
  logic        out_valid, fire;
  logic [8:0]  y;
  logic [39:0] sum;

  ann_processing_unit dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .x(x), .w(w), .threshold(threshold), .out_valid(out_valid), .y(y), .fire(fire), .sum(sum));

  typedef struct {
    longint sum;
    int     y;
    bit     fire;
    int     edge_last;
  } exp_t;

  exp_t exp_q[$];
  int   cyc = 0;
  int   n_out = 0;
  int   seg_hits[8];
  int   n_fire0 = 0, n_fire1 = 0, n_b2b = 0, n_gap = 0, n_single = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // each vector's threshold is presented in the cycle after its last pair,
  // the one cycle in which the unit reads it
  logic [39:0] thr_q[$];
  always @(posedge clk) begin
    if (in_valid && in_last) begin
      @(negedge clk);
      threshold = thr_q.pop_front();
    end
  end

  function automatic real plan(input real v);
    real av, f;
    av = (v < 0.0) ? -v : v;
    if (av >= 5.0)        f = 1.0;
    else if (av >= 2.375) f = av / 32.0 + 0.84375;
    else if (av >= 1.0)   f = av / 8.0 + 0.625;
    else                  f = av / 4.0 + 0.5;
    return (v < 0.0) ? 1.0 - f : f;
  endfunction

  // monitor: sum at the edge that takes the last pair, result one edge later
  always @(posedge clk) begin
    #1;
    if (exp_q.size() > 0 && rst_n) begin
      if (cyc == exp_q[0].edge_last)
        check(sum == 40'(exp_q[0].sum), $sformatf("sum %0d expected %0d", sum, exp_q[0].sum));
      if (out_valid) begin
        exp_t e;
        e = exp_q.pop_front();
        n_out++;
        check(cyc == e.edge_last + 1, $sformatf("latency: out at edge %0d, last pair at %0d",
                                                 cyc, e.edge_last));
        check(int'(y) == e.y, $sformatf("y %0d expected %0d", y, e.y));
        check(fire == e.fire, $sformatf("fire %0d expected %0d", fire, e.fire));
      end else if (cyc >= exp_q[0].edge_last + 1) begin
        check(1'b0, "out_valid missing");
        void'(exp_q.pop_front());
      end
    end else if (rst_n) begin
      check(!out_valid, "spurious out_valid");
    end
  end

  initial begin
    longint acc, zfix, thr;
    int     len, region, seg;
    real    target, zr;
    exp_t   e;
    bit     prev_last;

    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    x = '0; w = '0; threshold = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_last = 1'b0;

    for (int v = 0; v < NV; v++) begin
      // idle cycles between vectors, or none (back-to-back)
      if (v > 0 && ($urandom % 3) == 0) begin
        n_b2b++;
      end else begin
        @(negedge clk);
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
        if (v > 0) @(posedge clk);
      end
      len = ($urandom % 8) + 1;
      if (len == 1) n_single++;
      acc = 0;
      for (int i = 0; i < len; i++) begin
        if (i > 0 && ($urandom % 6) == 0) begin
          // idle gap inside the vector
          @(negedge clk);
          in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
          @(posedge clk);
          n_gap++;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_first = (i == 0);
        in_last  = (i == len - 1);
        // small operands now and then, so sums near zero occur too
        if (($urandom % 4) == 0) begin
          x = 16'($urandom % 512); w = 16'($urandom % 512);
        end else begin
          x = 16'($urandom); w = 16'($urandom);
        end
        acc = acc + longint'(x) * longint'(w);
        if (i == len - 1) begin
          // choose the threshold so that z lands in the wanted region
          region = v % 10;
          case (region)
            0: target =  0.8 * ($urandom % 1000) / 1000.0;             // 0 <= z < 1
            1: target = -0.99 * ($urandom % 1000) / 1000.0 - 0.005;    // -1 < z < 0
            2: target =  1.0 + 1.3 * ($urandom % 1000) / 1000.0;       // 1 .. 2.3
            3: target = -1.0 - 1.3 * ($urandom % 1000) / 1000.0;
            4: target =  2.4 + 2.5 * ($urandom % 1000) / 1000.0;       // 2.4 .. 4.9
            5: target = -2.4 - 2.5 * ($urandom % 1000) / 1000.0;
            6: target =  5.0 + 50.0 * ($urandom % 1000) / 1000.0;      // saturated
            7: target = -5.0 - 50.0 * ($urandom % 1000) / 1000.0;
            default: target = 0.0;
          endcase
          zfix = longint'(target * 65536.0);
          if (region == 8)      thr = 0;                      // z = whole sum
          else if (region == 9) thr = (64'd1 << 40) - 1;      // z far below 0
          else                  thr = acc - zfix;
          if (thr < 0) thr = 0;
          thr_q.push_back(40'(thr));
          e.sum  = acc;
          zr     = real'(acc - thr) / 65536.0;
          e.y    = int'($floor(plan(zr) * 256.0 + 0.5));
          e.fire = (acc >= thr);
          e.edge_last = cyc + 1;
          exp_q.push_back(e);
          if (e.fire) n_fire1++; else n_fire0++;
          seg = (zr >= 5.0 || zr <= -5.0) ? 3 :
                (zr >= 2.375 || zr <= -2.375) ? 2 :
                (zr >= 1.0 || zr <= -1.0) ? 1 : 0;
          seg_hits[seg + ((zr < 0.0) ? 4 : 0)]++;
        end
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "results outstanding at the end");
    check(n_out == NV, $sformatf("%0d results for %0d vectors", n_out, NV));
    for (int s = 0; s < 8; s++)
      check(seg_hits[s] > 0, $sformatf("sigmoid segment %0d never used", s));
    check(n_fire0 > 0 && n_fire1 > 0, "fire did not take both values");
    check(n_b2b > 0, "no back-to-back vectors");
    check(n_gap > 0, "no idle gap inside a vector");
    check(n_single > 0, "no one-element vector");
    $display("segments %p fire0 %0d fire1 %0d back-to-back %0d gaps %0d single %0d",
             seg_hits, n_fire0, n_fire1, n_b2b, n_gap, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
