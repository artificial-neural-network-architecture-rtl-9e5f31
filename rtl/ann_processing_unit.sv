// ann_processing_unit: one neuron processing unit of a feed-forward
// artificial neural network: a multiply-accumulate unit built on a Vedic
// multiplier and square-root carry select adders, followed by the activation
// unit.
//
// Operation. An input vector is streamed one (x, w) pair per clock with
// in_valid high; in_first marks the first pair, in_last the last one. The mac
// forms sum = sum over i of x_i * w_i; the edge that takes the last pair
// also makes sum final. In the following cycle a sqrt_csla used as a
// subtractor forms z = sum - threshold (operand inverted, carry in 1) and
// sigmoid_act evaluates it; the next clock edge registers y = sigmoid(z) and
// fire = (sum >= threshold) and raises out_valid for one cycle. A pair
// presented in cycle t as the last one thus gives out_valid in cycle t + 2.
// A new vector may start in cycle t + 1 (the result of the old one is taken
// from sum before that edge changes it). threshold must be stable in cycle
// t + 1.
//
// Number formats (this design's choice): x and w are unsigned fixed point
// with N/2 integer and N/2 fractional bits, so products and sum carry
// ZF = N fractional bits; threshold uses the same format as sum; y is Q1.YF.
//
// What follows the published design: the MAC-plus-activation structure of
// the neuron, the 16-bit Vedic multiplier with SQRT-CSLA adders (N = 16), the
// sigmoid activation and the 0/1 threshold output. The handshake, the number
// formats, the threshold input and the latency are this design's own.
module ann_processing_unit
  import ann_pkg::*;
#(
  parameter int unsigned  N     = 16,
  parameter int unsigned  ACC_W = 2 * N + 8,
  parameter int unsigned  YF    = 8,
  parameter adder_style_e STYLE = ADDER_ADP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     w,
  input  logic [ACC_W-1:0] threshold,
  output logic             out_valid,
  output logic [YF:0]      y,
  output logic             fire,
  output logic [ACC_W-1:0] sum
);
  localparam int unsigned ZW = ACC_W + 1;
  localparam int unsigned ZF = N;

  logic [2*N-1:0] product;
  logic           last_q;
  logic [ZW-1:0]  z;
  logic           z_c;     // carry out of the subtractor, not needed
  logic [YF:0]    y_c;
  logic           fire_c;

  mac #(.N(N), .ACC_W(ACC_W), .STYLE(STYLE)) u_mac (
    .clk(clk), .rst_n(rst_n), .clr(in_valid & in_first), .en(in_valid),
    .a(x), .b(w), .product(product), .acc(sum));

  // z = sum - threshold, two's complement, ACC_W + 1 bits
  sqrt_csla #(.WIDTH(ZW), .STYLE(STYLE)) u_sub (
    .a({1'b0, sum}), .b(~{1'b0, threshold}), .cin(1'b1), .s(z), .cout(z_c));

  sigmoid_act #(.ZW(ZW), .ZF(ZF), .YF(YF)) u_act (.z(z), .y(y_c), .fire(fire_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
      fire      <= 1'b0;
    end else begin
      last_q    <= in_valid & in_last;
      out_valid <= last_q;
      if (last_q) begin
        y    <= y_c;
        fire <= fire_c;
      end
    end
  end

  // Handshake rule: a result appears exactly two cycles after the cycle that
  // presented the last pair of a vector, and at no other time.
  a_result_timing : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid == $past(in_valid && in_last, 2))
    else $error("out_valid does not follow in_last by two cycles");
endmodule
