// mac: multiply-accumulate unit of the neuron.
//
// The combinational Vedic multiplier forms product = a * b (unsigned, N x N
// -> 2N bits); a sqrt_csla adder adds it to the accumulator register:
//   rst_n = 0        : acc <= 0 (asynchronous)
//   en = 1, clr = 0  : acc <= acc + product
//   en = 1, clr = 1  : acc <= product          (first term of a new sum)
//   en = 0, clr = 1  : acc <= 0
//   en = 0, clr = 0  : acc holds
// product is visible in the same cycle the operands are applied, acc one
// clock later. acc wraps modulo 2^ACC_W; ACC_W = 2N + 8 leaves room for 256
// full-scale products.
// N selects the multiplier: 4 -> vedic_4x4, 8 -> vedic_8x8, 16 -> vedic_16x16
// (the latter with SQRT-CSLA partial-product adders). The default N = 8 is the
// 8-bit MAC of the published simulation (205 x 3 = 615, then accumulation
// while reset is released). The clr/en controls, the asynchronous reset and
// the accumulator width are this design's choices.
module mac
  import ann_pkg::*;
#(
  parameter int unsigned  N     = 8,
  parameter int unsigned  ACC_W = 2 * N + 8,
  parameter adder_style_e STYLE = ADDER_ADP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-1:0]   product,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] base, sum;
  logic             sum_c;   // wrap-around carry, not kept

  if (N == 16) begin : g_m16
    vedic_16x16 #(.STYLE(STYLE)) u_mul (.a(a), .b(b), .p(product));
  end else if (N == 8) begin : g_m8
    vedic_8x8 u_mul (.a(a), .b(b), .p(product));
  end else if (N == 4) begin : g_m4
    vedic_4x4 u_mul (.a(a), .b(b), .p(product));
  end else begin : g_bad
    $error("mac: N must be 4, 8 or 16");
  end

  assign base = clr ? '0 : acc;

  sqrt_csla #(.WIDTH(ACC_W), .STYLE(STYLE)) u_acc_add (
    .a(base), .b({{(ACC_W-2*N){1'b0}}, product}), .cin(1'b0), .s(sum), .cout(sum_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
    else if (clr) acc <= '0;
  end
endmodule
