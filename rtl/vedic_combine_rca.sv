// vedic_combine_rca: joins the four HxH partial products of a 2Hx2H Vedic
// multiplier with three 2H-bit ripple carry adders.
//
// With a = {aH, aL} and b = {bH, bL} (H bits each):
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH     (2H bits each)
//   adder 1:  {c1, t1} = q1 + q2
//   adder 2:  {c2, t2} = t1 + {H zeros, q0[2H-1:H]}
//   adder 3:  p[4H-1:2H] = q3 + {H-1 zeros, c1 | c2, t2[2H-1:H]}
//   p[2H-1:H] = t2[H-1:0],  p[H-1:0] = q0[H-1:0]
// c1 and c2 both carry weight 2^(3H) and can never both be 1 (the middle sum
// q1 + q2 + q0/2^H is below 2^(2H+1)), so one OR merges them into the third
// adder. Adder 3 cannot overflow. p = a*b, unsigned. Combinational.
// The three-adder arrangement follows the published 16-bit structure; the OR
// that merges c2 is this design's addition, needed for an exact product.
module vedic_combine_rca #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);
  logic [2*H-1:0] t1, t2, t3;
  logic           c1, c2, c3;

  rca #(.N(2*H)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .s(t1), .cout(c1));
  rca #(.N(2*H)) u_add2 (.a(t1), .b({{H{1'b0}}, q0[2*H-1:H]}), .cin(1'b0), .s(t2), .cout(c2));
  rca #(.N(2*H)) u_add3 (.a(q3), .b({{(H-1){1'b0}}, c1 | c2, t2[2*H-1:H]}), .cin(1'b0),
                         .s(t3), .cout(c3));

  // c3 is always 0: q3 + (middle carry) stays below 2^(2H).
  assign p = {t3, t2[H-1:0], q0[H-1:0]};
endmodule
