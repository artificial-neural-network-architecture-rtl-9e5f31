// vedic_4x4: 4x4-bit unsigned Vedic multiplier.
//
// Splits each operand into 2-bit halves, forms the four cross products with
// vedic_2x2 cells (aL*bL, aH*bL, aL*bH, aH*bH) and adds them with
// vedic_combine_rca (three 4-bit ripple carry adders). p = a*b. Combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  vedic_2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .r(q0));
  vedic_2x2 u_q1 (.a(a[3:2]), .b(b[1:0]), .r(q1));
  vedic_2x2 u_q2 (.a(a[1:0]), .b(b[3:2]), .r(q2));
  vedic_2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .r(q3));
  vedic_combine_rca #(.H(2)) u_add (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
