// vedic_8x8: 8x8-bit unsigned Vedic multiplier.
//
// Four vedic_4x4 blocks multiply the 4-bit halves (aL*bL, aH*bL, aL*bH,
// aH*bH); vedic_combine_rca adds the 8-bit partial products with three 8-bit
// ripple carry adders. p = a*b. Combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  vedic_4x4 u_q0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_q1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_4x4 u_q2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_4x4 u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));
  vedic_combine_rca #(.H(4)) u_add (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
