// vedic_16x16: 16x16-bit unsigned Vedic multiplier whose partial products
// are added by square-root carry select adders.
//
// Four vedic_8x8 blocks produce
//   q0 = a[7:0]*b[7:0],  q1 = a[15:8]*b[7:0],
//   q2 = a[7:0]*b[15:8], q3 = a[15:8]*b[15:8]          (16 bits each)
// and three sqrt_csla adders form the tree
//   left  (24 bit):  l = {q3, 8'h00} + {8'h00, q2}
//   right (16 bit):  r = q1 + {8'h00, q0[15:8]}
//   final (24 bit):  p[31:8] = l + r
//   p[7:0] = q0[7:0]
// None of the three can overflow, so their carries out are unused. The two
// first-level adders work in parallel. p = a*b. Combinational.
// The operand layout follows the published block diagram. That diagram calls
// the last adder 16 bits wide; it is 24 bits here because p[31:8] is 24 bits.
// STYLE selects the carry-select group type of all three adders.
module vedic_16x16
  import ann_pkg::*;
#(
  parameter adder_style_e STYLE = ADDER_ADP
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;
  logic [23:0] l, f;
  logic [15:0] r;
  logic        cl, cr, cf;   // carries out, always 0 (see header)

  vedic_8x8 u_q0 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_8x8 u_q1 (.a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic_8x8 u_q2 (.a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic_8x8 u_q3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  sqrt_csla #(.WIDTH(24), .STYLE(STYLE)) u_left (
    .a({q3, 8'h00}), .b({8'h00, q2}), .cin(1'b0), .s(l), .cout(cl));
  sqrt_csla #(.WIDTH(16), .STYLE(STYLE)) u_right (
    .a(q1), .b({8'h00, q0[15:8]}), .cin(1'b0), .s(r), .cout(cr));
  sqrt_csla #(.WIDTH(24), .STYLE(STYLE)) u_final (
    .a(l), .b({8'h00, r}), .cin(1'b0), .s(f), .cout(cf));

  assign p = {f, q0[7:0]};
endmodule
