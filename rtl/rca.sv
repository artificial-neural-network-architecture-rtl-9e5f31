// rca: N-bit ripple carry adder built from a chain of full_adder cells.
//   {cout, s} = a + b + cin, the carry rippling from bit 0 to bit N-1.
// Used for the partial-product additions of the 4x4 and 8x8 Vedic
// multipliers and inside the BEC-based carry select groups. Combinational;
// delay is N full-adder carry stages.
module rca #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule
