// adp_csla: N-bit reduced area-delay-power carry select adder block.
//
// Four units in a row:
//   half_sum_gen  (HSG) - half sum s0 = a ^ b and half carry c0 = a & b
//   carry_gen0    (CG0) - full carry word assuming carry in 0
//   carry_gen1    (CG1) - full carry word assuming carry in 1
//   carry_select  (CS)  - AND-OR pick of the carry word by cin
//   full_sum_gen  (FSG) - sum = s0 ^ {c[N-2:0], cin}
// HSG, CG0 and CG1 do not depend on cin, so when this block is a group of a
// square-root CSLA they run in parallel with the lower groups and only the
// CS and FSG stages wait for the incoming carry. {cout, s} = a + b + cin.
// Combinational. The unit split and connections follow the published system
// architecture; the width default is this design's choice.
module adp_csla #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] s0, c0, c1_0, c1_1, c;

  half_sum_gen #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  carry_gen0   #(.N(N)) u_cg0 (.s0(s0), .c0(c0), .c1_0(c1_0));
  carry_gen1   #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c1_1(c1_1));
  carry_select #(.N(N)) u_cs  (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c), .cout(cout));
  full_sum_gen #(.N(N)) u_fsg (.s0(s0), .c(c), .cin(cin), .s(s));
endmodule
