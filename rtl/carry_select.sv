// carry_select: carry selection (CS) unit of the reduced area-delay-power
// carry select adder.
//
// Picks the final carry word c from the two candidate words: c1_0 when cin is
// 0, c1_1 when cin is 1. Because c1_0[i] = 1 always implies c1_1[i] = 1, the
// n-bit 2:1 multiplexer reduces to one AND-OR gate per bit:
//   c[i] = c1_0[i] | (c1_1[i] & cin)
// which is the structure of the unit's logic diagram. cout is c[N-1].
// Combinational.
module carry_select #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] c1_0,
  input  logic [N-1:0] c1_1,
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         cout
);
  always_comb begin
    c    = c1_0 | (c1_1 & {N{cin}});
    cout = c[N-1];
  end
endmodule
