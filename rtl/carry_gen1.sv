// carry_gen1: carry generation unit CG1 of the reduced area-delay-power carry
// select adder, specialised for an input carry of 1.
//
// c1_1[i] is the carry out of bit i when the block's carry in is 1:
//   c1_1[0] = c0[0] | s0[0]                      (carry in fixed at 1)
//   c1_1[i] = c0[i] | (s0[i] & c1_1[i-1])        for i >= 1
// Only bit 0 differs from CG0: with the carry in tied to 1 its AND gate
// reduces to a wire. The published description gives the function of this unit
// (full carry word for input carry 1, optimised for the fixed carry); the
// gate-level form above is the direct consequence and this design's reading.
// Combinational.
module carry_gen1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_1
);
  assign c1_1[0] = c0[0] | s0[0];
  for (genvar i = 1; i < N; i++) begin : g_chain
    assign c1_1[i] = c0[i] | (s0[i] & c1_1[i-1]);
  end
endmodule
