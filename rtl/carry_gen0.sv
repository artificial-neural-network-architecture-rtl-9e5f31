// carry_gen0: carry generation unit CG0 of the reduced area-delay-power carry
// select adder, specialised for an input carry of 0.
//
// From the half sum s0 and half carry c0 words it forms the full carry word
// c1_0, where c1_0[i] is the carry out of bit i when the block's carry in is 0:
//   c1_0[0] = c0[0]
//   c1_0[i] = c0[i] | (s0[i] & c1_0[i-1])        for i >= 1
// i.e. an AND-OR chain, one AND and one OR per bit above bit 0, matching the
// unit's logic diagram. Combinational; delay grows linearly with N.
module carry_gen0 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_0
);
  assign c1_0[0] = c0[0];
  for (genvar i = 1; i < N; i++) begin : g_chain
    assign c1_0[i] = c0[i] | (s0[i] & c1_0[i-1]);
  end
endmodule
