// half_sum_gen: half sum generation (HSG) unit of the reduced area-delay-power
// carry select adder.
//
// For every bit position i it forms the half sum s0[i] = a[i] ^ b[i] and the
// half carry c0[i] = a[i] & b[i], i.e. one XOR and one AND gate per bit, as in
// the unit's logic diagram. Both words are N bits wide. Purely combinational.
// The gate structure follows the published unit; the width parameter default
// is this design's choice.
module half_sum_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,   // half sum word
  output logic [N-1:0] c0    // half carry word
);
  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end
endmodule
