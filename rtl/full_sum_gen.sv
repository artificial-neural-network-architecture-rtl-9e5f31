// full_sum_gen: full sum generation (FSG) unit of the reduced area-delay-power
// carry select adder.
//
// The LSB of the half sum is XORed with the block carry in; each higher half
// sum bit is XORed with the final carry of the bit below it:
//   s[0] = s0[0] ^ cin
//   s[i] = s0[i] ^ c[i-1]     for 1 <= i <= N-1
// The MSB of the carry word is not used here; it leaves the adder as cout.
// One XOR per bit, as in the unit's logic diagram. Combinational.
module full_sum_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);
  always_comb begin
    s[0] = s0[0] ^ cin;
    for (int i = 1; i < N; i++)
      s[i] = s0[i] ^ c[i-1];
  end
endmodule
