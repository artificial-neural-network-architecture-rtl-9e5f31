// bec: N-bit binary to excess-1 converter, y = x + 1 (mod 2^N).
//
// Bit i flips when all bits below it are 1:
//   y[0] = ~x[0],  y[i] = x[i] ^ (x[0] & ... & x[i-1])
// It replaces the second (carry in = 1) ripple carry adder of a carry select
// group with fewer gates. The published text gives only its role; this
// NOT/XOR/AND-chain form is the usual one and this design's choice.
// Combinational.
module bec #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  logic [N-1:0] all1;   // all1[i] = AND of x[i-1:0]
  assign all1[0] = 1'b1;
  for (genvar i = 1; i < N; i++) begin : g_chain
    assign all1[i] = all1[i-1] & x[i-1];
  end
  assign y = x ^ all1;
endmodule
