// vedic_2x2: 2x2-bit Vedic (Urdhva Tiryakbhyam, "vertically and crosswise")
// multiplier, the basic cell of the larger Vedic multipliers.
//
// Four AND gates form the bit products; two half adders combine them:
//   r[0]   = a0 b0                                   (vertical, right)
//   r[1]   = a1 b0 ^ a0 b1,   k = a1 b0 & a0 b1      (crosswise)
//   r[3:2] = a1 b1 + k                               (vertical, left)
// r = a * b, unsigned, 4 bits. Combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] r
);
  logic p00, p01, p10, p11, k;
  always_comb begin
    p00  = a[0] & b[0];
    p10  = a[1] & b[0];
    p01  = a[0] & b[1];
    p11  = a[1] & b[1];
    r[0] = p00;
    r[1] = p10 ^ p01;      // first half adder
    k    = p10 & p01;
    r[2] = p11 ^ k;        // second half adder
    r[3] = p11 & k;
  end
endmodule
