// full_adder: one-bit full adder, the cell of the ripple carry adders.
//   s = a ^ b ^ cin,  cout = majority(a, b, cin). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
