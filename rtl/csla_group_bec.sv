// csla_group_bec: one carry select group of the BEC-based square-root CSLA.
//
// An N-bit ripple carry adder computes {c, a + b} with carry in 0; an
// (N+1)-bit binary-to-excess-1 converter turns that into the result for carry
// in 1; a (2N+2):(N+1) multiplexer driven by the group's carry in picks one.
// For a 5-bit group that is the 5-bit RCA, 6-bit BEC and "Mux 12:6" of the
// published 16-bit adder. {cout, s} = a + b + cin. Combinational.
module csla_group_bec #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] s_r;
  logic         c_r;
  logic [N:0]   r1;

  rca #(.N(N))   u_rca (.a(a), .b(b), .cin(1'b0), .s(s_r), .cout(c_r));
  bec #(.N(N+1)) u_bec (.x({c_r, s_r}), .y(r1));

  assign {cout, s} = cin ? r1 : {c_r, s_r};
endmodule
