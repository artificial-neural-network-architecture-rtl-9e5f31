// sqrt_csla: WIDTH-bit square-root carry select adder.
//
// The operands are cut into groups of 2, 2, 3, 4, 5, ... bits from the LSB
// (2-2-3-4-5 for the 16-bit adder; wider adders keep growing the group by one
// bit and clip the last group). The first group is a plain 2-bit adder fed by
// cin. Every other group prepares its sum for both possible carries in
// parallel and only selects once the carry of the group below arrives, so
// the carry path crosses one selection stage per group rather than one full
// adder per bit. Group sizes grow because each higher group has more time to
// prepare its candidates.
//
// STYLE picks how each group is built (ann_pkg::adder_style_e):
//   ADDER_ADP (default) - adp_csla: half sum, two carry generators, AND-OR
//                         carry selection, full sum generation. In this style
//                         the first group is also an adp_csla.
//   ADDER_BEC           - csla_group_bec: RCA + BEC + multiplexer; the first
//                         group is a 2-bit rca.
// {cout, s} = a + b + cin in both styles. Combinational.
// The grouping and both group styles follow the published adders; the
// continuation of the group sizes beyond 16 bits is this design's choice.
module sqrt_csla
  import ann_pkg::*;
#(
  parameter int unsigned  WIDTH = 16,
  parameter adder_style_e STYLE = ADDER_ADP
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int NG = csla_num_groups(WIDTH);

  logic [NG:0] gc;   // gc[g] is the carry into group g
  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = csla_grp_lo(g);
    localparam int HI = csla_grp_hi(g, WIDTH);
    localparam int GW = HI - LO;
    if (STYLE == ADDER_ADP) begin : g_adp
      adp_csla #(.N(GW)) u_grp (
        .a(a[HI-1:LO]), .b(b[HI-1:LO]), .cin(gc[g]), .s(s[HI-1:LO]), .cout(gc[g+1]));
    end else if (g == 0) begin : g_first
      rca #(.N(GW)) u_grp (
        .a(a[HI-1:LO]), .b(b[HI-1:LO]), .cin(gc[g]), .s(s[HI-1:LO]), .cout(gc[g+1]));
    end else begin : g_bec
      csla_group_bec #(.N(GW)) u_grp (
        .a(a[HI-1:LO]), .b(b[HI-1:LO]), .cin(gc[g]), .s(s[HI-1:LO]), .cout(gc[g+1]));
    end
  end

  assign cout = gc[NG];
endmodule
