// ann_pkg: types and constant functions shared by the adder, multiplier and
// neuron modules.
//
// adder_style_e selects how each carry-select group of sqrt_csla is built:
//   ADDER_ADP - reduced area-delay-power CSLA group (half sum generation,
//               two carry generators, AND-OR carry selection, full sum
//               generation). This is the proposed adder and the default.
//   ADDER_BEC - ripple carry adder plus binary-to-excess-1 converter and a
//               2:1 multiplexer, the classic BEC-based square-root CSLA.
//
// The square-root grouping is a first group of 2 bits followed by groups of
// 2, 3, 4, 5, ... bits, which for 16 bits gives 2-2-3-4-5. Wider adders keep
// growing the group size by one and clip the last group to the width.
package ann_pkg;

  typedef enum logic [0:0] {
    ADDER_ADP = 1'b0,
    ADDER_BEC = 1'b1
  } adder_style_e;

  // Lowest bit index of carry-select group g (g = 0 is the first 2-bit group).
  function automatic int csla_grp_lo(int g);
    if (g == 0) return 0;
    return 2 + ((g - 1) * (g + 2)) / 2;
  endfunction

  // Number of groups needed to cover a width of w bits.
  function automatic int csla_num_groups(int w);
    int g;
    g = 1;
    while (csla_grp_lo(g) < w) g++;
    return g;
  endfunction

  // One past the highest bit index of group g, clipped to the width w.
  function automatic int csla_grp_hi(int g, int w);
    int h;
    h = csla_grp_lo(g + 1);
    return (h < w) ? h : w;
  endfunction

endpackage
