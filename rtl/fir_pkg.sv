// fir_pkg: types and helper functions shared by the three-parallel
// symmetric FIR filter and its improved carry select adder.
//
// sub_kind_e selects how a sub-filter is built: a plain length-M filter
// (one multiplier per tap), a symmetric one, or an antisymmetric one (both of
// the latter use one multiplier per pair of mirrored taps).
//
// The carry select adder is split into groups whose widths grow by one bit
// per group, starting 2, 2, 3, 4, 5, ... as in the 16-bit adder (groups
// [1:0], [3:2], [6:4], [10:7], [15:11]). For other widths the same sequence is
// used and the last group is cut to what is left, which gives the usual
// 2,2,3,4,5,6,7,3 split for 32 bits. That rule for other widths is this
// design's own choice.
package fir_pkg;

  typedef enum logic [1:0] {
    SUB_GENERAL       = 2'd0,
    SUB_SYMMETRIC     = 2'd1,
    SUB_ANTISYMMETRIC = 2'd2
  } sub_kind_e;

  // Nominal width of carry select group g (before cutting to the adder width).
  function automatic int csla_nominal_width(int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Bit position where group g starts.
  function automatic int csla_group_lsb(int g);
    int lsb = 0;
    for (int i = 0; i < g; i++) lsb += csla_nominal_width(i);
    return lsb;
  endfunction

  // Number of groups for an adder of width w.
  function automatic int csla_num_groups(int w);
    int g = 0;
    while (csla_group_lsb(g) < w) g++;
    return g;
  endfunction

  // Actual width of group g in an adder of width w.
  function automatic int csla_group_width(int w, int g);
    int lsb = csla_group_lsb(g);
    int nw  = csla_nominal_width(g);
    return (lsb + nw > w) ? (w - lsb) : nw;
  endfunction

endpackage
