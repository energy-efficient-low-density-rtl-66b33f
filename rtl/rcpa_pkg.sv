// rcpa_pkg: types and constants shared by the reverse carry propagate adder
// (RCPA) and the square-root carry select adder with binary to excess-1
// converters (SQRT CSLA-BEC).
//
// rcpfa_type_e names the three forecast-signal generators of the reverse
// carry propagate full-adder cell. The functions below give the group layout
// of the square-root carry select adder: group 0 is 2 bits wide, group g>0 is
// g+1 bits wide (2, 2, 3, 4, 5 for 16 bits); the last group is cut short when
// the width runs out. The group sizes are the usual square-root layout and are
// this design's choice; the forecast types follow the cell definitions.
package rcpa_pkg;

  // Forecast output F(i+1) of an RCPFA cell:
  //   RCPFA_I   : F = A          (one operand bit)
  //   RCPFA_II  : F = A & B      (carry generate)
  //   RCPFA_III : F = A | B      (carry alive)
  typedef enum logic [1:0] {
    RCPFA_I   = 2'd1,
    RCPFA_II  = 2'd2,
    RCPFA_III = 2'd3
  } rcpfa_type_e;

  // Nominal width of group g before truncation.
  function automatic int csla_nominal_size(input int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Least significant bit position of group g.
  function automatic int csla_group_lsb(input int g);
    int lsb;
    lsb = 0;
    for (int k = 0; k < g; k++) lsb += csla_nominal_size(k);
    return lsb;
  endfunction

  // Number of groups needed to cover `width` bits.
  function automatic int csla_num_groups(input int width);
    int n;
    n = 0;
    while (csla_group_lsb(n) < width) n++;
    return n;
  endfunction

  // Actual width of group g in an adder of `width` bits.
  function automatic int csla_group_size(input int g, input int width);
    int rest;
    rest = width - csla_group_lsb(g);
    return (csla_nominal_size(g) < rest) ? csla_nominal_size(g) : rest;
  endfunction

endpackage
