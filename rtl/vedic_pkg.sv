// Package vedic_pkg: shared constants and elaboration-time helpers.
//
// The square-root carry-select adders (csla_bec, csla_adp) split a W-bit
// addition into groups whose widths grow by one bit from one group to the
// next, so that the ripple delay inside a group is roughly matched by the
// multiplexer chain that brings the carry to it. For 16 bits this gives the
// five groups 2, 2, 3, 4 and 5 bits, least significant first. For other
// widths the same rule is continued (2, 2, 3, 4, 5, 6, ...) and the last group
// is cut to what is left. The functions below give a group's position and
// width; they are used only in parameter and generate expressions.
package vedic_pkg;

  // Nominal width of group g: 2, 2, 3, 4, 5, ...
  function automatic int csla_nom_width(input int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Least significant bit of group g.
  function automatic int csla_grp_lsb(input int g);
    return (g == 0) ? 0 : 2 + ((g - 1) * (g + 2)) / 2;
  endfunction

  // Number of groups needed to cover w bits.
  function automatic int csla_num_groups(input int w);
    int g;
    g = 0;
    while (csla_grp_lsb(g) < w) g++;
    return g;
  endfunction

  // Actual width of group g in a w-bit adder (the last group may be short).
  function automatic int csla_grp_width(input int w, input int g);
    int rem;
    rem = w - csla_grp_lsb(g);
    return (rem < csla_nom_width(g)) ? rem : csla_nom_width(g);
  endfunction

  // Fraction bits of the activation output: y is unsigned with 8 fraction
  // bits, so 1.0 is 256.
  localparam int unsigned ACT_OUT_FRAC = 8;

endpackage
