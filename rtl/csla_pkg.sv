// csla_pkg: shared types and the group layout of the carry-select adders.
//
// A 16-bit carry-select adder (CSLA) section is cut into groups. The lowest
// group is a plain ripple-carry adder that takes the section's carry-in; every
// higher group produces its result for both possible carry-ins and lets the
// carry coming out of the group below pick one.
//
// Two layouts are provided:
//   GROUP_SQRT   : five groups of 2, 2, 3, 4 and 5 bits (square-root CSLA).
//                  The 2-bit bottom group, the 2-bit second group (bits 2..3)
//                  and the 14 bits above them follow the description of the
//                  design; the 3/4/5 split of those 14 bits is the usual
//                  square-root progression and is a choice of this design.
//   GROUP_LINEAR : four equal groups of 4 bits (linear CSLA), as drawn for the
//                  16-bit modified adder (3:0, 7:4, 11:8, 15:12).
// Wider adders are built by cascading 16-bit sections. An 8-bit adder keeps
// the groups of the 16-bit layout that fit below bit 8 and adds the remaining
// top bit(s) with a ripple-carry adder (for GROUP_SQRT: 2 + 2 + 3 bits and a
// full adder for bit 7).
package csla_pkg;

  typedef enum logic {
    GROUP_SQRT   = 1'b0,
    GROUP_LINEAR = 1'b1
  } grouping_e;

  // Width of one section; wider adders cascade sections of this width.
  localparam int unsigned SECTION_W = 16;

  // Number of groups in one 16-bit section.
  function automatic int unsigned n_groups(grouping_e g);
    return (g == GROUP_SQRT) ? 5 : 4;
  endfunction

  // Width of group i (0 = least significant) in one 16-bit section.
  function automatic int unsigned group_width(grouping_e g, int unsigned i);
    if (g == GROUP_LINEAR) return 4;
    return (i == 0) ? 2 : i + 1;
  endfunction

  // Bit position of the least significant bit of group i.
  function automatic int unsigned group_lsb(grouping_e g, int unsigned i);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned k = 0; k < i; k++) lsb += group_width(g, k);
    return lsb;
  endfunction

  // Number of whole groups of the 16-bit layout that fit in a section of
  // width w (w <= 16).
  function automatic int unsigned groups_in(grouping_e g, int unsigned w);
    int unsigned n;
    n = 0;
    while (n < n_groups(g) && group_lsb(g, n) + group_width(g, n) <= w) n++;
    return n;
  endfunction

endpackage
