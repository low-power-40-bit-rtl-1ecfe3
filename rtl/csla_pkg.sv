// csla_pkg: group layout of the square-root carry select adder.
//
// A square-root CSLA splits a WIDTH-bit addition into groups whose widths
// grow by one bit per group, so that each group's local sum is ready at about
// the moment the carry from the groups below reaches its select input.
// The 16-bit adder this design is built around uses groups of 2, 2, 3, 4 and
// 5 bits (LSB first). The same rule is continued here for wider adders
// (2, 2, 3, 4, 5, 6, 7, 8, ...) and the last group is cut to whatever bits
// remain; for the 40-bit default that gives 2, 2, 3, 4, 5, 6, 7, 8, 3.
// The continuation beyond 16 bits and the cut last group are this design's
// own choice; only the 16-bit layout is given by the source description.
package csla_pkg;

  // Largest number of groups any supported width can need (2+2+3+...+k).
  localparam int MAX_GROUPS = 64;

  // Nominal width of group k (k = 0 is the least significant group).
  function automatic int nominal_group_width(input int k);
    return (k < 2) ? 2 : k + 1;
  endfunction

  // Bit position of the least significant bit of group k.
  function automatic int group_lsb(input int k);
    int s;
    s = 0;
    for (int i = 0; i < k; i++) s += nominal_group_width(i);
    return s;
  endfunction

  // Number of groups needed to cover a width-bit adder.
  function automatic int num_groups(input int width);
    int n;
    n = 0;
    for (int k = 0; k < MAX_GROUPS; k++)
      if (group_lsb(k) < width) n = k + 1;
    return n;
  endfunction

  // Actual width of group k of a width-bit adder (the last group may be cut).
  function automatic int group_width(input int width, input int k);
    int rem;
    rem = width - group_lsb(k);
    return (rem < nominal_group_width(k)) ? rem : nominal_group_width(k);
  endfunction

endpackage
