// mac_pkg: widths shared by the MAC unit and the group layout of the
// square-root carry select adder (SQRT-CSLA).
//
// The 16-bit SQRT-CSLA splits its operands, from the least significant end,
// into groups of 2, 2, 3, 4 and 5 bits. For any other width the same sequence
// 2, 2, 3, 4, 5, 6, ... is used and the last group is cut short to fit, so an
// 8-bit adder has groups of 2, 2, 3 and 1 bits and a 4-bit adder groups of
// 2 and 2. The 16-bit layout follows the published structure; the rule for
// other widths is this design's own.
package mac_pkg;

  // Operand width of the multiplier and width of its product.
  localparam int unsigned DATA_W = 8;
  localparam int unsigned PROD_W = 2 * DATA_W;
  // Accumulator width, the width of the accumulating adder.
  localparam int unsigned ACC_W  = 16;

  // Nominal width of group i: 2 for the two lowest groups, then i+1.
  function automatic int unsigned csla_nominal_w(int unsigned i);
    return (i == 0) ? 2 : i + 1;
  endfunction

  // Index of the lowest bit of group i in a WIDTH-bit adder.
  function automatic int unsigned csla_grp_lo(int unsigned width, int unsigned i);
    int unsigned lo;
    lo = 0;
    for (int unsigned j = 0; j < i; j++) begin
      lo += csla_nominal_w(j);
      if (lo >= width) return width;
    end
    return lo;
  endfunction

  // Width of group i in a WIDTH-bit adder (0 past the last group).
  function automatic int unsigned csla_grp_w(int unsigned width, int unsigned i);
    return csla_grp_lo(width, i + 1) - csla_grp_lo(width, i);
  endfunction

  // Number of groups in a WIDTH-bit adder.
  function automatic int unsigned csla_num_groups(int unsigned width);
    int unsigned n;
    n = 0;
    while (csla_grp_lo(width, n) < width) n++;
    return n;
  endfunction

endpackage
