// csla_pkg: group layout of the square-root carry-select adder.
//
// The adder splits its operands into a low ripple-carry part of RCA_WIDTH
// bits followed by carry-select groups whose widths grow by one bit per
// group: RCA_WIDTH, RCA_WIDTH+1, RCA_WIDTH+2, ... For the 16-bit adder with a
// 2-bit ripple part this gives groups of 2, 3, 4 and 5 bits on bits 3:2, 6:4,
// 10:7 and 15:11, which is the published 16-bit arrangement. For other widths
// the same rule is continued and the last group takes whatever bits remain;
// that continuation is this design's own choice. The functions are constant
// functions, used at elaboration time by the adder and by its testbenches.
package csla_pkg;

  // Width a group would have before the last one is cut to fit.
  function automatic int unsigned nominal_width(int unsigned rca_width, int unsigned g);
    return rca_width + g;
  endfunction

  // Number of carry-select groups above the ripple-carry part.
  function automatic int unsigned num_groups(int unsigned width, int unsigned rca_width);
    int unsigned used = rca_width;
    int unsigned n = 0;
    while (used < width) begin
      used += nominal_width(rca_width, n);
      n++;
    end
    return n;
  endfunction

  // Least significant bit position of group g.
  function automatic int unsigned group_lsb(int unsigned rca_width, int unsigned g);
    int unsigned lsb = rca_width;
    for (int unsigned k = 0; k < g; k++) lsb += nominal_width(rca_width, k);
    return lsb;
  endfunction

  // Width of group g, the last group cut to the operand width.
  function automatic int unsigned group_width(int unsigned width, int unsigned rca_width,
                                             int unsigned g);
    int unsigned lsb = group_lsb(rca_width, g);
    int unsigned w = nominal_width(rca_width, g);
    return (lsb + w > width) ? width - lsb : w;
  endfunction

endpackage
