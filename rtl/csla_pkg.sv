// csla_pkg: group partition of the square-root carry-select adder.
//
// The adder is cut into groups that grow by one bit each: group 0 is a
// plain 2-bit ripple-carry adder, and group k (k >= 1) is k+1 bits wide.
// For 16 bits this gives 2 + 2 + 3 + 4 + 5 = 16, the five blocks of the
// 16-bit design. The widths follow from the per-block transistor counts
// of the design (56, 98, 146, 194, 242, together 736); the general rule
// "grow by one, clip the last group" for other widths is this
// implementation's own choice. Only constant functions live here; they
// are evaluated at elaboration time.
package csla_pkg;

  // Nominal width of group k before clipping.
  function automatic int grp_nominal(input int k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Bit position of the least significant bit of group k.
  function automatic int grp_lsb(input int k);
    int lsb;
    lsb = 0;
    for (int i = 0; i < k; i++) lsb += grp_nominal(i);
    return lsb;
  endfunction

  // Number of groups needed to cover `width` bits.
  function automatic int num_groups(input int width);
    int k;
    k = 0;
    while (grp_lsb(k) < width) k++;
    return k;
  endfunction

  // Actual width of group k in a `width`-bit adder (the last one is clipped).
  function automatic int grp_width(input int k, input int width);
    int w;
    w = grp_nominal(k);
    if (grp_lsb(k) + w > width) w = width - grp_lsb(k);
    return w;
  endfunction

endpackage
