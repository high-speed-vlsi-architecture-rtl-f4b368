// Shared constants of the D-latch carry select adder.
//
// The adder is organised in 16-bit slices. Each slice is a square-root
// carry select adder of five groups: a 2-bit ripple carry adder at the least
// significant end, then D-latch groups of 2, 3, 4 and 5 bits (bits [1:0],
// [3:2], [6:4], [10:7], [15:11]). The slice width and the group widths are
// the ones of the 16-bit adder the design is based on; group_lsb() gives the
// bit position where a group starts inside its slice.
package csla_pkg;

  localparam int unsigned SLICE_W    = 16;
  localparam int unsigned NUM_GROUPS = 5;

  typedef int unsigned group_w_t [NUM_GROUPS];
  localparam group_w_t GROUP_W = '{2, 2, 3, 4, 5};

  // Bit position inside the slice of the least significant bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += GROUP_W[i];
    return lsb;
  endfunction

endpackage
