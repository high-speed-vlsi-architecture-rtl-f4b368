// 16-bit square-root carry select adder with D-latch groups.
//
// Five groups, widths 2, 2, 3, 4 and 5 bits from the least significant end
// (bits [1:0], [3:2], [6:4], [10:7], [15:11]). Group 0 is a plain 2-bit
// ripple carry adder fed by cin. Each upper group is a dlatch_group: its
// ripple adder computes the carry-in-1 result while en is high (kept in D
// latches) and the carry-in-0 result while en is low, and the carry out of
// the group below selects between them. The carry select chain therefore
// crosses one multiplexer per group instead of rippling through every bit.
//
// Interface: {cout, sum} = a + b + cin. en is the clock of the latches.
// Timing: a, b and cin are held for one en period, high phase first; the
// result is valid in the low phase (read it just before en rises again).
// One addition per en period.
//
// Group widths, the plain 2-bit lowest group and the carry-driven selects
// follow the reference 16-bit architecture; the port names are this
// design's own.
module csla16_dlatch
  import csla_pkg::*;
(
  input  logic [SLICE_W-1:0] a,
  input  logic [SLICE_W-1:0] b,
  input  logic               cin,
  input  logic               en,
  output logic [SLICE_W-1:0] sum,
  output logic               cout
);

  // c[g] is the carry into group g; c[NUM_GROUPS] is the slice carry-out.
  logic [NUM_GROUPS:0] c;

  assign c[0] = cin;

  rca #(.N(GROUP_W[0])) u_g0 (
    .a   (a[GROUP_W[0]-1:0]),
    .b   (b[GROUP_W[0]-1:0]),
    .cin (c[0]),
    .sum (sum[GROUP_W[0]-1:0]),
    .cout(c[1])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = GROUP_W[g];

    dlatch_group #(.N(W)) u_grp (
      .a   (a[LSB +: W]),
      .b   (b[LSB +: W]),
      .en  (en),
      .c_in(c[g]),
      .sum (sum[LSB +: W]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NUM_GROUPS];

endmodule
