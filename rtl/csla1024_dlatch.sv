// 1024-bit carry select adder built from 16-bit D-latch CSLA slices.
//
// WIDTH / 16 copies of csla16_dlatch are chained: slice k adds bits
// [16k+15:16k] and its carry-out is the carry-in of slice k+1, so the
// carry path of the whole adder crosses, per slice, the 2-bit ripple adder
// of the least significant group and one multiplexer in each of the four
// upper groups. Every group of every slice has its own D latches, all
// enabled by en.
//
// Interface: {cout, sum} = a + b + cin, WIDTH bits. WIDTH must be a
// multiple of 16; its default, 1024, is the adder size of the design.
// Timing: en is the clock. Hold a, b and cin for one en period, high phase
// first (every group stores its carry-in-1 result), and read sum and cout
// at the end of the low phase. One addition per en period.
//
// The group layout at both ends of the word (2-bit ripple group at bits
// [1:0], a 5-bit group at bits [1023:1019]) is that of the reference
// architecture; building the full width as identical 16-bit slices, and
// the cin port, are this design's reading of it. There are no registers.
module csla1024_dlatch
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 1024
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned SLICES = WIDTH / SLICE_W;

  if (WIDTH % SLICE_W != 0 || SLICES == 0) begin : g_bad_width
    $error("csla1024_dlatch: WIDTH must be a non-zero multiple of 16");
  end

  // c[k] is the carry into slice k.
  logic [SLICES:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    csla16_dlatch u_slice (
      .a   (a[k*SLICE_W +: SLICE_W]),
      .b   (b[k*SLICE_W +: SLICE_W]),
      .cin (c[k]),
      .en  (en),
      .sum (sum[k*SLICE_W +: SLICE_W]),
      .cout(c[k+1])
    );
  end

  assign cout = c[SLICES];

endmodule
