// W-bit 2:1 multiplexer: y = sel ? d1 : d0.
//
// In the carry select groups, d1 carries the latched carry-in-1 result and
// d0 the live carry-in-0 result of the group's ripple adder; sel is the
// carry arriving from the group below. Combinational. One multiplexer of
// width N+1 per group stands for the per-bit multiplexers of the reference
// drawings; the default width of 1 is this design's choice.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
