// One carry select group of the D-latch CSLA: N full adders, N+1 D latches
// and N+1 2:1 multiplexers.
//
// A conventional carry select group holds two ripple adders, one computing
// the group sum for carry-in 0 and one for carry-in 1. Here a single ripple
// adder does both, one after the other, steered by the enable en (the
// clock): its carry-in is en itself.
//   en = 1  the adder computes a + b + 1; the N+1 latches ({carry, sum}) are
//           transparent and take that result.
//   en = 0  the adder computes a + b + 0; the latches hold the carry-in-1
//           result computed in the high phase.
// The multiplexers then choose with the real group carry-in c_in: the
// latched word when c_in = 1, the live adder word when c_in = 0.
//
// Timing: a and b must be stable over one whole en period, high phase first.
// sum and cout are valid during the low phase of en, once the carry into
// the group has settled; during the high phase they are only right when
// c_in = 1. The latches are intended storage (see d_latch).
//
// The en-driven carry-in, the latches and the select sense follow the
// reference architecture. Latching the group carry as well as the N sum
// bits (N+1 latches) follows its group drawings; with only N latches the
// group carry could not be selected.
module dlatch_group #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         en,    // enable = clock; also the adder's carry-in
  input  logic         c_in,  // actual carry into the group, mux select
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] live;     // {carry, sum} of the ripple adder, carry-in = en
  logic [N:0] held;     // {carry, sum} kept by the latches (carry-in 1)
  logic [N:0] unused_qn;

  rca #(.N(N)) u_rca (
    .a   (a),
    .b   (b),
    .cin (en),
    .sum (live[N-1:0]),
    .cout(live[N])
  );

  for (genvar i = 0; i <= N; i++) begin : g_latch
    d_latch u_lat (
      .d (live[i]),
      .e (en),
      .q (held[i]),
      .qn(unused_qn[i])
    );
  end

  mux2 #(.W(N + 1)) u_mux (
    .d0 (live),
    .d1 (held),
    .sel(c_in),
    .y  ({cout, sum})
  );

endmodule
