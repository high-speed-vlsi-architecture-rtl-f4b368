// N-bit ripple carry adder: {cout, sum} = a + b + cin.
//
// A chain of N full adders, the carry rippling from bit 0 upwards, so the
// delay grows linearly with N. In the 16-bit slice it is the 2-bit adder of
// the least significant group, the only group fed directly by the slice's
// carry-in; the D-latch groups use the same chain with their enable as
// carry-in. Combinational. The 2-bit default is the width of the lowest
// group in the reference architecture.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
