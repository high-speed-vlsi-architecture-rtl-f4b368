// One-bit full adder, the "fa" cell of every ripple carry adder in the design.
//
// Purely combinational: sum = a ^ b ^ ci, co = majority(a, b, ci), written as
// a generate/propagate pair. No clock, no state. The architecture only
// names the cell; this textbook form is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (p & ci);
  end

endmodule
