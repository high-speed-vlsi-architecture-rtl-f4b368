// Gated (level-sensitive) D latch with true and complement outputs.
//
// While the enable e is 1 the latch is transparent and q follows d; when e
// falls to 0, q keeps the value d had just before the fall. The circuit it
// stands for is the classic gated D latch (input gates steered by e ahead
// of a cross-coupled storage pair); it is written here at the behavioural
// level, which maps to one latch cell, instead of as a loop of gates. The
// latch is intended: it is the storage element of the design, so
// the latch the tools report for this module is expected. There is no reset;
// the carry select groups always write the latch (e = 1) before reading it.
module d_latch (
  input  logic d,
  input  logic e,
  output logic q,
  output logic qn
);

  logic state;

  always_latch begin
    if (e) state = d;
  end

  assign q  = state;
  assign qn = ~state;

endmodule
