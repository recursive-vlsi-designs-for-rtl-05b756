// add_elem: the adding element. Registers a + b (or a - b when sub is set)
// with saturation, one clock of latency, no reset (the value is qualified by
// the valid bit of the enclosing matrix adder).
module add_elem
  import matinv_pkg::*;
(
  input  logic  clk,
  input  logic  sub,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  always_ff @(posedge clk)
    y <= sat(sub ? wide_t'(a) - wide_t'(b) : wide_t'(a) + wide_t'(b));
endmodule
