// mac_pe: the arithmetic processor of the systolic multiplier array.
//
// Each cycle with a_valid set it multiplies the word arriving from the left (a)
// by the word arriving from above (b) and adds the full-precision product to
// its accumulator (subtracts it when NEGATE is set). It forwards a, a_valid and
// b to its right and lower neighbours through one register each, which is the
// switching role of the node. clr empties the accumulator; result is the
// accumulator scaled back to the word format and saturated.
module mac_pe
  import matinv_pkg::*;
#(
  parameter bit NEGATE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  a_valid,
  input  word_t a_in,
  input  word_t b_in,
  output logic  a_valid_out,
  output word_t a_out,
  output word_t b_out,
  output word_t result
);
  wide_t  acc;
  dword_t prod;

  assign prod = dword_t'(a_in) * dword_t'(b_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      a_valid_out <= 1'b0;
    end else begin
      a_valid_out <= a_valid;
      if (clr)          acc <= '0;
      else if (a_valid) acc <= NEGATE ? acc - wide_t'(prod) : acc + wide_t'(prod);
    end
    a_out <= a_in;
    b_out <= b_in;
  end

  assign result = sat(acc >>> FRAC);
endmodule
