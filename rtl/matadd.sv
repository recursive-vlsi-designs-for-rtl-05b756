// matadd: column-serial matrix adder (or subtractor, SUB=1).
//
// The two operands arrive column by column on N wires each, in the same cycles.
// One adding element per row combines the two words of that row, so a result
// column leaves one cycle after its operands entered (the unit delay of the
// source design) and the output keeps the column-serial format, which lets
// the adder sit between multipliers and inverters. a_valid and b_valid must
// agree; an assertion checks it.
module matadd
  import matinv_pkg::*;
#(
  parameter int N   = 4,
  parameter bit SUB = 1'b1   // 1: a - b, 0: a + b
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_valid,
  input  word_t a_col  [N],
  input  logic  b_valid,
  input  word_t b_col  [N],
  output logic  out_valid,
  output word_t out_col [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    add_elem u_add (.clk(clk), .sub(SUB), .a(a_col[i]), .b(b_col[i]), .y(out_col[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= a_valid;
  end

  a_operands_aligned: assert property (@(posedge clk) disable iff (!rst_n) a_valid == b_valid)
    else $error("matadd: operand columns out of step");
endmodule
