// matinv_det_top: the matrix inversion network and the determinant network side
// by side on one input.
//
// An N x N positive definite matrix enters column by column, last column first,
// one column per cycle with in_valid set for N cycles. The inversion network
// returns A^-1 in the same column-serial format inv_lat(N) cycles after the
// first input column; the determinant network returns Det(A) on det, valid for
// one cycle, det_lat(N) cycles after it. Words are signed fixed point (see
// matinv_pkg). A new matrix may enter once both results have left. Sharing the
// input between the two networks is this design's choice.
module matinv_det_top
  import matinv_pkg::*;
#(
  parameter int N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_col  [N],
  output logic  out_valid,
  output word_t out_col [N],
  output logic  det_valid,
  output word_t det
);
  matinv #(.N(N)) u_inv (.clk, .rst_n, .in_valid, .in_col, .out_valid, .out_col);
  matdet #(.N(N)) u_det (.clk, .rst_n, .in_valid, .in_col, .out_valid(det_valid), .det);
endmodule
