// matdet: recursive determinant network for an N x N matrix (N a power of two)
// whose leading blocks are nonsingular, built on
//
//   A = [U V; W Z],   Det(A) = Det(U) * Det(Z - W U^-1 V).
//
// The input is column-serial on N words, last column first: V then U on the
// upper half, Z then W on the lower half. Switch nodes separate the blocks.
// U is inverted (matinv of size N/2), multiplied by V and then W U^-1 V is
// formed and subtracted from Z. Two determinant networks of size N/2 (this
// module, recursively) then take U and the Schur complement at the same time,
// U having waited in a delay line, and an arithmetic processor multiplies
// their two results. N = 1 returns the single element one cycle later.
//
// Timing: det is valid for one cycle, det_lat(N) cycles after the first input
// column (matinv_pkg). One determinant at a time. The structure follows the
// source design; the number format and the base case are this design's.
//
// Lint note: when this module is itself the top of a Verilator lint run, the
// outputs of its own size-N/2 instances are reported as undriven. That comes
// from the way the linter treats a top module that instantiates itself; under
// any other top (matinv_det_top, or a testbench) no such warning appears and
// simulation shows those outputs driven.
module matdet
  import matinv_pkg::*;
#(
  parameter int N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_col [N],
  output logic  out_valid,
  output word_t det
);
  if (N == 1) begin : g_base
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
      det <= in_col[0];
    end
  end else begin : g_rec
    localparam int H  = N / 2;
    localparam int TI = inv_lat(H);
    localparam int TM = mul_lat(H);

    word_t top_in [H], bot_in [H];
    for (genvar i = 0; i < H; i++) begin : g_split
      assign top_in[i] = in_col[i];
      assign bot_in[i] = in_col[H+i];
    end

    logic v_v, u_v, z_v, w_v;
    switch_node #(.N(H)) u_sw_top (.clk, .rst_n, .in_valid,
      .first_valid(v_v), .second_valid(u_v));
    switch_node #(.N(H)) u_sw_bot (.clk, .rst_n, .in_valid,
      .first_valid(z_v), .second_valid(w_v));

    // U^-1 and P = U^-1 V
    logic  ui_v, v1_v, p_v;
    word_t ui [H], v1 [H], p [H];
    matinv #(.N(H)) u_inv_u (.clk, .rst_n, .in_valid(u_v), .in_col(top_in),
      .out_valid(ui_v), .out_col(ui));
    delay_line #(.N(H), .DEPTH(H + TI)) u_dv1 (.clk, .rst_n, .in_valid(v_v), .in_col(top_in),
      .out_valid(v1_v), .out_col(v1));
    matmul #(.N(H)) u_mul_p (.clk, .rst_n, .a_valid(ui_v), .a_col(ui), .b_valid(v1_v), .b_col(v1),
      .out_valid(p_v), .out_col(p));

    // R = W P
    logic  w1_v, r_v;
    word_t w1 [H], r [H];
    delay_line #(.N(H), .DEPTH(TI + TM)) u_dw1 (.clk, .rst_n, .in_valid(w_v), .in_col(bot_in),
      .out_valid(w1_v), .out_col(w1));
    matmul #(.N(H)) u_mul_r (.clk, .rst_n, .a_valid(w1_v), .a_col(w1), .b_valid(p_v), .b_col(p),
      .out_valid(r_v), .out_col(r));

    // S = Z - R
    logic  z1_v, s_v;
    word_t z1 [H], s [H];
    delay_line #(.N(H), .DEPTH(H + TI + 2*TM)) u_dz1 (.clk, .rst_n, .in_valid(z_v), .in_col(bot_in),
      .out_valid(z1_v), .out_col(z1));
    matadd #(.N(H), .SUB(1'b1)) u_sub_s (.clk, .rst_n, .a_valid(z1_v), .a_col(z1),
      .b_valid(r_v), .b_col(r), .out_valid(s_v), .out_col(s));

    // Det(U) and Det(S), then their product
    logic  u1_v, du_v, ds_v;
    word_t u1 [H];
    word_t du, ds;
    delay_line #(.N(H), .DEPTH(TI + 2*TM + ADD_LAT)) u_du1 (.clk, .rst_n, .in_valid(u_v),
      .in_col(top_in), .out_valid(u1_v), .out_col(u1));
    matdet #(.N(H)) u_det_u (.clk, .rst_n, .in_valid(u1_v), .in_col(u1), .out_valid(du_v), .det(du));
    matdet #(.N(H)) u_det_s (.clk, .rst_n, .in_valid(s_v),  .in_col(s),  .out_valid(ds_v), .det(ds));

    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= du_v && ds_v;
      det <= fx_mul(du, ds);
    end

    a_dets_in_step: assert property (@(posedge clk) disable iff (!rst_n) du_v == ds_v)
      else $error("matdet: sub-determinants out of step");
  end
endmodule
