// matinv: recursive inversion network for an N x N positive definite matrix
// (N a power of two), built on the block formulas
//
//   A = [U V; W Z],   C = U - V Z^-1 W,   D = Z - W U^-1 V,
//   A^-1 = [C^-1  X; Y  D^-1],   X = -U^-1 V D^-1,   Y = -Z^-1 W C^-1.
//
// Input and output are column-serial on N words, last column first, so the
// upper N/2 words carry V and then U, the lower N/2 words Z and then W, and the
// result leaves as X then C^-1 on the upper half and D^-1 then Y on the lower
// half. Switch nodes separate the two blocks of each half; V and Z, which come
// first, wait N/2 cycles so that all four blocks start together. Then:
//   U^-1, Z^-1           two inverters of size N/2 (this module, recursively)
//   P=U^-1 V, Q=Z^-1 W   two multipliers
//   V Q, W P             two multipliers
//   C, D                 two subtractors
//   C^-1, D^-1           two inverters
//   X=-P D^-1, Y=-Q C^-1 two negating multipliers
// with delay lines that hold each operand until its partner is ready. The
// output merge puts C^-1 (and Y) N/2 cycles behind X (and D^-1) on the same
// wires. N = 1 is a reciprocal.
//
// Timing: the first result column appears inv_lat(N) cycles after the first
// input column (matinv_pkg: T(N) = N/2 + 2T(N/2) + 3(2N-1) + 1), then N
// consecutive columns. One inversion at a time. The block structure, the
// delay lines and the input/output ordering follow the source design; the
// number format, the handshake and the reciprocal base case are this design's.
//
// Lint note: when this module is itself the top of a Verilator lint run, the
// outputs of its own size-N/2 instances are reported as undriven. That comes
// from the way the linter treats a top module that instantiates itself; under
// any other top (matinv_det_top, or a testbench) no such warning appears and
// simulation shows those outputs driven.
module matinv
  import matinv_pkg::*;
#(
  parameter int N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_col  [N],
  output logic  out_valid,
  output word_t out_col [N]
);
  if (N == 1) begin : g_base
    recip u_recip (.clk, .rst_n, .in_valid, .in_col, .out_valid, .out_col);
  end else begin : g_rec
    localparam int H  = N / 2;
    localparam int TI = inv_lat(H);
    localparam int TM = mul_lat(H);

    word_t top_in [H], bot_in [H];
    for (genvar i = 0; i < H; i++) begin : g_split
      assign top_in[i] = in_col[i];
      assign bot_in[i] = in_col[H+i];
    end

    // input switch nodes: V then U above, Z then W below
    logic v_raw_v, u_v, z_raw_v, w_v;
    switch_node #(.N(H)) u_sw_top (.clk, .rst_n, .in_valid,
      .first_valid(v_raw_v), .second_valid(u_v));
    switch_node #(.N(H)) u_sw_bot (.clk, .rst_n, .in_valid,
      .first_valid(z_raw_v), .second_valid(w_v));

    logic  v0_v, z0_v;
    word_t v0 [H], z0 [H];
    delay_line #(.N(H), .DEPTH(H)) u_dv0 (.clk, .rst_n, .in_valid(v_raw_v), .in_col(top_in),
      .out_valid(v0_v), .out_col(v0));
    delay_line #(.N(H), .DEPTH(H)) u_dz0 (.clk, .rst_n, .in_valid(z_raw_v), .in_col(bot_in),
      .out_valid(z0_v), .out_col(z0));

    // U^-1, Z^-1
    logic  ui_v, zi_v;
    word_t ui [H], zi [H];
    matinv #(.N(H)) u_inv_u (.clk, .rst_n, .in_valid(u_v), .in_col(top_in),
      .out_valid(ui_v), .out_col(ui));
    matinv #(.N(H)) u_inv_z (.clk, .rst_n, .in_valid(z0_v), .in_col(z0),
      .out_valid(zi_v), .out_col(zi));

    // P = U^-1 V, Q = Z^-1 W
    logic  v1_v, w1_v, p_v, q_v;
    word_t v1 [H], w1 [H], p [H], q [H];
    delay_line #(.N(H), .DEPTH(TI)) u_dv1 (.clk, .rst_n, .in_valid(v0_v), .in_col(v0),
      .out_valid(v1_v), .out_col(v1));
    delay_line #(.N(H), .DEPTH(TI)) u_dw1 (.clk, .rst_n, .in_valid(w_v), .in_col(bot_in),
      .out_valid(w1_v), .out_col(w1));
    matmul #(.N(H)) u_mul_p (.clk, .rst_n, .a_valid(ui_v), .a_col(ui), .b_valid(v1_v), .b_col(v1),
      .out_valid(p_v), .out_col(p));
    matmul #(.N(H)) u_mul_q (.clk, .rst_n, .a_valid(zi_v), .a_col(zi), .b_valid(w1_v), .b_col(w1),
      .out_valid(q_v), .out_col(q));

    // V Z^-1 W = V Q, W U^-1 V = W P
    logic  v2_v, w2_v, r1_v, r2_v;
    word_t v2 [H], w2 [H], r1 [H], r2 [H];
    delay_line #(.N(H), .DEPTH(TM)) u_dv2 (.clk, .rst_n, .in_valid(v1_v), .in_col(v1),
      .out_valid(v2_v), .out_col(v2));
    delay_line #(.N(H), .DEPTH(TM)) u_dw2 (.clk, .rst_n, .in_valid(w1_v), .in_col(w1),
      .out_valid(w2_v), .out_col(w2));
    matmul #(.N(H)) u_mul_r1 (.clk, .rst_n, .a_valid(v2_v), .a_col(v2), .b_valid(q_v), .b_col(q),
      .out_valid(r1_v), .out_col(r1));
    matmul #(.N(H)) u_mul_r2 (.clk, .rst_n, .a_valid(w2_v), .a_col(w2), .b_valid(p_v), .b_col(p),
      .out_valid(r2_v), .out_col(r2));

    // C = U - V Q, D = Z - W P
    logic  u2_v, z2_v, c_v, d_v;
    word_t u2 [H], z2 [H], c [H], d [H];
    delay_line #(.N(H), .DEPTH(TI + 2*TM)) u_du2 (.clk, .rst_n, .in_valid(u_v), .in_col(top_in),
      .out_valid(u2_v), .out_col(u2));
    delay_line #(.N(H), .DEPTH(TI + 2*TM)) u_dz2 (.clk, .rst_n, .in_valid(z0_v), .in_col(z0),
      .out_valid(z2_v), .out_col(z2));
    matadd #(.N(H), .SUB(1'b1)) u_sub_c (.clk, .rst_n, .a_valid(u2_v), .a_col(u2),
      .b_valid(r1_v), .b_col(r1), .out_valid(c_v), .out_col(c));
    matadd #(.N(H), .SUB(1'b1)) u_sub_d (.clk, .rst_n, .a_valid(z2_v), .a_col(z2),
      .b_valid(r2_v), .b_col(r2), .out_valid(d_v), .out_col(d));

    // C^-1, D^-1
    logic  ci_v, di_v;
    word_t ci [H], di [H];
    matinv #(.N(H)) u_inv_c (.clk, .rst_n, .in_valid(c_v), .in_col(c),
      .out_valid(ci_v), .out_col(ci));
    matinv #(.N(H)) u_inv_d (.clk, .rst_n, .in_valid(d_v), .in_col(d),
      .out_valid(di_v), .out_col(di));

    // X = -P D^-1, Y = -Q C^-1
    logic  p3_v, q3_v, x_v, y_v;
    word_t p3 [H], q3 [H], x [H], y [H];
    delay_line #(.N(H), .DEPTH(TI + TM + ADD_LAT)) u_dp3 (.clk, .rst_n, .in_valid(p_v), .in_col(p),
      .out_valid(p3_v), .out_col(p3));
    delay_line #(.N(H), .DEPTH(TI + TM + ADD_LAT)) u_dq3 (.clk, .rst_n, .in_valid(q_v), .in_col(q),
      .out_valid(q3_v), .out_col(q3));
    matmul #(.N(H), .NEGATE(1'b1)) u_mul_x (.clk, .rst_n, .a_valid(p3_v), .a_col(p3),
      .b_valid(di_v), .b_col(di), .out_valid(x_v), .out_col(x));
    matmul #(.N(H), .NEGATE(1'b1)) u_mul_y (.clk, .rst_n, .a_valid(q3_v), .a_col(q3),
      .b_valid(ci_v), .b_col(ci), .out_valid(y_v), .out_col(y));

    // output merge: X then C^-1 above, D^-1 then Y below
    logic  co_v, do_v, yo_v;
    word_t co [H], do_ [H], yo [H];
    delay_line #(.N(H), .DEPTH(TM + H)) u_dco (.clk, .rst_n, .in_valid(ci_v), .in_col(ci),
      .out_valid(co_v), .out_col(co));
    delay_line #(.N(H), .DEPTH(TM)) u_ddo (.clk, .rst_n, .in_valid(di_v), .in_col(di),
      .out_valid(do_v), .out_col(do_));
    delay_line #(.N(H), .DEPTH(H)) u_dyo (.clk, .rst_n, .in_valid(y_v), .in_col(y),
      .out_valid(yo_v), .out_col(yo));

    assign out_valid = x_v || co_v;
    for (genvar i = 0; i < H; i++) begin : g_merge
      assign out_col[i]   = x_v  ? x[i]   : co[i];
      assign out_col[H+i] = do_v ? do_[i] : yo[i];
    end

    a_halves_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      (x_v || co_v) == (do_v || yo_v))
      else $error("matinv: output halves out of step");
  end
endmodule
