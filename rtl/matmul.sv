// matmul: column-serial N x N matrix multiplier, C = A * B (or -A * B with NEGATE).
//
// Both operands arrive column by column, last column first, in the same N
// cycles. B is transposed by an N x N array of switch nodes: a modulo-N column
// counter steers each arriving column into its own slot, and in the next N
// cycles the stored rows of B are sent down the N columns of the processor
// array. Row i of A is delayed by N+i cycles and column j of B by j cycles, so
// arithmetic processor (i,j) meets A[i][k] and B[k][j] together for every k and
// accumulates C[i][j] (the systolic schedule of the source design). When the
// last processor is done, the array is copied into an output register that is
// shifted towards the output, so C leaves column by column, last column first,
// the same format as the inputs.
//
// Timing: first result column MUL_LAT = 4N-1 cycles after the first input
// column (mul_lat in matinv_pkg), then N consecutive columns. One product at a
// time: a new product may start 4N-1 cycles after the previous one did.
module matmul
  import matinv_pkg::*;
#(
  parameter int N      = 4,
  parameter bit NEGATE = 1'b0
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
  localparam int TW   = $clog2(5*N) + 1;
  localparam int LOAD = 4*N - 2;    // cycle on which the array is copied out

  // ---- control: one timer per product --------------------------------------
  logic          busy;
  logic [TW-1:0] tc;
  logic [TW-1:0] t_now;
  logic [TW-1:0] oc;                // output columns still to send
  assign t_now = busy ? tc : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      tc   <= '0;
    end else if (a_valid && !busy) begin
      busy <= 1'b1;
      tc   <= TW'(1);
    end else if (busy) begin
      tc <= tc + 1'b1;
      if (tc == TW'(LOAD)) busy <= 1'b0;
    end
  end

  // ---- transposition of B by switch nodes -----------------------------------
  word_t bt [N][N];                 // bt[row][col]
  word_t b_top [N];                 // row of B entering the array columns
  logic  feed;

  always_ff @(posedge clk) begin
    if (b_valid && t_now < TW'(N))
      for (int r = 0; r < N; r++) bt[r][N-1-int'(t_now)] <= b_col[r];
  end

  assign feed = busy && tc >= TW'(N) && tc < TW'(2*N);
  always_comb begin
    for (int j = 0; j < N; j++) b_top[j] = '0;
    if (feed)
      for (int j = 0; j < N; j++) b_top[j] = bt[2*N-1-int'(tc)][j];
  end

  // ---- skew delays ------------------------------------------------------------
  logic  a_skv [N];
  word_t a_sk  [N];
  word_t b_sk  [N];
  logic  b_unused_v [N];

  for (genvar i = 0; i < N; i++) begin : g_skew
    word_t a_one [1];
    word_t a_d   [1];
    word_t b_one [1];
    word_t b_d   [1];
    assign a_one[0] = a_col[i];
    assign b_one[0] = b_top[i];
    delay_line #(.N(1), .DEPTH(N + i)) u_adly (
      .clk, .rst_n, .in_valid(a_valid), .in_col(a_one),
      .out_valid(a_skv[i]), .out_col(a_d));
    delay_line #(.N(1), .DEPTH(i)) u_bdly (
      .clk, .rst_n, .in_valid(feed), .in_col(b_one),
      .out_valid(b_unused_v[i]), .out_col(b_d));
    assign a_sk[i] = a_d[0];
    assign b_sk[i] = b_d[0];
  end

  // ---- processor array ----------------------------------------------------------
  logic  clr;
  logic  av [N][N+1];
  word_t ah [N][N+1];
  word_t bv [N+1][N];
  word_t res [N][N];
  assign clr = busy && tc == TW'(LOAD);

  for (genvar i = 0; i < N; i++) begin : g_r
    assign av[i][0] = a_skv[i];
    assign ah[i][0] = a_sk[i];
    assign bv[0][i] = b_sk[i];
    for (genvar j = 0; j < N; j++) begin : g_c
      mac_pe #(.NEGATE(NEGATE)) u_pe (
        .clk, .rst_n, .clr,
        .a_valid(av[i][j]), .a_in(ah[i][j]), .b_in(bv[i][j]),
        .a_valid_out(av[i][j+1]), .a_out(ah[i][j+1]), .b_out(bv[i+1][j]),
        .result(res[i][j]));
    end
  end

  // ---- output: array copied out, then shifted one column per cycle ----------
  word_t oq [N][N];
  always_ff @(posedge clk) begin
    if (!rst_n) oc <= '0;
    else if (clr) oc <= TW'(N);
    else if (oc != '0) oc <= oc - 1'b1;
    if (clr) oq <= res;
    else
      for (int i = 0; i < N; i++)
        for (int j = N-1; j > 0; j--) oq[i][j] <= oq[i][j-1];
  end

  assign out_valid = oc != '0;
  for (genvar i = 0; i < N; i++) begin : g_out
    assign out_col[i] = oq[i][N-1];
  end

  a_operands_aligned: assert property (@(posedge clk) disable iff (!rst_n) a_valid == b_valid)
    else $error("matmul: operand columns out of step");
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    (a_valid && busy) |-> tc < TW'(N))
    else $error("matmul: new product started while busy");
endmodule
