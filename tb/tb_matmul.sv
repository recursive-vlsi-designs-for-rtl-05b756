// tb_matmul: random 4x4 products streamed column-serially into a plain and a
// negating multiplier. Each result is checked, column by column in
// last-column-first order, against an exact integer reference (sum of full
// products, then scaled and saturated), and the latency is checked against
// mul_lat(N) = 4N-1 cycles from the first input column to the first result.
module tb_matmul;
  import matinv_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, v, ov, onv;
  word_t a [N], b [N], c [N], cn [N];
  word_t ma [N][N], mb [N][N];
  int checks = 0, failures = 0;
  int lat_hits = 0;

  matmul #(.N(N)) dut (.clk, .rst_n, .a_valid(v), .a_col(a), .b_valid(v), .b_col(b),
    .out_valid(ov), .out_col(c));
  matmul #(.N(N), .NEGATE(1'b1)) dut_n (.clk, .rst_n, .a_valid(v), .a_col(a), .b_valid(v), .b_col(b),
    .out_valid(onv), .out_col(cn));

  always #5 clk = ~clk;

  function automatic word_t ref_c(input int i, input int j, input bit neg);
    longint s, q;
    s = 0;
    for (int k = 0; k < N; k++) s += longint'(ma[i][k]) * longint'(mb[k][j]);
    if (neg) s = -s;
    q = s >>> FRAC;
    if (q > 64'sd2147483647) q = 64'sd2147483647;
    if (q < -64'sd2147483648) q = -64'sd2147483648;
    return word_t'(q);
  endfunction

  initial begin
    int lat;
    v = 0;
    for (int i = 0; i < N; i++) begin a[i] = 0; b[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 20; op++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          ma[i][j] = word_t'(int'($urandom % 600000) - 300000);
          mb[i][j] = word_t'(int'($urandom % 600000) - 300000);
          if (op == 0) begin ma[i][j] = (i == j) ? 32'sh10000 : 0; end   // identity * B
        end
      lat = 0;
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        v = 1;
        for (int i = 0; i < N; i++) begin a[i] = ma[i][N-1-t]; b[i] = mb[i][N-1-t]; end
        lat++;
      end
      @(negedge clk); v = 0;
      for (int i = 0; i < N; i++) begin a[i] = word_t'($urandom); b[i] = word_t'($urandom); end
      while (!ov && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != mul_lat(N)) begin failures++; $display("latency %0d", lat); end
      else lat_hits++;
      for (int t = 0; t < N; t++) begin
        checks += 1;
        if (!ov || !onv) failures++;
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (c[i] != ref_c(i, N-1-t, 0)) begin
            failures++;
            $display("op %0d C[%0d][%0d] got %0d exp %0d", op, i, N-1-t, c[i], ref_c(i, N-1-t, 0));
          end
          if (cn[i] != ref_c(i, N-1-t, 1)) failures++;
        end
        @(negedge clk);
      end
      checks++;
      if (ov) failures++;
      repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
