// tb_matadd: streams pairs of random 4x4 matrices, last column first, into a
// subtracting and an adding instance and checks every result column and the
// one-cycle latency.
module tb_matadd;
  import matinv_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, v, sv, av;
  word_t a [N], b [N], s [N], ad [N];
  word_t ma [N][N], mb [N][N];
  int checks = 0, failures = 0;

  matadd #(.N(N), .SUB(1'b1)) dut   (.clk, .rst_n, .a_valid(v), .a_col(a), .b_valid(v), .b_col(b),
    .out_valid(sv), .out_col(s));
  matadd #(.N(N), .SUB(1'b0)) dut_a (.clk, .rst_n, .a_valid(v), .a_col(a), .b_valid(v), .b_col(b),
    .out_valid(av), .out_col(ad));

  always #5 clk = ~clk;

  initial begin
    v = 0;
    for (int i = 0; i < N; i++) begin a[i] = 0; b[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 20; op++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          ma[i][j] = word_t'(int'($urandom % 2000000) - 1000000);
          mb[i][j] = word_t'(int'($urandom % 2000000) - 1000000);
        end
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        v = 1;
        for (int i = 0; i < N; i++) begin a[i] = ma[i][N-1-t]; b[i] = mb[i][N-1-t]; end
        @(posedge clk); #1;
        checks++;
        if (!sv || !av) failures++;
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (s[i]  != ma[i][N-1-t] - mb[i][N-1-t]) failures++;
          if (ad[i] != ma[i][N-1-t] + mb[i][N-1-t]) failures++;
        end
      end
      @(negedge clk); v = 0;
      @(posedge clk); #1;
      checks++;
      if (sv) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
