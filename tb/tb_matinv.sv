// tb_matinv: inverts random 4x4 matrices (symmetric positive definite and
// diagonally dominant ones) and compares every element of the result with a
// Gauss-Jordan reference computed in real arithmetic, within a fixed-point
// tolerance. Also checks that the first result column arrives inv_lat(N)
// cycles after the first input column and that the N result columns follow
// back to back in last-column-first order.
module tb_matinv;
  import matinv_pkg::*;
  import tb_util_pkg::*;
  localparam int N    = 4;
  localparam int NOPS = 12;
  localparam real TOL = 2.0e-3;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  word_t in_col [N], out_col [N];
  rmat_t a, ai;
  real   d, err, maxerr;
  int checks = 0, failures = 0;

  matinv #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int lat;
    in_valid = 0;
    for (int i = 0; i < N; i++) in_col[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    maxerr = 0.0;
    for (int op = 0; op < NOPS; op++) begin
      a  = rand_matrix(N, op % 2);
      ai = ref_inverse(a, N, d);
      lat = 0;
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < N; i++) in_col[i] = to_fx(a[i][N-1-t]);
        lat++;
      end
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < N; i++) in_col[i] = word_t'($urandom);
      while (!out_valid && lat < 100000) begin @(negedge clk); lat++; end
      checks++;
      if (lat != inv_lat(N)) begin failures++; $display("latency %0d expected %0d", lat, inv_lat(N)); end
      for (int t = 0; t < N; t++) begin
        checks++;
        if (!out_valid) failures++;
        for (int i = 0; i < N; i++) begin
          err = rabs(from_fx(out_col[i]) - ai[i][N-1-t]);
          if (err > maxerr) maxerr = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("op %0d inv[%0d][%0d] got %f expected %f", op, i, N-1-t,
                     from_fx(out_col[i]), ai[i][N-1-t]);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) failures++;
      repeat ($urandom % 5) @(negedge clk);
    end
    $display("largest element error %g", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
