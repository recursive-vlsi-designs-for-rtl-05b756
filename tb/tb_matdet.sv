// tb_matdet: determinants of random 4x4 matrices (symmetric positive definite
// and diagonally dominant ones) compared with a Gauss elimination reference in
// real arithmetic within a relative tolerance, and the latency checked against
// det_lat(N).
module tb_matdet;
  import matinv_pkg::*;
  import tb_util_pkg::*;
  localparam int N    = 4;
  localparam int NOPS = 12;
  localparam real RTOL = 2.0e-3;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  word_t in_col [N], det;
  rmat_t a, ai;
  real   d, err, maxerr;
  int checks = 0, failures = 0;

  matdet #(.N(N)) dut (.*);

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
      checks += 2;
      if (lat != det_lat(N)) begin failures++; $display("latency %0d expected %0d", lat, det_lat(N)); end
      err = rabs(from_fx(det) - d) / rabs(d);
      if (err > maxerr) maxerr = err;
      if (err > RTOL) begin
        failures++;
        $display("op %0d det got %f expected %f", op, from_fx(det), d);
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
      repeat ($urandom % 5) @(negedge clk);
    end
    $display("largest relative error %g", maxerr);
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
