// tb_matinv_det_top: end-to-end test of the top at its default size (N = 8).
// Random symmetric positive definite and diagonally dominant matrices enter
// column by column; the inverse (every element) and the determinant are
// compared with a Gauss-Jordan reference in real arithmetic, and both
// latencies are checked against inv_lat(N) and det_lat(N). The testbench also
// counts how often each mechanism of the networks acted in the outermost
// level: the switch nodes separating V from U and Z from W, the transposition
// feed of a multiplier, the Schur-complement subtractions, the negating
// multipliers that form X and Y, and the output merge that sends X before
// C^-1 and D^-1 before Y; a mechanism that never acted counts as a failure.
module tb_matinv_det_top;
  import matinv_pkg::*;
  import tb_util_pkg::*;
  localparam int N    = 8;
  localparam int NOPS = 6;
  localparam real TOL  = 4.0e-3;
  localparam real RTOL = 4.0e-3;
  logic clk = 0, rst_n = 0, in_valid, out_valid, det_valid;
  word_t in_col [N], out_col [N], det;
  rmat_t a, ai;
  real   d, err, maxerr, maxrel;
  int checks = 0, failures = 0;
  int n_sw_first = 0, n_sw_second = 0, n_feed = 0, n_schur = 0, n_neg = 0;
  int n_merge_x = 0, n_merge_c = 0, n_merge_d = 0, n_merge_y = 0, n_det_mul = 0;

  matinv_det_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_sw_first  += int'(dut.u_inv.g_rec.u_sw_top.first_valid);
    n_sw_second += int'(dut.u_inv.g_rec.u_sw_bot.second_valid);
    n_feed      += int'(dut.u_inv.g_rec.u_mul_p.feed);
    n_schur     += int'(dut.u_inv.g_rec.c_v) + int'(dut.u_inv.g_rec.d_v);
    n_neg       += int'(dut.u_inv.g_rec.x_v) + int'(dut.u_inv.g_rec.y_v);
    n_merge_x   += int'(dut.u_inv.g_rec.x_v);
    n_merge_c   += int'(dut.u_inv.g_rec.co_v);
    n_merge_d   += int'(dut.u_inv.g_rec.do_v);
    n_merge_y   += int'(dut.u_inv.g_rec.yo_v);
    n_det_mul   += int'(dut.u_det.g_rec.du_v && dut.u_det.g_rec.ds_v);
  end

  task automatic count_mechanism(input string name, input int n);
    checks++;
    $display("%-28s %0d", name, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    int lat, dlat;
    bit  got_det;
    in_valid = 0;
    for (int i = 0; i < N; i++) in_col[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    maxerr = 0.0; maxrel = 0.0;
    for (int op = 0; op < NOPS; op++) begin
      a  = rand_matrix(N, op % 2);
      ai = ref_inverse(a, N, d);
      lat = 0; dlat = -1; got_det = 0;
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < N; i++) in_col[i] = to_fx(a[i][N-1-t]);
        lat++;
      end
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < N; i++) in_col[i] = word_t'($urandom);
      // wait for both results; the determinant comes first
      while (!out_valid && lat < 100000) begin
        if (det_valid) begin dlat = lat; got_det = 1; check_det(); end
        @(negedge clk); lat++;
      end
      checks++;
      if (lat != inv_lat(N)) begin failures++; $display("inverse latency %0d expected %0d", lat, inv_lat(N)); end
      for (int t = 0; t < N; t++) begin
        if (det_valid) begin dlat = lat + t; got_det = 1; check_det(); end
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
      for (int t = 0; t < 4000 && !got_det; t++) begin
        if (det_valid) begin dlat = lat + N + t; got_det = 1; check_det(); end
        @(negedge clk);
      end
      checks += 2;
      if (!got_det) begin failures++; $display("op %0d: no determinant", op); end
      if (dlat != det_lat(N)) begin failures++; $display("det latency %0d expected %0d", dlat, det_lat(N)); end
      repeat (2 + $urandom % 5) @(negedge clk);
    end
    $display("largest inverse element error %g, largest determinant relative error %g", maxerr, maxrel);
    count_mechanism("switch node: V/Z columns", n_sw_first);
    count_mechanism("switch node: U/W columns", n_sw_second);
    count_mechanism("transposition feed", n_feed);
    count_mechanism("Schur subtraction", n_schur);
    count_mechanism("negating multiply", n_neg);
    count_mechanism("merge: X", n_merge_x);
    count_mechanism("merge: C^-1", n_merge_c);
    count_mechanism("merge: D^-1", n_merge_d);
    count_mechanism("merge: Y", n_merge_y);
    count_mechanism("det product", n_det_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_det();
    real rel;
    rel = rabs(from_fx(det) - d) / rabs(d);
    if (rel > maxrel) maxrel = rel;
    checks++;
    if (rel > RTOL) begin
      failures++;
      $display("det got %f expected %f", from_fx(det), d);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
