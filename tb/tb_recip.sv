// tb_recip: random positive and negative operands, plus 0, +-1.0 and tiny
// values that saturate; checks the quotient against floor(2^32/|u|) with the
// sign restored, and that it appears exactly DIV_LAT cycles after the operand.
module tb_recip;
  import matinv_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  word_t in_col [1], out_col [1];
  int checks = 0, failures = 0;

  recip dut (.*);

  always #5 clk = ~clk;

  function automatic word_t ref_recip(input word_t u);
    longint m, q;
    m = u < 0 ? -longint'(u) : longint'(u);
    if (m == 0) return 32'sh7fffffff;
    q = (64'sd1 <<< (2*FRAC)) / m;
    if (q > 64'sd2147483647) q = 64'sd2147483647;
    return word_t'(u < 0 ? -q : q);
  endfunction

  initial begin
    word_t u;
    int lat;
    in_valid = 0; in_col[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      case (t)
        0: u = 0;
        1: u = 32'sh0001_0000;
        2: u = -32'sh0001_0000;
        3: u = 32'sd1;
        4: u = 32'sh7fffffff;
        default: u = word_t'($urandom) >>> ($urandom % 24);
      endcase
      @(negedge clk);
      in_valid = 1; in_col[0] = u;
      @(negedge clk);
      in_valid = 0; in_col[0] = word_t'($urandom);
      lat = 1;
      while (!out_valid && lat < 200) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != DIV_LAT) begin failures++; $display("latency %0d", lat); end
      if (out_col[0] != ref_recip(u)) begin
        failures++;
        $display("1/%0d: got %0d expected %0d", u, out_col[0], ref_recip(u));
      end
      repeat ($urandom % 3) @(negedge clk);
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
