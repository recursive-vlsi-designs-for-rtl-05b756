// tb_add_elem: random sums and differences, including saturating ones,
// checked one cycle after they are applied against a 64-bit reference.
module tb_add_elem;
  import matinv_pkg::*;
  logic clk = 0, sub;
  word_t a, b, y;
  int checks = 0, failures = 0;

  add_elem dut (.*);

  always #5 clk = ~clk;

  function automatic word_t ref_sat(input longint v);
    if (v > 64'sd2147483647) return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return word_t'(v);
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      longint e;
      @(negedge clk);
      sub = $urandom % 2 != 0;
      a = word_t'($urandom); b = word_t'($urandom);
      if (t % 4 == 0) begin a = a >>> 8; b = b >>> 8; end
      e = sub ? longint'(a) - longint'(b) : longint'(a) + longint'(b);
      @(posedge clk); #1;
      checks++;
      if (y != ref_sat(e)) begin
        failures++;
        $display("a=%0d b=%0d sub=%0d y=%0d", a, b, sub, y);
      end
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
