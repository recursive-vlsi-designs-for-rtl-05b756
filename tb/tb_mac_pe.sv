// tb_mac_pe: feeds random operand sequences of random length, some cycles
// without a_valid, then clears; checks the accumulated fixed-point sum of
// products (and its negation in a NEGATE instance) and the one-cycle
// forwarding of a, a_valid and b.
module tb_mac_pe;
  import matinv_pkg::*;
  logic clk = 0, rst_n = 0, clr, a_valid;
  word_t a_in, b_in;
  logic  avo, avo_n;
  word_t a_out, b_out, result, a_out_n, b_out_n, result_n;
  int checks = 0, failures = 0;

  mac_pe #(.NEGATE(1'b0)) dut (.clk, .rst_n, .clr, .a_valid, .a_in, .b_in,
    .a_valid_out(avo), .a_out, .b_out, .result);
  mac_pe #(.NEGATE(1'b1)) dut_n (.clk, .rst_n, .clr, .a_valid, .a_in, .b_in,
    .a_valid_out(avo_n), .a_out(a_out_n), .b_out(b_out_n), .result(result_n));

  always #5 clk = ~clk;

  function automatic word_t ref_word(input longint s);
    longint v;
    v = s >>> FRAC;
    if (v > 64'sd2147483647) return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return word_t'(v);
  endfunction

  initial begin
    clr = 0; a_valid = 0; a_in = 0; b_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 40; op++) begin
      longint s;
      int len;
      s = 0;
      len = 1 + $urandom % 8;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        clr = 0;
        a_valid = $urandom % 4 != 0;
        a_in = word_t'(int'($urandom % 600000) - 300000);
        b_in = word_t'(int'($urandom % 600000) - 300000);
        if (a_valid) s += longint'(a_in) * longint'(b_in);
        @(posedge clk); #1;
        checks++;
        if (a_out != a_in || b_out != b_in || avo != a_valid) failures++;
      end
      @(negedge clk); a_valid = 0;
      #1;
      checks += 2;
      if (result != ref_word(s)) begin
        failures++;
        $display("op %0d: result %0d expected %0d", op, result, ref_word(s));
      end
      if (result_n != ref_word(-s)) failures++;
      clr = 1;
      @(posedge clk); #1;
      clr = 0;
      checks++;
      if (result != 0) failures++;
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
