// tb_delay_line: drives random columns with a random valid pattern into a
// 2-word, 5-deep delay line and checks that each column and its valid bit
// come out exactly 5 cycles later; also checks the DEPTH=0 connection.
module tb_delay_line;
  import matinv_pkg::*;
  localparam int D = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_valid0;
  word_t in_col [2], out_col [2], out_col0 [2];
  int checks = 0, failures = 0;
  logic  hv [$];
  word_t h0 [$], h1 [$];

  delay_line #(.N(2), .DEPTH(D)) dut (.*);
  delay_line #(.N(2), .DEPTH(0)) dut0 (.clk, .rst_n, .in_valid, .in_col,
    .out_valid(out_valid0), .out_col(out_col0));

  always #5 clk = ~clk;

  initial begin
    in_valid = 0; in_col[0] = 0; in_col[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_col[0] = word_t'($urandom); in_col[1] = word_t'($urandom);
      hv.push_back(in_valid); h0.push_back(in_col[0]); h1.push_back(in_col[1]);
      #1;
      checks++;
      if (out_valid0 != in_valid || out_col0[0] != in_col[0]) failures++;
      if (hv.size() > D) begin
        logic ev; word_t e0, e1;
        ev = hv.pop_front(); e0 = h0.pop_front(); e1 = h1.pop_front();
        checks++;
        if (out_valid != ev || (ev && (out_col[0] != e0 || out_col[1] != e1))) begin
          failures++;
          $display("mismatch at t=%0d", t);
        end
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
