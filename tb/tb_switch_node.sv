// tb_switch_node: sends pairs of 3-column blocks (6 valid columns, with random
// idle cycles between them) and checks that the first three valid columns of
// each pair are steered to the first output and the next three to the second.
module tb_switch_node;
  logic clk = 0, rst_n = 0;
  logic in_valid, first_valid, second_valid;
  int checks = 0, failures = 0;
  int k;

  switch_node #(.N(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 2) != 0;
      #1;
      checks++;
      if (in_valid) begin
        if (first_valid != (k < 3) || second_valid != (k >= 3)) failures++;
        k = (k + 1) % 6;
      end else if (first_valid || second_valid) failures++;
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
