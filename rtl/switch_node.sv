// switch_node: separates the two sub-matrices that share one input path.
//
// A path of N wires carries two N x N blocks back to back, 2N columns in all
// (for example V then U on the upper input of the inversion network). A
// modulo-2N counter of the valid columns steers the first N columns to the
// first output and the next N to the second, by raising the valid bit of that
// output; the words themselves are fanned out to both destinations by wiring.
// The steering is combinational (no delay); the counter is reset to 0.
module switch_node
#(
  parameter int N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  first_valid,
  output logic  second_valid
);
  localparam int CW = $clog2(2*N) + 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid) cnt <= (cnt == CW'(2*N-1)) ? '0 : cnt + 1'b1;
  end

  assign first_valid  = in_valid && (cnt <  CW'(N));
  assign second_valid = in_valid && (cnt >= CW'(N));
endmodule
