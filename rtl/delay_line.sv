// delay_line: a chain of DEPTH unit delays on a column bus and its valid bit.
//
// This is the delay unit of the elementary processors, strung into the
// "inversion time", "product time", "N time unit" and "unitary" delay lines
// that keep the inputs of every block of the networks in step. A column that
// enters on cycle t leaves on cycle t+DEPTH; DEPTH=0 is a plain connection.
// The valid bit is reset; the data registers are not (they are qualified by it).
module delay_line
  import matinv_pkg::*;
#(
  parameter int N     = 4,  // words per column
  parameter int DEPTH = 2   // cycles of delay
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_col  [N],
  output logic  out_valid,
  output word_t out_col [N]
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_col   = in_col;
  end else begin : g_chain
    logic  v_q [DEPTH];
    word_t d_q [DEPTH][N];
    always_ff @(posedge clk) begin
      if (!rst_n) for (int k = 0; k < DEPTH; k++) v_q[k] <= 1'b0;
      else begin
        v_q[0] <= in_valid;
        for (int k = 1; k < DEPTH; k++) v_q[k] <= v_q[k-1];
      end
      d_q[0] <= in_col;
      for (int k = 1; k < DEPTH; k++) d_q[k] <= d_q[k-1];
    end
    assign out_valid = v_q[DEPTH-1];
    assign out_col   = d_q[DEPTH-1];
  end
endmodule
