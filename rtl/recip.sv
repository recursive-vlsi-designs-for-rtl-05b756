// recip: 1x1 matrix inversion, the base case of the recursion.
//
// Computes 1/u in the word format as floor(2^(2*FRAC) / |u|) by restoring
// division, one quotient bit per clock, then restores the sign and saturates.
// u = 0 gives the largest positive word. An operand taken on a cycle with
// in_valid set appears on out_col with out_valid exactly DIV_LAT cycles later.
// One operation at a time: the inversion networks present one operand per
// operation. The source design does not describe this base case; the divider
// is this design's choice.
module recip
  import matinv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_col  [1],
  output logic  out_valid,
  output word_t out_col [1]
);
  localparam int CW = $clog2(DIV_BITS + 1);

  logic                busy;
  logic [CW-1:0]       cnt;
  logic                neg;
  logic [W-1:0]        div;     // |u|
  logic [W-1:0]        rem;
  logic [DIV_BITS-1:0] num;     // dividend bits still to bring down
  logic [DIV_BITS-1:0] quo;
  logic [W:0]          rem_sh;
  word_t               mag;

  assign rem_sh = {rem[W-1:0], num[DIV_BITS-1]};

  always_comb begin
    if (div == '0 || quo >= DIV_BITS'(WORD_MAX[W-1:0])) mag = WORD_MAX[W-1:0];
    else                                                 mag = word_t'(quo);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        busy <= 1'b1;
        cnt  <= CW'(DIV_BITS);
        neg  <= in_col[0][W-1];
        div  <= in_col[0][W-1] ? W'(-in_col[0]) : W'(in_col[0]);
        rem  <= '0;
        num  <= DIV_BITS'(1) << (DIV_BITS - 1);
        quo  <= '0;
      end else if (busy && cnt != '0) begin
        cnt <= cnt - 1'b1;
        num <= num << 1;
        if (rem_sh >= {1'b0, div}) begin
          rem <= W'(rem_sh - {1'b0, div});
          quo <= {quo[DIV_BITS-2:0], 1'b1};
        end else begin
          rem <= rem_sh[W-1:0];
          quo <= {quo[DIV_BITS-2:0], 1'b0};
        end
      end else if (busy) begin
        busy       <= 1'b0;
        out_valid  <= 1'b1;
        out_col[0] <= neg ? -mag : mag;
      end
    end
  end

  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("recip: operand arrived while busy");
endmodule
