// matinv_pkg: shared number format, fixed-point helpers and latency formulas for
// the recursive matrix inversion and determinant networks.
//
// Every matrix travels column-serially: one column per clock cycle on N parallel
// words, the last column first. All words are signed fixed point with W bits and
// FRAC fraction bits (Q16.16 by default); the number format is this design's own
// choice, the source design leaves it open. Each module has a fixed latency, and
// the functions below give it, so delay lines can be sized to keep the inputs of
// every block in step, which is how the networks are synchronised.
package matinv_pkg;

  localparam int W    = 32;  // word width
  localparam int FRAC = 16;  // fraction bits

  typedef logic signed [W-1:0]   word_t;
  typedef logic signed [2*W-1:0] dword_t;

  // Latency of the base-case 1x1 inversion (sequential divider, see recip).
  localparam int DIV_BITS = 2*FRAC + 1;
  localparam int DIV_LAT  = DIV_BITS + 2;
  // Latency of the matrix adder (unit delay), the scalar multiply at the
  // output of the determinant network and the 1x1 determinant.
  localparam int ADD_LAT  = 1;
  localparam int SMUL_LAT = 1;
  localparam int DET1_LAT = 1;

  typedef logic signed [2*W+7:0] wide_t;
  localparam wide_t WORD_MAX = {{(W+9){1'b0}}, {(W-1){1'b1}}};
  localparam wide_t WORD_MIN = ~WORD_MAX;

  // Saturate a wide value to a word.
  function automatic word_t sat(input wide_t v);
    if (v > WORD_MAX)      return WORD_MAX[W-1:0];
    else if (v < WORD_MIN) return WORD_MIN[W-1:0];
    else                   return v[W-1:0];
  endfunction

  // Fixed-point product, truncated toward minus infinity and saturated.
  function automatic word_t fx_mul(input word_t a, input word_t b);
    dword_t p;
    p = dword_t'(a) * dword_t'(b);
    return sat(wide_t'(p) >>> FRAC);
  endfunction

  // Cycles from the first input column to the first output column.
  function automatic int mul_lat(input int n);
    return 4*n - 1;
  endfunction

  function automatic int inv_lat(input int n);
    int t;
    t = DIV_LAT;
    for (int s = 2; s <= n; s = s*2)
      t = s/2 + 2*t + 3*mul_lat(s/2) + ADD_LAT;
    return t;
  endfunction

  function automatic int det_lat(input int n);
    int td;
    td = DET1_LAT;
    for (int s = 2; s <= n; s = s*2)
      td = s/2 + inv_lat(s/2) + 2*mul_lat(s/2) + ADD_LAT + td + SMUL_LAT;
    return td;
  endfunction

endpackage
