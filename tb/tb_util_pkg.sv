// tb_util_pkg: helpers shared by the testbenches: conversion between real
// numbers and the fixed-point word, random test matrices, and real-valued
// reference inversion and determinant (Gauss-Jordan elimination with partial
// pivoting), independent of the block-recursive method under test.
package tb_util_pkg;
  import matinv_pkg::*;

  localparam int NMAX = 16;
  typedef real rmat_t [NMAX][NMAX];

  function automatic word_t to_fx(input real r);
    return word_t'($rtoi(r * real'(1 << FRAC) + (r >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real from_fx(input word_t w);
    return real'(w) / real'(1 << FRAC);
  endfunction

  function automatic real urand_pm1();
    return (real'($urandom % 20001) / 10000.0) - 1.0;
  endfunction

  // kind 0: I + s*B*B^T (symmetric positive definite)
  // kind 1: 2*I + 0.2*R, R random in [-1,1] (diagonally dominant, not symmetric)
  function automatic rmat_t rand_matrix(input int n, input int kind);
    rmat_t a, b;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) b[i][j] = urand_pm1();
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        if (kind == 0) begin
          a[i][j] = (i == j) ? 1.0 : 0.0;
          for (int k = 0; k < n; k++) a[i][j] += 0.2 * b[i][k] * b[j][k];
        end else begin
          a[i][j] = ((i == j) ? 2.0 : 0.0) + 0.2 * b[i][j];
        end
      end
    // round to the word format so the reference sees the same input
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) a[i][j] = from_fx(to_fx(a[i][j]));
    return a;
  endfunction

  // Gauss-Jordan inverse; returns the determinant through det.
  function automatic rmat_t ref_inverse(input rmat_t a_in, input int n, output real det);
    rmat_t a, inv;
    real   t;
    int    piv;
    a   = a_in;
    det = 1.0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) inv[i][j] = (i == j) ? 1.0 : 0.0;
    for (int c = 0; c < n; c++) begin
      piv = c;
      for (int r = c + 1; r < n; r++)
        if ((a[r][c] < 0 ? -a[r][c] : a[r][c]) > (a[piv][c] < 0 ? -a[piv][c] : a[piv][c])) piv = r;
      if (piv != c) begin
        det = -det;
        for (int j = 0; j < n; j++) begin
          t = a[c][j];   a[c][j] = a[piv][j];   a[piv][j] = t;
          t = inv[c][j]; inv[c][j] = inv[piv][j]; inv[piv][j] = t;
        end
      end
      det = det * a[c][c];
      t = a[c][c];
      for (int j = 0; j < n; j++) begin a[c][j] /= t; inv[c][j] /= t; end
      for (int r = 0; r < n; r++)
        if (r != c) begin
          t = a[r][c];
          for (int j = 0; j < n; j++) begin
            a[r][j]   -= t * a[c][j];
            inv[r][j] -= t * inv[c][j];
          end
        end
    end
    return inv;
  endfunction

  function automatic real rabs(input real r);
    return r < 0.0 ? -r : r;
  endfunction
endpackage
