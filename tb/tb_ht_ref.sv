// tb_ht_ref: reference arithmetic for the HT testbenches.
//
// Computes, straight from phi0 = phi + r*qA/pt and without the segment-copy
// structure of the RTL, which accumulator columns a cluster's line crosses in
// a qA/pt row (the same fixed-point convention as the RTL: row borders, the
// upper border open), and the Low-Resources pattern ranges from real-valued
// arithmetic.
package tb_ht_ref;

  localparam real    QMAX   = 3.0e-4;
  localparam real    REGION = 0.2;
  localparam int     FINE   = 24;          // fraction bits of a column inside the line arithmetic

  function automatic longint slope(int n_rows, int n_cols);
    return longint'((2.0 * QMAX / n_rows) * (n_cols / REGION) * (2.0 ** FINE));
  endfunction

  // floor(a / 2**FINE) for signed a
  function automatic longint fl(longint a);
    return a >>> FINE;
  endfunction

  // Value of the line at lower border of row k (2**-FINE columns).
  function automatic longint border(int phi, int r, int k, int n_rows, int n_cols);
    longint s;
    s = slope(n_rows, n_cols);
    return (longint'(phi) <<< (FINE - 8)) + longint'(r) * (longint'(k) - longint'(n_rows / 2)) * s;
  endfunction

  // Columns lo..hi crossed in row k (before clipping to 0..n_cols-1).
  function automatic void row_range(int phi, int r, int k, int n_rows, int n_cols,
                                    output longint lo, output longint hi);
    longint a, b;
    a  = border(phi, r, k, n_rows, n_cols);
    b  = border(phi, r, k + 1, n_rows, n_cols);
    lo = fl(a);
    hi = fl(b - 1);
    if (hi < lo) hi = lo;
  endfunction

  function automatic bit crosses(int phi, int r, int k, int c, int n_rows, int n_cols);
    longint lo, hi;
    row_range(phi, r, k, n_rows, n_cols, lo, hi);
    return (c >= lo) && (c <= hi) && (c >= 0) && (c < n_cols);
  endfunction

  function automatic longint rfloor(real x);
    longint t;
    t = longint'($rtoi(x));
    if (real'(t) > x) t = t - 1;
    return t;
  endfunction

  // Low-Resources pattern: columns (relative to the cluster's column) that a
  // cluster in sub-range s of a column can reach in row k, radius rlo..rhi.
  function automatic void lr_range(int s, int nsub, int k, int n_rows, int n_cols,
                                   real rlo, real rhi, output longint lo, output longint hi);
    real q0, q1, c, mn, mx, a, b;
    c  = n_cols / REGION;
    q0 = -QMAX + 2.0 * QMAX * k / n_rows;
    q1 = -QMAX + 2.0 * QMAX * (k + 1) / n_rows;
    a  = rlo * q0 * c;  b = rhi * q0 * c;
    mn = real'(s) / nsub + ((a < b) ? a : b);
    a  = rlo * q1 * c;  b = rhi * q1 * c;
    mx = real'(s + 1) / nsub + ((a > b) ? a : b);
    lo = rfloor(mn);
    hi = -rfloor(-mx) - 1;
    if (hi < lo) hi = lo;
  endfunction

endpackage
