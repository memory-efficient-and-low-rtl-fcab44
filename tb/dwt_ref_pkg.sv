// dwt_ref_pkg: reference model of the zero-extended reversible 5/3 DWT.
//
// Written directly from the lifting equations, independent of the RTL's
// folded state: a line x[0..L-1] is extended with zeros on both sides and
//   d[k] = x[2k+1] - floor((x[2k] + x[2k+2]) / 2)
//   s[k] = x[2k]   + floor((d[k-1] + d[k] + 2) / 4)
// with d[-1] computed from the extension as well. Integer division with an
// explicit floor correction is used rather than shifts.
package dwt_ref_pkg;

  typedef int line_t[];

  function automatic int floordiv(int v, int q);
    int r;
    r = v / q;
    if ((v % q != 0) && ((v < 0) != (q < 0))) r = r - 1;
    return r;
  endfunction

  function automatic int xe(input line_t x, int n);
    if (n < 0 || n >= x.size()) return 0;
    return x[n];
  endfunction

  function automatic int dk(input line_t x, int k);
    return xe(x, 2*k+1) - floordiv(xe(x, 2*k) + xe(x, 2*k+2), 2);
  endfunction

  // one level 5/3 of a line: s (low) and d (high), each L/2 long
  function automatic void lift_line(input line_t x, output line_t s, output line_t d);
    int h;
    h = x.size() / 2;
    s = new[h];
    d = new[h];
    for (int k = 0; k < h; k++) begin
      d[k] = dk(x, k);
      s[k] = xe(x, 2*k) + floordiv(dk(x, k-1) + dk(x, k) + 2, 4);
    end
  endfunction

  // 2-D transform of an n x n image img[r*n+c].
  // Result in the pipeline's output order: for stripe m and column c
  // (c even: L column c/2, c odd: H column c/2) lo[m*n+c], hi[m*n+c].
  function automatic void dwt2d(int n, input line_t img, output line_t lo, output line_t hi);
    line_t rowc, x, s, d, col;
    rowc = new[n*n];
    x = new[n];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) x[c] = img[r*n+c];
      lift_line(x, s, d);
      for (int k = 0; k < n/2; k++) begin
        rowc[r*n + 2*k]   = s[k];
        rowc[r*n + 2*k+1] = d[k];
      end
    end
    lo = new[n*n/2];
    hi = new[n*n/2];
    col = new[n];
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) col[r] = rowc[r*n+c];
      lift_line(col, s, d);
      for (int m = 0; m < n/2; m++) begin
        lo[m*n+c] = s[m];
        hi[m*n+c] = d[m];
      end
    end
  endfunction

endpackage
