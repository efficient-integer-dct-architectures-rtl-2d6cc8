// dct_ref_pkg: reference model used by the testbenches.
//
// Builds the HEVC 32-point integer DCT matrix from its sixteen odd-row
// constants and the symmetries of the DCT-II basis (row k, column n is the
// cosine at angle (2n+1)k*pi/64), and evaluates the N-point transforms by
// direct matrix products, independently of the butterfly structure of the
// RTL. It also holds a small random-vector helper.
package dct_ref_pkg;

  // |c_32[k][0]| for k = 0..31, row 0 scaled as in HEVC (64)
  function automatic int col0(input int k);
    int v [32] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                   64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4};
    return v[k];
  endfunction

  // c_32[k][n]: cos((2n+1)k*pi/64) is, by periodicity, +/- cos(j*pi/64)
  // for some j in 0..32, and cos(j*pi/64) = column 0 of row j.
  function automatic int c32(input int k, input int n);
    int a, s;
    if (k == 0) return 64;
    a = ((2 * n + 1) * k) % 128;
    s = 1;
    if (a > 64) a = 128 - a;          // cos is even about pi
    if (a > 32) begin a = 64 - a; s = -1; end
    if (a == 32) return 0;
    return s * col0(a);
  endfunction

  function automatic int cn(input int n_pt, input int k, input int n);
    return c32(k * (32 / n_pt), n);
  endfunction

  // y = C_N x for the segment of x starting at offset off
  function automatic longint dct1(input int n_pt, input int k, input longint x [32], input int off);
    longint acc;
    acc = 0;
    for (int n = 0; n < n_pt; n++) acc += longint'(cn(n_pt, k, n)) * x[off + n];
    return acc;
  endfunction

  // random signed value of w bits
  function automatic longint rnd(input int w);
    longint v;
    v = longint'($urandom) & ((64'sd1 <<< w) - 1);
    if (v >= (64'sd1 <<< (w - 1))) v -= (64'sd1 <<< w);
    return v;
  endfunction

  // Global index (segment*S + coefficient) carried by output lane p of a
  // reusable n-point unit running S-point transforms, from the recursive
  // structure: the first half unit gives the low lanes, the second half unit
  // or (at full size) the odd coefficients give the high lanes.
  function automatic int rlane(input int n, input int s, input int p);
    if (n == s) begin
      if (n == 4) return p;
      if (p < n / 2) return 2 * rlane(n / 2, n / 2, p);
      return 2 * (p - n / 2) + 1;
    end
    if (p < n / 2) return rlane(n / 2, s, p);
    return n / 2 + rlane(n / 2, s, p - n / 2);
  endfunction

  // 2-D transform of an n x n tile made of S x S blocks: y = D x D^T with D
  // block diagonal (C_S blocks); x[row][col]
  task automatic dct2_ref(input int n, input int s, input longint x [32][32],
                          output longint y [32][32]);
    longint t [32][32];
    for (int r = 0; r < n; r++)
      for (int m = 0; m < n; m++) begin
        t[r][m] = 0;
        for (int k = 0; k < s; k++)
          t[r][m] += longint'(cn(s, r % s, k)) * x[(r / s) * s + k][m];
      end
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        y[r][c] = 0;
        for (int k = 0; k < s; k++)
          y[r][c] += longint'(cn(s, c % s, k)) * t[r][(c / s) * s + k];
      end
  endtask

endpackage
