// dct_pkg: constants and elaboration-time helpers shared by the HEVC integer
// DCT datapath.
//
// The HEVC N-point forward core transform (N = 4, 8, 16, 32) uses the matrix
// c_N[k][n] = c_32[k*32/N][n]. Every entry of c_32 is +/- one of 33 magnitudes
// indexed by the "angle" m = ((2n+1)*k) mod 128, folded into 0..32; the table
// G below holds those magnitudes (G[0] = 64 is used by row 0 only).
//
// The functions here are evaluated at elaboration to set up the wiring of the
// shift-add units (canonical-signed-digit expansion of each constant) and of
// the output adder units (which product and which sign each term takes).
// lane_seg/lane_coef describe the output lane order of the reusable DCT,
// which follows its recursive structure rather than natural coefficient order.
//
// Word growth: a 1-D 32-point row has an absolute sum of at most 2880 < 2^12,
// so a 1-D output is GROW = 12 bits wider than its input. This full-precision
// choice (no rounding between stages) is this design's own.
package dct_pkg;

  localparam int unsigned GROW = 12;   // bits added by one 1-D pass
  localparam int unsigned CW   = 8;    // width of a constant magnitude (<= 90)

  // mode encoding of the reusable DCT: size = 4 << mode
  typedef enum logic [1:0] {
    SIZE4  = 2'd0,
    SIZE8  = 2'd1,
    SIZE16 = 2'd2,
    SIZE32 = 2'd3
  } dct_mode_e;

  // magnitude of the 32-point matrix entry at folded angle m (0..32)
  function automatic int g_mag(input logic [5:0] m);
    int t [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                            64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4, 0};
    return t[m];
  endfunction

  // fold an angle index (mod 128) into 0..32 ...
  function automatic int fold_angle(input int m_in);
    int m;
    m = m_in % 128;
    if (m <= 32)      return m;
    else if (m <= 64) return 64 - m;
    else if (m <= 96) return m - 64;
    else              return 128 - m;
  endfunction

  // ... and the sign of the cosine there
  function automatic bit fold_neg(input int m_in);
    int m;
    m = m_in % 128;
    return (m > 32) && (m <= 96);
  endfunction

  // HEVC N-point matrix entry c_N[k][n]
  function automatic int coef(input int n_pt, input int k, input int n);
    int ang, mag;
    ang = (2 * n + 1) * k * (32 / n_pt);
    mag = g_mag(6'(fold_angle(ang)));
    return fold_neg(ang) ? -mag : mag;
  endfunction

  // j-th constant of an N-point shift-add unit: c_N[2j+1][0]
  function automatic int sau_const(input int n_pt, input int j);
    return coef(n_pt, 2 * j + 1, 0);
  endfunction

  // Which SAU product (index j) row 2k+1, column i of c_N uses ...
  function automatic int oau_sel(input int n_pt, input int k, input int i);
    return (fold_angle((2 * k + 1) * (2 * i + 1) * (32 / n_pt)) / (32 / n_pt) - 1) / 2;
  endfunction

  // ... and whether it is subtracted
  function automatic bit oau_neg(input int n_pt, input int k, input int i);
    return fold_neg((2 * k + 1) * (2 * i + 1) * (32 / n_pt));
  endfunction

  // Canonical signed digit expansion of c: bit p of the result is set when
  // digit p is +1 (csd_pos) or -1 (csd_neg).
  function automatic logic [CW:0] csd_pos(input int c);
    logic [CW:0] p;
    int v;
    p = '0;
    v = c;
    for (int b = 0; b <= CW; b++) begin
      if (v % 2 != 0) begin
        if (v % 4 == 3) v = v + 1;          // digit -1
        else begin p[b] = 1'b1; v = v - 1; end
      end
      v = v / 2;
    end
    return p;
  endfunction

  function automatic logic [CW:0] csd_neg(input int c);
    logic [CW:0] q;
    int v;
    q = '0;
    v = c;
    for (int b = 0; b <= CW; b++) begin
      if (v % 2 != 0) begin
        if (v % 4 == 3) begin q[b] = 1'b1; v = v + 1; end
        else v = v - 1;
      end
      v = v / 2;
    end
    return q;
  endfunction

  // Output lane order of dct_reusable #(n_pt) in a mode of size s_pt:
  // lane_seg is the index of the s_pt-sample segment of the input vector the
  // lane belongs to, lane_coef the coefficient index within that segment.
  function automatic int lane_seg(input int n_pt, input int s_pt, input int lane);
    int n, p, seg;
    n = n_pt; p = lane; seg = 0;
    while (n > s_pt) begin
      if (p >= n / 2) begin seg += (n / 2) / s_pt; p -= n / 2; end
      n = n / 2;
    end
    return seg;
  endfunction

  function automatic int lane_coef(input int n_pt, input int s_pt, input int lane);
    int n, p, mul;
    n = n_pt; p = lane;
    while (n > s_pt) begin
      if (p >= n / 2) p -= n / 2;
      n = n / 2;
    end
    mul = 1;
    while (n > 4) begin
      if (p >= n / 2) return mul * (2 * (p - n / 2) + 1);
      mul = mul * 2;
      n = n / 2;
    end
    return mul * p;
  endfunction

endpackage
