// csda_ref_pkg: reference model for the CSDA-MST testbenches.
//
// Holds the transform matrices written out in full (the 8-point matrix C
// with the c1..c7 of each standard, and the 4-point matrices of H.264, VC-1
// and the MPEG even half) and computes the expected, rounded and saturated
// 1-D results directly as matrix products, without any of the datapath's
// decomposition. Modes use the encoding {std[1:0], four_pt}: std 0 H.264,
// 1 VC-1, 2 MPEG.
package csda_ref_pkg;

  // c1..c7 per standard.
  function automatic int ck(int std, int k);
    int h [8] = '{0, 12, 8, 10, 8, 6, 4, 3};
    int v [8] = '{0, 16, 16, 15, 12, 9, 6, 4};
    int g [8] = '{0, 63, 59, 53, 45, 36, 24, 12};
    if (std == 1) return v[k];
    if (std == 2) return g[k];
    return h[k];
  endfunction

  // Signed index table of the 8-point matrix C: entry +-k means +-c_k.
  function automatic int c8(int std, int r, int n);
    int idx [8][8] = '{
      '{ 4,  4,  4,  4,  4,  4,  4,  4},
      '{ 1,  3,  5,  7, -7, -5, -3, -1},
      '{ 2,  6, -6, -2, -2, -6,  6,  2},
      '{ 3, -7, -1, -5,  5,  1,  7, -3},
      '{ 4, -4, -4,  4,  4, -4, -4,  4},
      '{ 5, -1,  7,  3, -3, -7,  1, -5},
      '{ 6, -2,  2, -6, -6,  2, -2,  6},
      '{ 7, -5,  3, -1,  1, -3,  5, -7}};
    int e = idx[r][n];
    return (e < 0) ? -ck(std, -e) : ck(std, e);
  endfunction

  function automatic int c4(int std, int r, int n);
    int h [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int v [4][4] = '{'{17, 17, 17, 17}, '{22, 10, -10, -22}, '{17, -17, -17, 17}, '{10, -22, 22, -10}};
    if (std == 1) return v[r][n];
    if (std == 2) return c8(2, 2 * r, n);   // even rows of the 8-point DCT
    return h[r][n];
  endfunction

  // Full 8x8 matrix of a mode: C, or two 4-point matrices on the diagonal.
  function automatic int mat(int std, bit four, int r, int n);
    int s = (std == 3) ? 0 : std;
    if (!four) return c8(s, r, n);
    if ((r < 4) != (n < 4)) return 0;
    return c4(s, r % 4, n % 4);
  endfunction

  function automatic int rshift(int std, bit four, int in_w, int out_w);
    longint rm = 0;
    for (int r = 0; r < 8; r++) begin
      longint t = 0;
      for (int n = 0; n < 8; n++) t += (mat(std, four, r, n) < 0) ? -mat(std, four, r, n) : mat(std, four, r, n);
      if (t > rm) rm = t;
    end
    for (int s = 0; s < 30; s++)
      if ((rm << (in_w - 1)) <= (longint'(1) << (out_w - 1 + s))) return s;
    return 30;
  endfunction

  // Expected output r of a 1-D core for input row x.
  function automatic longint ref1d(int std, bit four, int in_w, int out_w,
                                   longint x [8], int r);
    longint y = 0;
    longint hi = (longint'(1) << (out_w - 1)) - 1;
    longint lo = -(longint'(1) << (out_w - 1));
    int s = rshift(std, four, in_w, out_w);
    for (int n = 0; n < 8; n++) y += longint'(mat(std, four, r, n)) * x[n];
    if (s > 0) y = (y + (longint'(1) << (s - 1))) >>> s;
    if (y > hi) y = hi;
    if (y < lo) y = lo;
    return y;
  endfunction

endpackage
