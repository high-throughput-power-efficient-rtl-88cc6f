// fme_ref_pkg - reference model for the interpolator testbenches.
//
// Computes HEVC luma fractional samples straight from the definition, with its
// own tap table: horizontal-only and vertical-only samples are
// clip((sum + 32) >> 6); two-dimensional samples filter eight rows
// horizontally, take the vertical sum of those, shift it right by 6 and then
// round the same way. Also holds a 4x4 SATD computed as H*D*H by matrices.
package fme_ref_pkg;

  // taps[phase][k], phase 0 unused
  function automatic int tap(int phase, int k);
    int t [4][8] = '{
      '{0, 0, 0, 64, 0, 0, 0, 0},
      '{-1, 4, -10, 58, 17, -5, 1, 0},
      '{-1, 4, -11, 40, 40, -11, 4, -1},
      '{0, 1, -5, 17, 58, -10, 4, -1}};
    return t[phase][k];
  endfunction

  function automatic int clip_rnd(int v);
    int t;
    t = (v + 32) >>> 6;
    return (t < 0) ? 0 : (t > 255) ? 255 : t;
  endfunction

  // With raw = 1 the rounding is done but the clip is skipped, so that a
  // testbench can see when clipping acted.
  function automatic int clip_sel(int v, bit raw);
    return raw ? ((v + 32) >>> 6) : clip_rnd(v);
  endfunction

  // Horizontal filter of one row segment px[0..7] (pixel x-3 .. x+4).
  function automatic int hsum(int phase, int px [8]);
    int s = 0;
    for (int k = 0; k < 8; k++) s += tap(phase, k) * px[k];
    return s;
  endfunction

  // Sample at fractional phase (fx, fy) given the 8x8 integer neighbourhood
  // nb[row][col], rows y-3..y+4 and columns x-3..x+4.
  function automatic int frac_sample(int fx, int fy, int nb [8][8], bit raw = 0);
    int t [8];
    int v;
    if (fx == 0 && fy == 0) return nb[3][3];
    if (fy == 0) return clip_sel(hsum(fx, nb[3]), raw);
    if (fx == 0) begin
      v = 0;
      for (int k = 0; k < 8; k++) v += tap(fy, k) * nb[k][3];
      return clip_sel(v, raw);
    end
    for (int k = 0; k < 8; k++) t[k] = hsum(fx, nb[k]);
    v = 0;
    for (int k = 0; k < 8; k++) v += tap(fy, k) * t[k];
    return clip_sel(v >>> 6, raw);
  endfunction

  // Phase (fx, fy) of each of the 16 positions A, a, b, c, d, e, f, g,
  // h, i, j, k, n, p, q, r.
  function automatic int pos_fx(int p); return p % 4; endfunction
  function automatic int pos_fy(int p); return p / 4; endfunction

  function automatic int satd4(int cur [16], int pre [16]);
    int h [4][4] = '{'{1, 1, 1, 1}, '{1, -1, 1, -1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}};
    int d [4][4], m [4][4];
    int s = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) d[r][c] = cur[4*r+c] - pre[4*r+c];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        m[r][c] = 0;
        for (int k = 0; k < 4; k++) m[r][c] += h[r][k] * d[k][c];
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int v = 0;
        for (int k = 0; k < 4; k++) v += m[r][k] * h[c][k];
        s += (v < 0) ? -v : v;
      end
    return s;
  endfunction
endpackage
