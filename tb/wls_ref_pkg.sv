// wls_ref_pkg: reference model of the depth-map post-filter for the testbenches.
//
// Plain sequential code written from the formulas, not from the RTL structure:
//   discontinuity  max(0, 1 - var/1000) over a 3x3 window, borders replicated
//   confidence     min(disc_L, disc_R) * 255, and left disparity * confidence
//   weights        exp(-|g_p - g_q| / sigma)
//   1D solve       Thomas algorithm on (I + lambda*A) u = d, forward sweep cut
//                  in two halves that each start afresh, full backward sweep;
//                  with split = 0 the forward sweep runs whole (exact solve)
//   output         filtered(disparity*conf) / filtered(conf)
// The fixed-point rounding is the one documented in the RTL headers (Q1.16
// weights, Q16.8 data, Q0.32 reciprocal), so results can be compared exactly.
package wls_ref_pkg;

  typedef logic [127:0] u128;

  function automatic longint ref_disc(int px [9], int scale);
    longint s1 = 0, s2 = 0, num, den;
    for (int i = 0; i < 9; i++) begin
      s1 += px[i];
      s2 += px[i] * px[i];
    end
    num = 9 * s2 - s1 * s1;
    den = 81 * longint'(scale);
    if (num >= den) return 0;
    return 65536 - (num * 65536) / den;
  endfunction

  function automatic int ref_conf(longint dl, longint dr);
    longint m = (dl < dr) ? dl : dr;
    return int'((m * 255 + 32768) >>> 16);
  endfunction

  function automatic longint ref_weight(int a, int b, real sigma);
    int d = (a > b) ? a - b : b - a;
    return longint'($rtoi($exp(-real'(d) / sigma) * 65536.0 + 0.5));
  endfunction

  // One forward step. e_prev/dp_prev are the previous pixel's results.
  function automatic void ref_fwd(input longint lambda, input bit first,
                                  input longint d0, input longint d1,
                                  input longint wl, input longint wr,
                                  input longint e_prev, input longint dp0_prev,
                                  input longint dp1_prev, output longint e,
                                  output longint dp0, output longint dp1);
    u128 lwl, lwr, den, rc, t;
    lwl = first ? 0 : u128'(lambda) * u128'(wl);
    lwr = u128'(lambda) * u128'(wr);
    den = 65536 + lwr + ((lwl * (65536 - u128'(e_prev)) + 32768) >> 16);
    rc  = (u128'(1) << 48) / den;
    e   = longint'((lwr * rc + (u128'(1) << 31)) >> 32);
    t   = (((u128'(d0) << 16) + lwl * u128'(dp0_prev)) * rc + (u128'(1) << 47)) >> 48;
    dp0 = (t > 24'hFFFFFF) ? 64'hFFFFFF : longint'(t);
    t   = (((u128'(d1) << 16) + lwl * u128'(dp1_prev)) * rc + (u128'(1) << 47)) >> 48;
    dp1 = (t > 24'hFFFFFF) ? 64'hFFFFFF : longint'(t);
  endfunction

  function automatic longint ref_bwd(longint dp, longint e, longint u_next);
    longint r;
    r = dp + ((e * u_next + 32768) >>> 16);
    return (r > 64'hFFFFFF) ? 64'hFFFFFF : r;
  endfunction

  // Solve one line in place: d0/d1 data channels, g guide, n pixels.
  function automatic void ref_line(input longint lambda, input real sigma,
                                   input int n, ref longint d0 [], ref longint d1 [],
                                   ref int g [], input bit split = 1);
    longint e [] = new[n];
    longint p0 [] = new[n];
    longint p1 [] = new[n];
    int half = split ? n / 2 : n;
    for (int seg = 0; seg < n / half; seg++) begin
      for (int i = 0; i < half; i++) begin
        int x = seg * half + i;
        longint wl = (i == 0) ? 0 : ref_weight(g[x-1], g[x], sigma);
        longint wr = (x == n - 1) ? 0 : ref_weight(g[x], g[x+1], sigma);
        longint ep = (i == 0) ? 0 : e[x-1];
        longint q0 = (i == 0) ? 0 : p0[x-1];
        longint q1 = (i == 0) ? 0 : p1[x-1];
        ref_fwd(lambda, i == 0, d0[x], d1[x], wl, wr, ep, q0, q1, e[x], p0[x], p1[x]);
      end
    end
    d0[n-1] = p0[n-1];
    d1[n-1] = p1[n-1];
    for (int x = n - 2; x >= 0; x--) begin
      d0[x] = ref_bwd(p0[x], e[x], d0[x+1]);
      d1[x] = ref_bwd(p1[x], e[x], d1[x+1]);
    end
  endfunction

  // Vertical then horizontal pass over a w x h frame (raster-order arrays).
  function automatic void ref_wls(input longint lambda, input real sigma,
                                  input int w, input int h,
                                  ref longint c0 [], ref longint c1 [], ref int g [],
                                  input bit split = 1);
    longint a0 [], a1 [];
    int gg [];
    a0 = new[h]; a1 = new[h]; gg = new[h];
    for (int x = 0; x < w; x++) begin
      for (int y = 0; y < h; y++) begin
        a0[y] = c0[y*w + x]; a1[y] = c1[y*w + x]; gg[y] = g[y*w + x];
      end
      ref_line(lambda, sigma, h, a0, a1, gg, split);
      for (int y = 0; y < h; y++) begin
        c0[y*w + x] = a0[y]; c1[y*w + x] = a1[y];
      end
    end
    a0 = new[w]; a1 = new[w]; gg = new[w];
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        a0[x] = c0[y*w + x]; a1[x] = c1[y*w + x]; gg[x] = g[y*w + x];
      end
      ref_line(lambda, sigma, w, a0, a1, gg, split);
      for (int x = 0; x < w; x++) begin
        c0[y*w + x] = a0[x]; c1[y*w + x] = a1[x];
      end
    end
  endfunction

  function automatic int ref_div(longint c0, longint c1);
    longint q;
    if (c0 == 0) return 0;
    q = (c1 + (c0 >>> 1)) / c0;
    return (q > 255) ? 255 : int'(q);
  endfunction

  // Discontinuity of pixel (x, y) of a w x h map with replicated borders.
  function automatic longint ref_disc_at(ref int m [], input int w, input int h,
                                         input int x, input int y, input int scale);
    int px [9];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int xx = x + dx, yy = y + dy;
        if (xx < 0) xx = 0;
        if (xx >= w) xx = w - 1;
        if (yy < 0) yy = 0;
        if (yy >= h) yy = h - 1;
        px[(dy+1)*3 + dx + 1] = m[yy*w + xx];
      end
    return ref_disc(px, scale);
  endfunction

  // Whole post-filter: disparity maps dl, dr and guide g in, filtered map out.
  function automatic void ref_frame(input longint lambda, input real sigma,
                                    input int scale, input int w, input int h,
                                    ref int dl [], ref int dr [], ref int g [],
                                    ref int out [], input bit split = 1);
    longint c0 [] = new[w*h];
    longint c1 [] = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int cf = ref_conf(ref_disc_at(dl, w, h, x, y, scale),
                          ref_disc_at(dr, w, h, x, y, scale));
        c0[y*w + x] = longint'(cf) << 8;
        c1[y*w + x] = longint'(cf * dl[y*w + x]) << 8;
      end
    ref_wls(lambda, sigma, w, h, c0, c1, g, split);
    out = new[w*h];
    for (int i = 0; i < w*h; i++) out[i] = ref_div(c0[i], c1[i]);
  endfunction

endpackage
