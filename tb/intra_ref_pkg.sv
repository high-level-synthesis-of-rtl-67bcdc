// intra_ref_pkg: behavioural reference model of HEVC luma intra prediction and mode decision,
// used by the testbenches to work out expected values independently of the RTL.
// It follows the HEVC text directly: reference array ref[-N..2N] in picture coordinates,
// predSamples[x][y], horizontal modes computed by swapping the roles of x and y.
package intra_ref_pkg;

  typedef int ref_arr_t [65];
  typedef int blk_t [32][32];   // [y][x]

  function automatic int angle_of(input int mode);
    int t [35] = '{0, 0, 32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                   -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};
    return t[mode];
  endfunction

  function automatic int clip8(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // [1 2 1] smoothing of both reference sides (corner shared).
  function automatic void smooth(input int n, input ref_arr_t a, input ref_arr_t l,
                                 output ref_arr_t fa, output ref_arr_t fl);
    fa = a; fl = l;
    fa[0] = (l[1] + 2 * a[0] + a[1] + 2) / 4;
    fl[0] = fa[0];
    for (int i = 1; i < 2 * n; i++) begin
      fa[i] = (a[i - 1] + 2 * a[i] + a[i + 1] + 2) / 4;
      fl[i] = (l[i - 1] + 2 * l[i] + l[i + 1] + 2) / 4;
    end
  endfunction

  function automatic bit filtered_for(input int mode, input int n, input int thr);
    int dv, dh;
    if (mode == 1 || n == 4) return 0;
    dv = mode - 26; if (dv < 0) dv = -dv;
    dh = mode - 10; if (dh < 0) dh = -dh;
    return ((dv < dh) ? dv : dh) > thr;
  endfunction

  function automatic int log2i(input int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Prediction of one mode; a/l are the references the mode uses.
  function automatic void predict(input int mode, input int n, input ref_arr_t a,
                                  input ref_arr_t l, output blk_t p);
    int sh = log2i(n);
    p = '{default: 0};
    if (mode == 0) begin
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++)
          p[y][x] = ((n - 1 - x) * l[y + 1] + (x + 1) * a[n + 1] +
                     (n - 1 - y) * a[x + 1] + (y + 1) * l[n + 1] + n) >> (sh + 1);
    end else if (mode == 1) begin
      int s = n, dc;
      for (int i = 1; i <= n; i++) s += a[i] + l[i];
      dc = s >> (sh + 1);
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) p[y][x] = dc;
      if (n < 32) begin
        p[0][0] = (l[1] + 2 * dc + a[1] + 2) >> 2;
        for (int x = 1; x < n; x++) p[0][x] = (a[x + 1] + 3 * dc + 2) >> 2;
        for (int y = 1; y < n; y++) p[y][0] = (l[y + 1] + 3 * dc + 2) >> 2;
      end
    end else begin
      int ang = angle_of(mode);
      bit ver = mode >= 18;
      int rm [-32:64];               // ref[x] of the HEVC text
      int mainr [65], side [65];
      int q [32][32];                // [row along side][col along main]
      mainr = ver ? a : l;
      side  = ver ? l : a;
      for (int x = 0; x <= 2 * n; x++) rm[x] = mainr[x];
      if (ang < 0 && ((n * ang) >>> 5) < -1) begin
        int inv = (8192 + (-ang) / 2) / (-ang);   // |invAngle| = round(8192 / |angle|)
        for (int x = (n * ang) >>> 5; x <= -1; x++)
          rm[x] = side[(x * (-inv) + 128) >>> 8];
      end
      for (int r = 0; r < n; r++) begin
        int idx = ((r + 1) * ang) >>> 5;
        int f   = ((r + 1) * ang) & 31;
        for (int c = 0; c < n; c++) begin
          if (f != 0) q[r][c] = ((32 - f) * rm[c + idx + 1] + f * rm[c + idx + 2] + 16) >>> 5;
          else        q[r][c] = rm[c + idx + 1];
        end
      end
      if (ang == 0 && n < 32)
        for (int r = 0; r < n; r++) q[r][0] = clip8(mainr[1] + ((side[r + 1] - side[0]) >>> 1));
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) p[y][x] = ver ? q[y][x] : q[x][y];
    end
  endfunction

  // Pixel number i of the two-pixel output stream of a mode (k outer, j inner).
  function automatic int stream_pixel(input int mode, input int n, input blk_t p, input int i);
    int kk = i / n, jj = i % n;
    bit hor = (mode >= 2 && mode <= 17);
    return hor ? p[jj][kk] : p[kk][jj];
  endfunction

  function automatic int ratecost(input int m, input int c0, input int c1, input int c2);
    int r = (c0 == 63) ? 0 : 5;
    if (c0 == m) r = 1;
    else if (c1 == m || c2 == m) r = 2;
    return r;
  endfunction

  typedef int ctu_t [64][64];   // [row][col]

  // Whole mode decision of one block: filtering, 35 predictions, SAD against the original block
  // at (x, y) of the CTU, rate cost, lowest cost (lowest mode on ties).
  function automatic void decide(input int n, input ref_arr_t a, input ref_arr_t l, input int thr,
                                 input ctu_t orig, input int x, input int y,
                                 input int c0, input int c1, input int c2, input int lam,
                                 output int best, output int best_cost, output int best_rc);
    ref_arr_t fa, fl;
    blk_t p;
    int cost;
    smooth(n, a, l, fa, fl);
    best = -1; best_cost = 0;
    for (int m = 0; m < 35; m++) begin
      if (filtered_for(m, n, thr)) predict(m, n, fa, fl, p);
      else predict(m, n, a, l, p);
      cost = ratecost(m, c0, c1, c2) * lam;
      for (int yy = 0; yy < n; yy++)
        for (int xx = 0; xx < n; xx++) begin
          int d;
          d = orig[y + yy][x + xx] - p[yy][xx];
          cost += (d < 0) ? -d : d;
        end
      if (best < 0 || cost < best_cost) begin
        best = m;
        best_cost = cost;
      end
    end
    best_rc = ratecost(best, c0, c1, c2);
  endfunction

  // HEVC intraHorVerDistThres for luma: 7 for 8x8, 1 for 16x16, 0 for 32x32.
  function automatic int hevc_threshold(input int n);
    return (n == 8) ? 7 : ((n == 16) ? 1 : 0);
  endfunction

endpackage
