// tb_ref_pkg: reference models used by the testbenches.
//
// Plain loops over arrays, written independently of the RTL structure:
//   fs_ref   +-8 x +-8 full search on a 32x32 window: best frame, top-field
//            (even rows) and bottom-field (odd rows) vectors, ties to the
//            smaller (dy, dx);
//   hp_ref   half-pel refinement around an integer vector, MPEG-2 rounding,
//            positions needing pixels outside the window skipped;
//   dds_ref  the 1D diamond search on the decimated layer.
package tb_ref_pkg;
  import meh_pkg::*;

  typedef byte unsigned win1_t [32][32];
  typedef byte unsigned tpl1_t [16][16];
  typedef byte unsigned win2_t [72][144];
  typedef byte unsigned tpl2_t [8][8];

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic void fs_ref(input win1_t w, input tpl1_t t,
                                 output mv_t fmv, output int fsad,
                                 output mv_t tmv, output int tsad,
                                 output mv_t bmv, output int bsad);
    fsad = 1 << 30; tsad = 1 << 30; bsad = 1 << 30;
    fmv = '0; tmv = '0; bmv = '0;
    for (int dy = -8; dy <= 8; dy++)
      for (int dx = -8; dx <= 8; dx++) begin
        int st, sb;
        st = 0; sb = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int d;
            d = absdiff(t[i][j], w[i+dy+8][j+dx+8]);
            if (i % 2 == 0) st += d; else sb += d;
          end
        if (st + sb < fsad) begin fsad = st + sb; fmv = '{x: 8'(dx), y: 8'(dy)}; end
        if (st < tsad)      begin tsad = st;      tmv = '{x: 8'(dx), y: 8'(dy)}; end
        if (sb < bsad)      begin bsad = sb;      bmv = '{x: 8'(dx), y: 8'(dy)}; end
      end
  endfunction

  function automatic int int_sad_ref(input win1_t w, input tpl1_t t, input int dx, input int dy);
    int s;
    s = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) s += absdiff(t[i][j], w[i+dy+8][j+dx+8]);
    return s;
  endfunction

  // value of the window at half-pel coordinates (2*col + hx, 2*row + hy)
  function automatic int half_pix(input win1_t w, input int r, input int c, input int hx, input int hy);
    int r2, c2;
    r2 = r + ((hy > 0) ? 1 : (hy < 0 ? -1 : 0));
    c2 = c + ((hx > 0) ? 1 : (hx < 0 ? -1 : 0));
    if (hx == 0 && hy == 0) return w[r][c];
    if (hy == 0) return (w[r][c] + w[r][c2] + 1) / 2;
    if (hx == 0) return (w[r][c] + w[r2][c] + 1) / 2;
    return (w[r][c] + w[r][c2] + w[r2][c] + w[r2][c2] + 2) / 4;
  endfunction

  function automatic void hp_ref(input win1_t w, input tpl1_t t, input mv_t imv, input int isad,
                                 output mv_t hmv, output int hsad, output int n_skipped);
    int hys[8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int hxs[8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    hsad = isad;
    hmv  = '{x: 8'(2 * int'(imv.x)), y: 8'(2 * int'(imv.y))};
    n_skipped = 0;
    for (int p = 0; p < 8; p++) begin
      int s, dx, dy;
      dx = imv.x; dy = imv.y;
      if (dx + hxs[p] < -8 || dx + hxs[p] > 8 || dy + hys[p] < -8 || dy + hys[p] > 8) begin
        n_skipped++;
        continue;
      end
      s = 0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          s += absdiff(t[i][j], half_pix(w, i + dy + 8, j + dx + 8, hxs[p], hys[p]));
      if (s < hsad) begin
        hsad = s;
        hmv  = '{x: 8'(2 * dx + hxs[p]), y: 8'(2 * dy + hys[p])};
      end
    end
  endfunction

  function automatic int sad2(input win2_t w, input tpl2_t t, input int vx, input int vy,
                              input int rx, input int ry);
    int s;
    s = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) s += absdiff(t[i][j], w[i + vy + ry][j + vx + rx]);
    return s;
  endfunction

  function automatic void dds_ref(input win2_t w, input tpl2_t t, input mv_t cand[4],
                                  input int rx, input int ry, input int steps, input int max_iter,
                                  output mv_t bmv, output int bsad,
                                  output int n_evals, output int n_lines);
    int cx, cy, cs;
    int ddx[4] = '{1, -1, 0, 0};
    int ddy[4] = '{0, 0, 1, -1};
    n_evals = 0; n_lines = 0;
    cs = 1 << 30; cx = 0; cy = 0;
    for (int i = 0; i < 4; i++) begin
      int x, y, s;
      x = cand[i].x; y = cand[i].y;
      if (x > rx) x = rx; if (x < -rx) x = -rx;
      if (y > ry) y = ry; if (y < -ry) y = -ry;
      s = sad2(w, t, x, y, rx, ry); n_evals++;
      if (i == 0 || s < cs) begin cs = s; cx = x; cy = y; end
    end
    for (int it = 0; it < max_iter; it++) begin
      int bs, bd, lx, ly;
      bs = 1 << 30; bd = -1;
      for (int d = 0; d < 4; d++) begin
        int x, y, s;
        x = cx + ddx[d]; y = cy + ddy[d];
        if (x > rx || x < -rx || y > ry || y < -ry) continue;
        s = sad2(w, t, x, y, rx, ry); n_evals++;
        if (s < bs) begin bs = s; bd = d; end
      end
      if (bd < 0 || bs >= cs) break;
      n_lines++;
      lx = cx + ddx[bd]; ly = cy + ddy[bd];
      for (int k = 2; k <= steps; k++) begin
        int x, y, s;
        x = cx + k * ddx[bd]; y = cy + k * ddy[bd];
        if (x > rx || x < -rx || y > ry || y < -ry) break;
        s = sad2(w, t, x, y, rx, ry); n_evals++;
        if (s < bs) begin bs = s; lx = x; ly = y; end
      end
      cx = lx; cy = ly; cs = bs;
    end
    bmv = '{x: 8'(cx), y: 8'(cy)};
    bsad = cs;
  endfunction

endpackage
