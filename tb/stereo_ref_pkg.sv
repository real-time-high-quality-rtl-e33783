// stereo_ref_pkg: plain software model of the stereo matching algorithm, used by the testbenches
// as the independent reference. It works on whole images with straightforward loops and knows
// nothing of bands, passes, segments or pipelines: only the algorithm (census, AD, robust
// tables, cross arms, vertical-then-horizontal aggregation, four-direction path costs, WTA,
// diagonal right-view disparity, consistency/uniqueness and outlier filling) and the one rule
// that depends on the segment width, the r2 path restart at a segment's last column.
package stereo_ref_pkg;
  import stereo_pkg::*;

  class stereo_ref;
    int W, H, ND, WSEG, LMAX, TAU, P1, P2, UNIQ_PCT;
    rgb_t L[][], R[][];           // [y][x]
    int lut_ad[256], lut_cs[25];
    int cost[][][];               // [y][x][d]
    int vup[][], vdn[][], hl[][], hr[][];
    int agg[][][];
    int cfin[][][];
    int dint[][], dsub[][], uniq[][], dr[][];
    int disp[][], outl[][];
    // statistics
    int n_uniq_fail, n_lr_fail, n_frac;

    function new(int w, int h, int nd, int wseg, int lmax, int tau, int p1, int p2, int uq);
      W = w; H = h; ND = nd; WSEG = wseg; LMAX = lmax; TAU = tau; P1 = p1; P2 = p2; UNIQ_PCT = uq;
      L = new[H]; R = new[H];
      foreach (L[y]) begin L[y] = new[W]; R[y] = new[W]; end
      // Robust tables: 127 * (1 - exp(-c/lambda)) by the integer recurrence of the spec.
      for (int c = 0; c < 256; c++) lut_ad[c] = rlut(c, 59299);
      for (int c = 0; c < 25; c++)  lut_cs[c] = rlut(c, 63387);
    endfunction

    static function int rlut(int c, longint decay);
      longint e = 65536;
      for (int i = 0; i < c; i++) e = (e * decay + 32768) >>> 16;
      return int'((127 * (65536 - e) + 32768) >>> 16);
    endfunction

    function int inimg(int x, int y);
      return x >= 0 && x < W && y >= 0 && y < H;
    endfunction

    static function int lum(rgb_t p);
      return (int'(p.r) + 2 * int'(p.g) + int'(p.b)) / 4;
    endfunction

    static function int adf(int a, int b);
      return a > b ? a - b : b - a;
    endfunction

    function int census(ref rgb_t img[][], input int x, int y);
      int v = 0, n = 0, c = lum(img[y][x]);
      for (int dy = -2; dy <= 2; dy++)
        for (int dx = -2; dx <= 2; dx++) begin
          if (dx == 0 && dy == 0) continue;
          if (inimg(x + dx, y + dy) && lum(img[y+dy][x+dx]) < c) v |= (1 << n);
          n++;
        end
      return v;
    endfunction

    function int close(rgb_t a, rgb_t b);
      int m = adf(a.r, b.r);
      if (adf(a.g, b.g) > m) m = adf(a.g, b.g);
      if (adf(a.b, b.b) > m) m = adf(a.b, b.b);
      return m < TAU;
    endfunction

    function void run();
      run_agg();
      run_sgm();
      run_post();
    endfunction

    // Census, initial costs, arms and aggregation.
    function void run_agg();
      int cl[][], cr[][];
      cl = new[H]; cr = new[H];
      foreach (cl[y]) begin
        cl[y] = new[W]; cr[y] = new[W];
        for (int x = 0; x < W; x++) begin cl[y][x] = census(L, x, y); cr[y][x] = census(R, x, y); end
      end
      // Initial costs.
      cost = new[H];
      foreach (cost[y]) begin
        cost[y] = new[W];
        foreach (cost[y][x]) begin
          cost[y][x] = new[ND];
          for (int d = 0; d < ND; d++) begin
            if (x - d < 0) cost[y][x][d] = 255;
            else begin
              int ad = (adf(L[y][x].r, R[y][x-d].r) + adf(L[y][x].g, R[y][x-d].g) +
                        adf(L[y][x].b, R[y][x-d].b)) / 3;
              cost[y][x][d] = lut_ad[ad] + lut_cs[$countones(cl[y][x] ^ cr[y][x-d])];
            end
          end
        end
      end
      // Arms.
      vup = new[H]; vdn = new[H]; hl = new[H]; hr = new[H];
      for (int y = 0; y < H; y++) begin
        vup[y] = new[W]; vdn[y] = new[W]; hl[y] = new[W]; hr[y] = new[W];
        for (int x = 0; x < W; x++) begin
          int k;
          k = 0; while (k < LMAX && inimg(x, y-k-1) && close(L[y-k-1][x], L[y][x])) k++; vup[y][x] = k;
          k = 0; while (k < LMAX && inimg(x, y+k+1) && close(L[y+k+1][x], L[y][x])) k++; vdn[y][x] = k;
          k = 0; while (k < LMAX && inimg(x-k-1, y) && close(L[y][x-k-1], L[y][x])) k++; hl[y][x] = k;
          k = 0; while (k < LMAX && inimg(x+k+1, y) && close(L[y][x+k+1], L[y][x])) k++; hr[y][x] = k;
        end
      end
      // Aggregation: vertical arms first, then the horizontal arm.
      agg = new[H];
      for (int y = 0; y < H; y++) begin
        agg[y] = new[W];
        for (int x = 0; x < W; x++) begin
          agg[y][x] = new[ND];
          for (int d = 0; d < ND; d++) begin
            int s = 0, n = 0;
            for (int q = x - hl[y][x]; q <= x + hr[y][x]; q++) begin
              for (int yy = y - vup[y][q]; yy <= y + vdn[y][q]; yy++) s += cost[yy][q][d];
              n += vup[y][q] + vdn[y][q] + 1;
            end
            agg[y][x][d] = s / n;
          end
        end
      end
    endfunction

    // Path costs from agg: r0 upper-left, r1 up, r2 upper-right, r3 left.
    function void run_sgm();
      int Lr[4][][][];
      for (int r = 0; r < 4; r++) begin
        Lr[r] = new[H];
        foreach (Lr[r][y]) begin
          Lr[r][y] = new[W];
          foreach (Lr[r][y][x]) Lr[r][y][x] = new[ND];
        end
      end
      cfin = new[H];
      for (int y = 0; y < H; y++) begin
        cfin[y] = new[W];
        for (int x = 0; x < W; x++) begin
          cfin[y][x] = new[ND];
          for (int r = 0; r < 4; r++) begin
            int px, py, rs, pm;
            case (r)
              0: begin px = x - 1; py = y - 1; rs = (x == 0 || y == 0); end
              1: begin px = x;     py = y - 1; rs = (y == 0); end
              2: begin px = x + 1; py = y - 1; rs = (y == 0 || x % WSEG == WSEG - 1 || x == W - 1); end
              default: begin px = x - 1; py = y; rs = (x == 0); end
            endcase
            if (!rs) begin
              pm = 1 << 30;
              for (int d = 0; d < ND; d++) if (Lr[r][py][px][d] < pm) pm = Lr[r][py][px][d];
            end
            for (int d = 0; d < ND; d++) begin
              int v;
              if (rs) v = agg[y][x][d];
              else begin
                int b = pm + P2;
                if (Lr[r][py][px][d] < b) b = Lr[r][py][px][d];
                if (d > 0 && Lr[r][py][px][d-1] + P1 < b) b = Lr[r][py][px][d-1] + P1;
                if (d < ND - 1 && Lr[r][py][px][d+1] + P1 < b) b = Lr[r][py][px][d+1] + P1;
                v = agg[y][x][d] + b - pm;
              end
              if (v > 255) v = 255;
              Lr[r][y][x][d] = v;
            end
          end
          for (int d = 0; d < ND; d++)
            cfin[y][x][d] = Lr[0][y][x][d] + Lr[1][y][x][d] + Lr[2][y][x][d] + Lr[3][y][x][d];
        end
      end
    endfunction

    // WTA, uniqueness, sub-pixel, right-view disparity, outlier handling, from cfin.
    function void run_post();
      dint = new[H]; dsub = new[H]; uniq = new[H]; dr = new[H]; disp = new[H]; outl = new[H];
      n_uniq_fail = 0; n_lr_fail = 0; n_frac = 0;
      for (int y = 0; y < H; y++) begin
        dint[y] = new[W]; dsub[y] = new[W]; uniq[y] = new[W]; dr[y] = new[W];
        disp[y] = new[W]; outl[y] = new[W];
        for (int x = 0; x < W; x++) begin
          int s[3];
          wta(cfin[y][x], s);
          dint[y][x] = s[0]; dsub[y][x] = s[1]; uniq[y][x] = s[2];
          if (!s[2]) n_uniq_fail++;
        end
        // Right-view disparity along the diagonal.
        for (int xr = 0; xr < W; xr++) begin
          int bc = 1 << 30, bd = 0;
          for (int d = 0; d < ND && xr + d < W; d++)
            if (cfin[y][xr+d][d] < bc) begin bc = cfin[y][xr+d][d]; bd = d; end
          dr[y][xr] = bd;
        end
        // Outliers and filling.
        begin
          int ok[] = new[W];
          for (int x = 0; x < W; x++) begin
            int xr = x - dint[y][x];
            int c = (xr >= 0) && (adf(dint[y][x], dr[y][xr]) <= 1);
            if (uniq[y][x] && !c) n_lr_fail++;
            ok[x] = uniq[y][x] && c;
          end
          for (int x = 0; x < W; x++) begin
            if (ok[x]) begin disp[y][x] = dsub[y][x]; outl[y][x] = 0; end
            else begin
              int lv = -1, rv = -1;
              for (int q = x - 1; q >= 0; q--) if (ok[q]) begin lv = dsub[y][q]; break; end
              for (int q = x + 1; q < W; q++) if (ok[q]) begin rv = dsub[y][q]; break; end
              if (lv >= 0 && rv >= 0) disp[y][x] = lv < rv ? lv : rv;
              else if (lv >= 0) disp[y][x] = lv;
              else if (rv >= 0) disp[y][x] = rv;
              else disp[y][x] = 0;
              outl[y][x] = 1;
            end
            if (disp[y][x] % 16 != 0) n_frac++;
          end
        end
      end
    endfunction

    // s[0] = best d, s[1] = sub-pixel (x16), s[2] = unique
    function void wta(int c[], output int s[3]);
      int best = 0, sec = 1 << 10, off = 0;
      for (int d = 1; d < ND; d++) if (c[d] < c[best]) best = d;
      for (int d = 0; d < ND; d++) if ((d < best - 1 || d > best + 1) && c[d] < sec) sec = c[d];
      if (best > 0 && best < ND - 1) begin
        int den = c[best-1] + c[best+1] - 2 * c[best];
        if (den > 0) off = ((c[best-1] - c[best+1]) * 8) / den;
      end
      s[0] = best;
      s[1] = best * 16 + off;
      s[2] = (c[best] * 100) < (sec * (100 - UNIQ_PCT));
    endfunction
  endclass

endpackage
