// avc_ref_pkg -- reference models used by the testbenches.
//
// Written directly from the H.264 equations, independently of the RTL:
//   * luma quarter-sample and chroma eighth-sample prediction of one 4x4
//     block from its integer-pixel window (the chroma model uses the 2-D
//     bilinear formula, the RTL the separable form);
//   * inverse quantisation and inverse transform of one MB (the model uses
//     the LevelScale = 16*v formulation with its own rounding, the RTL the
//     reduced one);
//   * deblocking of one MB held with its top and left boundary.
package avc_ref_pkg;

  function automatic int clip255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // ------------------------------------------------------------- luma MC
  typedef int win9_t [9][9];
  typedef int blk4_t [4][4];

  // Window pixel at block-relative position (y, x), y,x in -2..6.
  function automatic int fpix(input win9_t w, input int y, input int x);
    return w[y + 2][x + 2];
  endfunction
  function automatic int tap6(input int a, input int b, input int c,
                              input int d, input int e, input int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int hb1(input win9_t w, input int y, input int x);
    return tap6(fpix(w,y,x-2), fpix(w,y,x-1), fpix(w,y,x), fpix(w,y,x+1), fpix(w,y,x+2), fpix(w,y,x+3));
  endfunction
  function automatic int vh1(input win9_t w, input int y, input int x);
    return tap6(fpix(w,y-2,x), fpix(w,y-1,x), fpix(w,y,x), fpix(w,y+1,x), fpix(w,y+2,x), fpix(w,y+3,x));
  endfunction

  function automatic blk4_t ref_luma(input win9_t w, input int fx, input int fy);
    blk4_t o;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int G, H, M, b, h, s, m, j, jj;
        G = fpix(w, y, x); H = fpix(w, y, x+1); M = fpix(w, y+1, x);
        b = clip255((hb1(w, y, x) + 16) >>> 5);
        s = clip255((hb1(w, y+1, x) + 16) >>> 5);
        h = clip255((vh1(w, y, x) + 16) >>> 5);
        m = clip255((vh1(w, y, x+1) + 16) >>> 5);
        jj = tap6(hb1(w,y-2,x), hb1(w,y-1,x), hb1(w,y,x), hb1(w,y+1,x), hb1(w,y+2,x), hb1(w,y+3,x));
        j = clip255((jj + 512) >>> 10);
        case (fy*4 + fx)
          0:  o[y][x] = G;
          1:  o[y][x] = (G + b + 1) >> 1;   // a
          2:  o[y][x] = b;
          3:  o[y][x] = (H + b + 1) >> 1;   // c
          4:  o[y][x] = (G + h + 1) >> 1;   // d
          5:  o[y][x] = (b + h + 1) >> 1;   // e
          6:  o[y][x] = (b + j + 1) >> 1;   // f
          7:  o[y][x] = (b + m + 1) >> 1;   // g
          8:  o[y][x] = h;
          9:  o[y][x] = (h + j + 1) >> 1;   // i
          10: o[y][x] = j;
          11: o[y][x] = (j + m + 1) >> 1;   // k
          12: o[y][x] = (M + h + 1) >> 1;   // n
          13: o[y][x] = (h + s + 1) >> 1;   // p
          14: o[y][x] = (j + s + 1) >> 1;   // q
          default: o[y][x] = (m + s + 1) >> 1;  // r
        endcase
      end
    return o;
  endfunction

  // ----------------------------------------------------------- chroma MC
  typedef int win5_t [5][5];
  function automatic blk4_t ref_chroma(input win5_t w, input int dx, input int dy);
    blk4_t o;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        o[y][x] = ((8-dx)*(8-dy)*w[y][x] + dx*(8-dy)*w[y][x+1] +
                   (8-dx)*dy*w[y+1][x] + dx*dy*w[y+1][x+1] + 32) >> 6;
    return o;
  endfunction

  // ------------------------------------------------------- IQ and IDCT
  typedef int mb_coef_t [24][16];

  function automatic int vtab(input int m, input int cls);
    int t [6][3];
    t = '{'{10,13,16}, '{11,14,18}, '{13,16,20}, '{14,18,23}, '{16,20,25}, '{18,23,29}};
    return t[m][cls];
  endfunction
  function automatic int level_scale(input int qp, input int i, input int j);
    int cls;
    cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
    return 16 * vtab(qp % 6, cls);
  endfunction

  // One inverse 4x4 transform of a dequantised block, with final rounding.
  function automatic blk4_t idct4(input blk4_t d);
    blk4_t f, g, r;
    for (int i = 0; i < 4; i++) begin
      int e0, e1, e2, e3;
      e0 = d[i][0] + d[i][2];
      e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3];
      e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      int g0, g1, g2, g3;
      g0 = f[0][j] + f[2][j];
      g1 = f[0][j] - f[2][j];
      g2 = (f[1][j] >>> 1) - f[3][j];
      g3 = f[1][j] + (f[3][j] >>> 1);
      g[0][j] = g0 + g3; g[1][j] = g1 + g2; g[2][j] = g1 - g2; g[3][j] = g0 - g3;
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) r[i][j] = (g[i][j] + 32) >>> 6;
    return r;
  endfunction

  // lv[b][4*i+j]: level of block b (0..15 luma raster, 16..19 Cb, 20..23 Cr)
  // at row i, column j.  Uncoded blocks (mask bit 0) are treated as zero
  // except for their DC from a DC transform.
  function automatic mb_coef_t ref_iqidct(input mb_coef_t lv, input int mask,
                                          input bit intra16, input int qpy, input int qpc);
    mb_coef_t res;
    int dcy [4][4];
    int dcc [2][4];
    int Hm [4][4];
    Hm = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    // luma DC: f = H c H (H symmetric), then scaling
    if (intra16) begin
      int c [4][4];
      int t [4][4];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) c[i][j] = lv[4*i + j][0];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += Hm[i][k] * c[k][j];
      end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        int f;
        f = 0;
        for (int k = 0; k < 4; k++) f += t[i][k] * Hm[k][j];
        if (qpy >= 36) dcy[i][j] = (f * level_scale(qpy, 0, 0)) <<< (qpy/6 - 6);
        else           dcy[i][j] = (f * level_scale(qpy, 0, 0) + (1 <<< (5 - qpy/6))) >>> (6 - qpy/6);
      end
    end
    for (int k = 0; k < 2; k++) begin
      int c0, c1, c2, c3;
      int f [4];
      c0 = lv[16 + 4*k][0]; c1 = lv[17 + 4*k][0]; c2 = lv[18 + 4*k][0]; c3 = lv[19 + 4*k][0];
      f[0] = c0 + c1 + c2 + c3; f[1] = c0 - c1 + c2 - c3;
      f[2] = c0 + c1 - c2 - c3; f[3] = c0 - c1 - c2 + c3;
      for (int i = 0; i < 4; i++)
        dcc[k][i] = ((f[i] * level_scale(qpc, 0, 0)) <<< (qpc/6)) >>> 5;
    end
    for (int b = 0; b < 24; b++) begin
      blk4_t d, r;
      int qp;
      bit coded;
      qp    = (b < 16) ? qpy : qpc;
      coded = mask[b];
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int c;
          c = coded ? lv[b][4*i + j] : 0;
          if (qp >= 24) d[i][j] = (c * level_scale(qp, i, j)) <<< (qp/6 - 4);
          else          d[i][j] = (c * level_scale(qp, i, j) + (1 <<< (3 - qp/6))) >>> (4 - qp/6);
        end
      if (b < 16 && intra16) d[0][0] = dcy[b / 4][b % 4];
      if (b >= 16)           d[0][0] = dcc[(b - 16) / 4][(b - 16) % 4];
      r = idct4(d);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) res[b][4*i + j] = r[i][j];
    end
    return res;
  endfunction

  // -------------------------------------------------------- loop filter
  int ALPHA [52];
  int BETA  [52];
  int TC0   [52][3];

  function automatic void init_tables();
    int a [36];
    int bt [36];
    int t [35][3];
    a  = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,
           101,113,127,144,162,182,203,226,255,255};
    bt = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,
           16,16,17,17,18,18};
    t  = '{'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},
           '{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},'{1,2,3},
           '{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},'{4,5,7},
           '{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},
           '{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};
    for (int q = 0; q < 52; q++) begin
      ALPHA[q] = (q < 16) ? 0 : a[q - 16];
      BETA[q]  = (q < 16) ? 0 : bt[q - 16];
      for (int k = 0; k < 3; k++) TC0[q][k] = (q < 17) ? 0 : t[q - 17][k];
    end
  endfunction

  // Filter one line; p[0..3], q[0..3] nearest-first, modified in place.
  // Returns 1 when the line was filtered.
  function automatic bit filt_line(inout int p [4], inout int q [4],
                                   input int bs, input int qp, input bit chroma);
    int al, be, tc0, tc, dlt, ap, aq;
    int P [4];
    int Q [4];
    P = p; Q = q;
    al = ALPHA[qp]; be = BETA[qp];
    if (bs == 0) return 0;
    if (!(iabs(P[0]-Q[0]) < al && iabs(P[1]-P[0]) < be && iabs(Q[1]-Q[0]) < be)) return 0;
    ap = iabs(P[2]-P[0]); aq = iabs(Q[2]-Q[0]);
    if (bs < 4) begin
      tc0 = TC0[qp][bs-1];
      tc  = chroma ? tc0 + 1 : tc0 + (ap < be) + (aq < be);
      dlt = clip3(-tc, tc, ((((Q[0]-P[0]) * 4) + (P[1]-Q[1]) + 4) >>> 3));
      p[0] = clip255(P[0] + dlt);
      q[0] = clip255(Q[0] - dlt);
      if (!chroma && ap < be) p[1] = P[1] + clip3(-tc0, tc0, (P[2] + ((P[0]+Q[0]+1) >>> 1) - 2*P[1]) >>> 1);
      if (!chroma && aq < be) q[1] = Q[1] + clip3(-tc0, tc0, (Q[2] + ((P[0]+Q[0]+1) >>> 1) - 2*Q[1]) >>> 1);
    end else if (chroma) begin
      p[0] = (2*P[1] + P[0] + Q[1] + 2) >>> 2;
      q[0] = (2*Q[1] + Q[0] + P[1] + 2) >>> 2;
    end else begin
      bit flat;
      flat = iabs(P[0]-Q[0]) < ((al >>> 2) + 2);
      if (ap < be && flat) begin
        p[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) >>> 3;
        p[1] = (P[2] + P[1] + P[0] + Q[0] + 2) >>> 2;
        p[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) >>> 3;
      end else p[0] = (2*P[1] + P[0] + Q[1] + 2) >>> 2;
      if (aq < be && flat) begin
        q[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) >>> 3;
        q[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) >>> 2;
        q[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) >>> 3;
      end else q[0] = (2*Q[1] + Q[0] + P[1] + 2) >>> 2;
    end
    return 1;
  endfunction

  // A plane with its boundary: luma [20][20] indexed [y+4][x+4], chroma
  // [10][10] indexed [y+2][x+2].  bsv/bsh[edge][segment].  qp[0] inside,
  // qp[1] left edge, qp[2] top edge.  Returns the number of filtered lines
  // with bS = 4 in n_strong and with bS 1..3 in n_normal.
  typedef int plane_t [20][20];
  function automatic void ref_lf_plane(inout plane_t pl, input int bsv [4][4], input int bsh [4][4],
                                       input int qp [3], input bit chroma,
                                       inout int n_strong, inout int n_normal);
    int n, off, ne;
    n   = chroma ? 8 : 16;
    off = chroma ? 2 : 4;
    ne  = chroma ? 2 : 4;
    for (int dir = 0; dir < 2; dir++)
      for (int e = 0; e < ne; e++)
        for (int l = 0; l < n; l++) begin
          int p [4];
          int q [4];
          int bs, q_;
          int le;
          le = chroma ? 2*e : e;
          bs = (dir == 0) ? bsv[le][chroma ? l/2 : l/4] : bsh[le][chroma ? l/2 : l/4];
          q_ = (e == 0) ? qp[dir == 0 ? 1 : 2] : qp[0];
          for (int i = 0; i < 4; i++) begin
            int ii;
            ii = (chroma && i > 1) ? 1 : i;
            if (dir == 0) begin
              p[i] = pl[l + off][4*e - 1 - ii + off];
              q[i] = pl[l + off][4*e + ii + off];
            end else begin
              p[i] = pl[4*e - 1 - ii + off][l + off];
              q[i] = pl[4*e + ii + off][l + off];
            end
          end
          if (filt_line(p, q, bs, q_, chroma)) begin
            if (bs == 4) n_strong++; else n_normal++;
          end
          for (int i = 0; i < (chroma ? 1 : 3); i++) begin
            if (dir == 0) begin
              pl[l + off][4*e - 1 - i + off] = p[i];
              pl[l + off][4*e + i + off]     = q[i];
            end else begin
              pl[4*e - 1 - i + off][l + off] = p[i];
              pl[4*e + i + off][l + off]     = q[i];
            end
          end
        end
  endfunction

endpackage
