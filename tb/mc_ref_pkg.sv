// Reference models used by the testbenches: H.264 4x4 transform and
// quantization, intra 4x4 and 16x16 prediction, the 3-step intra 4x4 search
// and a stand-in bit count for the variable length coder. They are written
// from the equations as plain integer arithmetic on arrays, independently of
// the RTL's structure.
package mc_ref_pkg;

  typedef int blk16_t [16];

  // ---------------------------------------------------------------- DQ
  function automatic int mf_tab(int r, int pos);
    int t[6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                    '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
    int i = pos / 4, j = pos % 4;
    int cls = ((i & 1) == 0 && (j & 1) == 0) ? 0 : (((i & 1) == 1 && (j & 1) == 1) ? 1 : 2);
    return t[r][cls];
  endfunction
  function automatic int v_tab(int r, int pos);
    int t[6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                    '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    int i = pos / 4, j = pos % 4;
    int cls = ((i & 1) == 0 && (j & 1) == 0) ? 0 : (((i & 1) == 1 && (j & 1) == 1) ? 1 : 2);
    return t[r][cls];
  endfunction

  // forward: Y = C X C^T with C the H.264 core matrix
  function automatic void ref_dq(input blk16_t res, input int qp, input bit intra,
                                 output blk16_t lvl, output blk16_t rres);
    int C[4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int T[16], Y[16], W[16], F[16], X[16];
    int qb = 15 + qp / 6, f = intra ? (1 << qb) / 3 : (1 << qb) / 6;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        T[4*i+j] = 0;
        for (int k = 0; k < 4; k++) T[4*i+j] += C[i][k] * res[4*k+j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        Y[4*i+j] = 0;
        for (int k = 0; k < 4; k++) Y[4*i+j] += T[4*i+k] * C[j][k];
      end
    for (int p = 0; p < 16; p++) begin
      int a = Y[p] < 0 ? -Y[p] : Y[p];
      int z = (a * mf_tab(qp % 6, p) + f) >> qb;
      lvl[p] = Y[p] < 0 ? -z : z;
      W[p] = lvl[p] * v_tab(qp % 6, p) * (1 << (qp / 6));
    end
    // inverse transform, horizontal then vertical (H.264 8.5.12.2)
    for (int i = 0; i < 4; i++) begin
      int e0 = W[4*i] + W[4*i+2], e1 = W[4*i] - W[4*i+2];
      int e2 = (W[4*i+1] >>> 1) - W[4*i+3], e3 = W[4*i+1] + (W[4*i+3] >>> 1);
      F[4*i] = e0 + e3; F[4*i+1] = e1 + e2; F[4*i+2] = e1 - e2; F[4*i+3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      int g0 = F[j] + F[8+j], g1 = F[j] - F[8+j];
      int g2 = (F[4+j] >>> 1) - F[12+j], g3 = F[4+j] + (F[12+j] >>> 1);
      X[j] = g0 + g3; X[4+j] = g1 + g2; X[8+j] = g1 - g2; X[12+j] = g0 - g3;
    end
    for (int p = 0; p < 16; p++) rres[p] = (X[p] + 32) >>> 6;
  endfunction

  // ---------------------------------------------------------------- intra 4x4
  // e[] is the edge: e[0..3] = left[3..0], e[4] = corner, e[5..12] = top[0..7]
  function automatic void ref_i4(input int top[8], input int left[4], input int corner,
                                 input int mode, output blk16_t pred);
    int e[13];
    int dc = 4;
    for (int k = 0; k < 4; k++) e[k] = left[3-k];
    e[4] = corner;
    for (int k = 0; k < 8; k++) e[5+k] = top[k];
    for (int k = 0; k < 4; k++) dc += top[k] + left[k];
    dc >>= 3;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int v = 0, c, zz;
        case (mode)
          0: v = top[x];
          1: v = left[y];
          2: v = dc;
          3: v = (x == 3 && y == 3) ? (top[6] + 3*top[7] + 2) >> 2
                                    : (top[x+y] + 2*top[x+y+1] + top[x+y+2] + 2) >> 2;
          4: begin c = 4 + x - y; v = (e[c-1] + 2*e[c] + e[c+1] + 2) >> 2; end
          5: begin
            zz = 2*x - y;
            if (zz >= 0 && (zz & 1) == 0) begin c = 5 + x - (y >> 1); v = (e[c-1] + e[c] + 1) >> 1; end
            else if (zz >= 0) begin c = 5 + x - (y >> 1) - 1; v = (e[c-1] + 2*e[c] + e[c+1] + 2) >> 2; end
            else if (zz == -1) v = (e[3] + 2*e[4] + e[5] + 2) >> 2;
            else begin c = 5 - y; v = (e[c-1] + 2*e[c] + e[c+1] + 2) >> 2; end
          end
          6: begin
            zz = 2*y - x;
            if (zz >= 0 && (zz & 1) == 0) begin c = 3 - (y - (x >> 1)); v = (e[c] + e[c+1] + 1) >> 1; end
            else if (zz >= 0) begin c = 3 - (y - (x >> 1)) + 1; v = (e[c-1] + 2*e[c] + e[c+1] + 2) >> 2; end
            else if (zz == -1) v = (e[3] + 2*e[4] + e[5] + 2) >> 2;
            else begin c = 5 + x - 2; v = (e[c-1] + 2*e[c] + e[c+1] + 2) >> 2; end
          end
          7: begin
            c = x + (y >> 1);
            v = (y & 1) == 0 ? (top[c] + top[c+1] + 1) >> 1 : (top[c] + 2*top[c+1] + top[c+2] + 2) >> 2;
          end
          default: begin
            int l[7];
            for (int k = 0; k < 4; k++) l[k] = left[k];
            l[4] = left[3]; l[5] = left[3]; l[6] = left[3];
            zz = x + 2*y;
            c = y + (x >> 1);
            if (zz > 5) v = left[3];
            else if (zz == 5) v = (left[2] + 3*left[3] + 2) >> 2;
            else if ((zz & 1) == 0) v = (l[c] + l[c+1] + 1) >> 1;
            else v = (l[c] + 2*l[c+1] + l[c+2] + 2) >> 2;
          end
        endcase
        pred[4*y+x] = v;
      end
  endfunction

  // ---------------------------------------------------------------- intra 16x16
  function automatic int clip255(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic void ref_i16(input int top[16], input int left[16], input int corner,
                                  input int mode, input int bx, input int by, output blk16_t pred);
    int dc = 0, H = 0, V = 0, a, b, c;
    int tx[17], ly[17];   // index 0 is the corner, k+1 is pixel k
    tx[0] = corner; ly[0] = corner;
    for (int k = 0; k < 16; k++) begin tx[k+1] = top[k]; ly[k+1] = left[k]; dc += top[k] + left[k]; end
    dc = (dc + 16) >> 5;
    for (int k = 1; k <= 8; k++) begin
      H += k * (tx[7 + k + 1] - tx[7 - k + 1]);
      V += k * (ly[7 + k + 1] - ly[7 - k + 1]);
    end
    a = 16 * (left[15] + top[15]);
    b = (5 * H + 32) >>> 6;
    c = (5 * V + 32) >>> 6;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int X = 4*bx + x, Y = 4*by + y;
        case (mode)
          0: pred[4*y+x] = top[X];
          1: pred[4*y+x] = left[Y];
          2: pred[4*y+x] = dc;
          default: pred[4*y+x] = clip255((a + b*(X-7) + c*(Y-7) + 16) >>> 5);
        endcase
      end
  endfunction

  // ---------------------------------------------------------------- VLC stand-in
  // bits = 2 + sum over non-zero levels of (3 + 2*floor(log2|level|))
  function automatic int vlc_bits_model(input blk16_t lvl);
    int b = 2;
    for (int p = 0; p < 16; p++) if (lvl[p] != 0) begin
      int a = lvl[p] < 0 ? -lvl[p] : lvl[p];
      int lg = 0;
      while ((a >> (lg + 1)) != 0) lg++;
      b += 3 + 2*lg;
    end
    return b;
  endfunction

  // ---------------------------------------------------------------- 3-step search
  // Returns the order in which the modes are evaluated for given per-mode costs
  // and threshold (th < 0: no threshold). n = number evaluated.
  function automatic void ref_search(input longint cost[9], input longint th,
                                     output int order[9], output int n, output int best);
    bit done[9];
    longint mn;
    int s2, s3;
    for (int m = 0; m < 9; m++) done[m] = 0;
    order[0] = 0; order[1] = 1; order[2] = 2; n = 3;
    if (cost[0] < cost[1]) begin
      s2 = 7; s3 = (cost[0] < cost[7]) ? 5 : 3;
    end else begin
      s2 = 8; s3 = (cost[1] < cost[8]) ? 6 : 4;
    end
    order[3] = s2; order[4] = s3; n = 5;
    for (int k = 0; k < 5; k++) done[order[k]] = 1;
    mn = cost[0]; best = 0;
    for (int k = 1; k < 5; k++) if (cost[order[k]] < mn) begin mn = cost[order[k]]; best = order[k]; end
    for (int m = 0; m < 9; m++) begin
      if (th < 0 || mn <= th) break;
      if (!done[m]) begin
        done[m] = 1; order[n] = m; n++;
        if (cost[m] < mn) begin mn = cost[m]; best = m; end
      end
    end
  endfunction

endpackage
