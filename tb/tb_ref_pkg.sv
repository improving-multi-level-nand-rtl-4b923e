// tb_ref_pkg: reference model of the 4-D TCM used by the testbenches.
//
// Written independently of the RTL functions: the constellation is built by
// explicit enumeration of the subset table, the convolutional code from its
// parity recursion y0(n) = y0(n-3) ^ y1(n-1) ^ y2(n-2), and demodulation by
// brute force over every point of a subset's two types.
package tb_ref_pkg;

  // 2-D subsets as pairs of 1-D subsets (0 = E {0,2,4}, 1 = F {1,3})
  //                          A  B  C  D
  localparam int FIRST [4]  = '{0, 1, 0, 1};
  localparam int SECOND [4] = '{0, 1, 1, 0};
  // subset table, types (X,Y) with A=0, B=1, C=2, D=3
  localparam int TX [8][2] = '{'{0,1}, '{2,3}, '{0,1}, '{2,3}, '{0,1}, '{2,3}, '{0,1}, '{2,3}};
  localparam int TY [8][2] = '{'{0,1}, '{2,3}, '{1,0}, '{3,2}, '{2,3}, '{1,0}, '{3,2}, '{0,1}};
  // labels carried by the first type of each subset
  localparam int M0 [8] = '{48, 32, 32, 32, 40, 24, 40, 40};

  typedef int pt_t [4];

  // all points of 2-D subset s, in numbering order
  function automatic int pts2d(int s, output int a [9], output int b [9]);
    int n = 0;
    for (int i = 0; i < 5; i++) if (i % 2 == FIRST[s])
      for (int k = 0; k < 5; k++) if (k % 2 == SECOND[s]) begin
        a[n] = i; b[n] = k; n++;
      end
    return n;
  endfunction

  // all points of type t of subset p, in numbering order; returns count
  function automatic int pts_type(int p, int t, output int lv [81][4]);
    int xa [9], xb [9], ya [9], yb [9];
    int nx, ny, n;
    nx = pts2d(TX[p][t], xa, xb);
    ny = pts2d(TY[p][t], ya, yb);
    n = 0;
    for (int i = 0; i < nx; i++)
      for (int k = 0; k < ny; k++) begin
        lv[n][0] = xa[i]; lv[n][1] = xb[i]; lv[n][2] = ya[k]; lv[n][3] = yb[k];
        n++;
      end
    return n;
  endfunction

  // levels of label k in subset p
  function automatic void ref_mod(int p, int k, output int lv [4]);
    int all [81][4];
    int n;
    if (k < M0[p]) begin
      n = pts_type(p, 0, all);
      for (int c = 0; c < 4; c++) lv[c] = all[k][c];
    end else begin
      n = pts_type(p, 1, all);
      for (int c = 0; c < 4; c++) lv[c] = all[k - M0[p]][c];
    end
  endfunction

  // squared distance of bin q to level l, (1/32 level)^2
  function automatic int ref_d2(int q, int l);
    int d = 10 * q - 11 - 32 * l;
    return d * d;
  endfunction

  // brute-force 4-D demodulation of subset p; erased cells count zero and are
  // restricted to the fixed levels 2 (E) and 1 (F)
  function automatic void ref_demod(int p, int q [4], bit er [4], output int metric, output int label);
    int all [81][4];
    int n, mt, best, bestk, m;
    bit ok;
    best = 32'h7fffffff; bestk = 0;
    for (int t = 0; t < 2; t++) begin
      n  = pts_type(p, t, all);
      mt = (t == 0) ? M0[p] : 64 - M0[p];
      for (int j = 0; j < n; j++) begin
        m = 0; ok = 1;
        for (int c = 0; c < 4; c++) begin
          if (er[c]) begin
            if (all[j][c] != ((all[j][c] % 2 == 0) ? 2 : 1)) ok = 0;
          end else m += ref_d2(q[c], all[j][c]);
        end
        if (ok && m < best) begin
          best  = m;
          bestk = (t == 0) ? ((j < mt) ? j : mt - 1) : M0[p] + ((j < mt) ? j : mt - 1);
        end
      end
    end
    metric = best;
    label  = bestk;
  endfunction

  // reference convolutional encoder with its parity history
  typedef struct { bit y0h [3]; bit y1h; bit y2h [2]; } enc_t;

  function automatic void enc_reset(ref enc_t e);
    e.y0h = '{0, 0, 0}; e.y1h = 0; e.y2h = '{0, 0};
  endfunction

  // returns the subset index {y0, y2, y1} for data bits u = {y2, y1}
  function automatic int enc_step(ref enc_t e, input int u);
    bit y0, y1, y2;
    y2 = u[1]; y1 = u[0];
    y0 = e.y0h[2] ^ e.y1h ^ e.y2h[1];   // y0(n-3) ^ y1(n-1) ^ y2(n-2)
    e.y0h[2] = e.y0h[1]; e.y0h[1] = e.y0h[0]; e.y0h[0] = y0;
    e.y2h[1] = e.y2h[0]; e.y2h[0] = y2;
    e.y1h = y1;
    return {y0, y2, y1};
  endfunction

  // full TCM encoding of a group byte: levels of the four cells
  function automatic void ref_encode(ref enc_t e, input int d, output int lv [4]);
    int p, k;
    p = enc_step(e, (d >> 4) & 3);
    k = ((d >> 6) & 3) * 16 + (d & 15);
    ref_mod(p, k, lv);
  endfunction

  // sensing bin of a threshold voltage given in 1/32 level units
  function automatic int ref_sense(int v32);
    int q;
    q = (v32 + 16) / 10;
    if (v32 + 16 < 0) q = 0;
    if (q > 15) q = 15;
    return q;
  endfunction

endpackage
