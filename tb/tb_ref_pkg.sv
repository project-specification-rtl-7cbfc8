// tb_ref_pkg - reference model of the trigger algorithm for the testbenches.
//
// Written independently of the RTL with plain integers: the cluster, tau and
// isolation sums are listed tower by tower (labels "phi eta" as in the window
// drawing), saturation is applied with min(), and the de-cluster test compares
// the core with each of the eight neighbouring 2x2 clusters one by one.
package tb_ref_pkg;

  typedef int win_t [4][4];

  // isolation ring labels 00 10 20 30 31 32 33 23 13 03 02 01
  localparam int RING_I [12] = '{0, 1, 2, 3, 3, 3, 3, 2, 1, 0, 0, 0};
  localparam int RING_J [12] = '{0, 0, 0, 0, 1, 2, 3, 3, 3, 3, 2, 1};

  function automatic int min_i(int a, int b);
    return (a < b) ? a : b;
  endfunction

  function automatic int sum2x2(win_t em, win_t had, int a, int b);
    return em[a][b] + em[a][b+1] + em[a+1][b] + em[a+1][b+1] +
           had[a][b] + had[a][b+1] + had[a+1][b] + had[a+1][b+1];
  endfunction

  // returns the 16 pass bits; core sum in `core`
  function automatic int unsigned ref_window(win_t em, win_t had, int cthr [16],
                                             int ithr [16][3], int tau_sel,
                                             output int core);
    int pairs [4];
    int isoem, isohad, hcore, c;
    bit decl;
    int unsigned res;
    pairs[0] = em[1][1] + em[1][2];
    pairs[1] = em[1][1] + em[2][1];
    pairs[2] = em[2][1] + em[2][2];
    pairs[3] = em[1][2] + em[2][2];
    hcore = had[1][1] + had[2][1] + had[2][2] + had[1][2];
    isoem = 0; isohad = 0;
    for (int k = 0; k < 12; k++) begin
      isoem  += em[RING_I[k]][RING_J[k]];
      isohad += had[RING_I[k]][RING_J[k]];
    end
    isoem  = min_i(isoem, 63);
    isohad = min_i(isohad, 63);
    c = sum2x2(em, had, 1, 1);
    core = c;
    decl = (c >= sum2x2(em, had, 0, 0)) && (c >= sum2x2(em, had, 1, 0)) &&
           (c >= sum2x2(em, had, 2, 0)) && (c >= sum2x2(em, had, 0, 1)) &&
           (c >  sum2x2(em, had, 2, 1)) && (c >  sum2x2(em, had, 0, 2)) &&
           (c >  sum2x2(em, had, 1, 2)) && (c >  sum2x2(em, had, 2, 2));
    res = 0;
    for (int t = 0; t < 16; t++) begin
      bit tau, cl, iso;
      tau = (t >= 8) && tau_sel[t-8];
      cl = 0;
      for (int k = 0; k < 4; k++)
        if (tau) cl |= min_i(pairs[k] + hcore, 255) > cthr[t];
        else     cl |= min_i(pairs[k], 255) > cthr[t];
      iso = (isoem <= ithr[t][0]) && (isohad <= ithr[t][1]);
      if (!tau) iso &= (min_i(hcore, 63) <= ithr[t][2]);
      if (cl && iso && decl) res[t] = 1'b1;
    end
    return res;
  endfunction

  typedef int map_t [2][6][7];
  typedef bit fmap_t [2][6][7];

  // whole-chip expectation: hits (2 bits per set = number of groups passing) and
  // the L / R RoI records {loc[1:0], err, sat, thr[15:0]}
  task automatic ref_chip(map_t tw, fmap_t te, int cthr [16], int ithr [16][3],
                          int tau_sel, output logic [31:0] hits,
                          output logic [19:0] roi_l, output logic [19:0] roi_r);
    int unsigned p [8];
    int c [8];
    for (int k = 0; k < 8; k++) begin
      win_t e, h;
      int r0 = (k % 4) / 2, c0 = 2 * (k / 4) + (k % 2);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          e[i][j] = tw[0][r0 + i][c0 + j];
          h[i][j] = tw[1][r0 + i][c0 + j];
        end
      p[k] = ref_window(e, h, cthr, ithr, tau_sel, c[k]);
    end
    hits = 0;
    for (int t = 0; t < 16; t++) begin
      int n;
      n = 0;
      for (int g = 0; g < 2; g++)
        if (p[4*g][t] || p[4*g+1][t] || p[4*g+2][t] || p[4*g+3][t]) n++;
      hits[2*t +: 2] = 2'(n);
    end
    for (int g = 0; g < 2; g++) begin
      logic [19:0] rr;
      int bw, bc;
      bit sat, er;
      bw = -1; bc = -1; sat = 0; er = 0;
      for (int l = 0; l < 2; l++)
        for (int r = 0; r < 5; r++)
          for (int cc = 2 * g; cc < 2 * g + 5; cc++) begin
            sat |= (tw[l][r][cc] == 255);
            er  |= te[l][r][cc];
          end
      for (int w = 0; w < 4; w++)
        if (p[4*g + w] != 0 && c[4*g + w] > bc) begin bw = w; bc = c[4*g + w]; end
      rr = {(bw < 0) ? 2'd0 : 2'(bw), er, sat, (bw < 0) ? 16'h0 : 16'(p[4*g + bw])};
      if (g == 0) roi_l = rr; else roi_r = rr;
    end
  endtask

endpackage
