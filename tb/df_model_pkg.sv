// df_model_pkg: behavioural reference of HEVC luma deblocking of one 4-line edge
// segment, and of the 8x8 corner window used by the deblocking filter
// (vertical and horizontal edges filtered independently, results averaged).
package df_model_pkg;
  typedef int seg_t [4][8];
  typedef int win_t [8][8];

  function automatic int ab(int v); return v < 0 ? -v : v; endfunction
  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : v > hi ? hi : v; endfunction
  function automatic int c8(int v); return c3(0, 255, v); endfunction

  // line layout: [0..3] = p3 p2 p1 p0, [4..7] = q0 q1 q2 q3
  function automatic void seg(input seg_t L, input int bs, input int beta, input int tc,
                              output seg_t O, output bit on, output bit st);
    int dp [4], dq [4];
    bit sw [4];
    bit dep, deq;
    O = L;
    for (int j = 0; j < 4; j += 3) begin
      dp[j] = ab(L[j][1] - 2*L[j][2] + L[j][3]);
      dq[j] = ab(L[j][6] - 2*L[j][5] + L[j][4]);
    end
    on = bs > 0 && (dp[0] + dq[0] + dp[3] + dq[3]) < beta;
    for (int j = 0; j < 4; j += 3)
      sw[j] = 2*(dp[j] + dq[j]) < (beta >> 2) && ab(L[j][0] - L[j][3]) + ab(L[j][4] - L[j][7]) < (beta >> 3)
              && ab(L[j][3] - L[j][4]) < ((5*tc + 1) >> 1);
    st = on && sw[0] && sw[3];
    dep = (dp[0] + dp[3]) < ((beta + (beta >> 1)) >> 3);
    deq = (dq[0] + dq[3]) < ((beta + (beta >> 1)) >> 3);
    if (!on) return;
    for (int j = 0; j < 4; j++) begin
      int p0, p1, p2, p3, q0, q1, q2, q3, d;
      p3 = L[j][0]; p2 = L[j][1]; p1 = L[j][2]; p0 = L[j][3];
      q0 = L[j][4]; q1 = L[j][5]; q2 = L[j][6]; q3 = L[j][7];
      if (st) begin
        O[j][3] = c3(p0 - 2*tc, p0 + 2*tc, (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >> 3);
        O[j][2] = c3(p1 - 2*tc, p1 + 2*tc, (p2 + p1 + p0 + q0 + 2) >> 2);
        O[j][1] = c3(p2 - 2*tc, p2 + 2*tc, (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >> 3);
        O[j][4] = c3(q0 - 2*tc, q0 + 2*tc, (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >> 3);
        O[j][5] = c3(q1 - 2*tc, q1 + 2*tc, (p0 + q0 + q1 + q2 + 2) >> 2);
        O[j][6] = c3(q2 - 2*tc, q2 + 2*tc, (p0 + q0 + q1 + 3*q2 + 2*q3 + 4) >> 3);
      end else begin
        d = (9*(q0 - p0) - 3*(q1 - p1) + 8) >>> 4;
        if (ab(d) < 10*tc) begin
          d = c3(-tc, tc, d);
          O[j][3] = c8(p0 + d);
          O[j][4] = c8(q0 - d);
          if (dep) O[j][2] = c8(p1 + c3(-(tc >> 1), tc >> 1, (((p2 + p0 + 1) >> 1) - p1 + d) >>> 1));
          if (deq) O[j][5] = c8(q1 + c3(-(tc >> 1), tc >> 1, (((q2 + q0 + 1) >> 1) - q1 - d) >>> 1));
        end
      end
    end
  endfunction

  // 8x8 window around a grid corner: vertical edge between columns 3|4 (lines are
  // rows), horizontal edge between rows 3|4 (lines are columns); output = average.
  function automatic void window(input win_t W, input int bsv [2], input int bsh [2],
                                 input int beta, input int tc, output win_t R,
                                 output int n_on, output int n_strong);
    win_t V, H;
    seg_t a, o;
    bit on, st;
    n_on = 0; n_strong = 0;
    V = W; H = W;
    for (int s = 0; s < 2; s++) begin
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) a[j][i] = W[4*s+j][i];
      seg(a, bsv[s], beta, tc, o, on, st);
      n_on += on; n_strong += st;
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) V[4*s+j][i] = o[j][i];
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) a[j][i] = W[i][4*s+j];
      seg(a, bsh[s], beta, tc, o, on, st);
      n_on += on; n_strong += st;
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) H[i][4*s+j] = o[j][i];
    end
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) R[r][c] = (V[r][c] + H[r][c] + 1) >> 1;
  endfunction
endpackage
