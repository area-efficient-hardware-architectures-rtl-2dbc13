// intra_model_pkg: behavioural reference of HEVC intra prediction used by the
// testbenches: reference substitution, reference smoothing and the planar, DC and
// angular predictors, written sample by sample in the way the standard describes
// them (full reference arrays, no lanes, no pipelining).
package intra_model_pkg;
  typedef int a64_t [64];
  typedef int blk_t [32][32];
  typedef int ref_t [-64:64];

  function automatic int angle_of(int m);
    int tab [35] = '{0, 0, 32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                     -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};
    return tab[m];
  endfunction

  function automatic int inv_angle_of(int m);
    int a;
    a = angle_of(m);
    if (a >= 0) return 0;
    return -((256 * 32 + (-a) / 2) / (-a));   // 256*32/|angle|, rounded
  endfunction

  // Substitution, standard style: availability per sample, walk from the bottom.
  function automatic void subst(input int n, input bit [4:0] av, input int c_in,
                                input a64_t t_in, input a64_t l_in,
                                output int c, output a64_t t, output a64_t l);
    int v [0:128];
    bit ok [0:128];
    int len, first;
    bit any;
    len = 4*n + 1;
    // index 0 = left[2n-1] ... 2n-1 = left[0], 2n = corner, 2n+1.. = top[0..2n-1]
    for (int i = 0; i < 2*n; i++) begin
      v[i]  = l_in[2*n-1-i];
      ok[i] = (2*n-1-i < n) ? av[3] : av[4];
    end
    v[2*n] = c_in; ok[2*n] = av[2];
    for (int i = 0; i < 2*n; i++) begin
      v[2*n+1+i]  = t_in[i];
      ok[2*n+1+i] = (i < n) ? av[1] : av[0];
    end
    any = 0;
    for (int i = 0; i < len; i++) any |= ok[i];
    if (!any) for (int i = 0; i < len; i++) v[i] = 128;
    else begin
      if (!ok[0]) begin
        first = 0;
        for (int i = len-1; i >= 0; i--) if (ok[i]) first = v[i];
        v[0] = first;
      end
      for (int i = 1; i < len; i++) if (!ok[i]) v[i] = v[i-1];
    end
    for (int i = 0; i < 64; i++) begin t[i] = 0; l[i] = 0; end
    for (int i = 0; i < 2*n; i++) begin
      l[2*n-1-i] = v[i];
      t[i] = v[2*n+1+i];
    end
    c = v[2*n];
  endfunction

  function automatic bit smooth_rule(int m, int n, bit chroma);
    int d;
    if (chroma || n == 4 || m == 1) return 0;
    if (m == 0) return 1;
    d = (m - 26 < 0 ? 26 - m : m - 26);
    if ((m - 10 < 0 ? 10 - m : m - 10) < d) d = (m - 10 < 0 ? 10 - m : m - 10);
    return d > ((n == 8) ? 7 : (n == 16) ? 1 : 0);
  endfunction

  function automatic void smooth(input int m, input int n, input bit chroma,
                                 input int c_in, input a64_t t_in, input a64_t l_in,
                                 output int c, output a64_t t, output a64_t l);
    int tt, ll;
    c = c_in; t = t_in; l = l_in;
    if (!smooth_rule(m, n, chroma)) return;
    tt = c_in + t_in[63] - 2*t_in[31];
    ll = c_in + l_in[63] - 2*l_in[31];
    if (n == 32 && tt < 8 && tt > -8 && ll < 8 && ll > -8) begin
      for (int i = 0; i < 63; i++) begin
        t[i] = ((63-i)*c_in + (i+1)*t_in[63] + 32) >> 6;
        l[i] = ((63-i)*c_in + (i+1)*l_in[63] + 32) >> 6;
      end
    end else begin
      c = (l_in[0] + 2*c_in + t_in[0] + 2) >> 2;
      for (int i = 0; i < 2*n-1; i++) begin
        t[i] = ((i == 0 ? c_in : t_in[i-1]) + 2*t_in[i] + t_in[i+1] + 2) >> 2;
        l[i] = ((i == 0 ? c_in : l_in[i-1]) + 2*l_in[i] + l_in[i+1] + 2) >> 2;
      end
    end
  endfunction

  // Main reference array of an angular mode (standard construction).
  function automatic void main_array(input int m, input int n, input int c,
                                     input a64_t t, input a64_t l, output ref_t r);
    int a, ia;
    bit ver;
    a64_t mainv, side;
    ver = (m >= 18);
    a = angle_of(m);
    ia = inv_angle_of(m);
    mainv = ver ? t : l;
    side  = ver ? l : t;
    for (int i = -64; i <= 64; i++) r[i] = -1;
    r[0] = c;
    for (int i = 1; i <= 2*n; i++) r[i] = mainv[i-1];
    if ((n * a) >>> 5 < -1)
      for (int i = (n * a) >>> 5; i <= -1; i++) r[i] = side[((i * ia + 128) >>> 8) - 1];
  endfunction

  function automatic void predict(input int m, input int n, input bit chroma,
                                  input int c, input a64_t t, input a64_t l,
                                  output blk_t p);
    int sh, dc, a, pos, ind, f;
    ref_t r;
    sh = $clog2(n);
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) p[y][x] = 0;
    if (m == 0) begin
      for (int y = 0; y < n; y++) for (int x = 0; x < n; x++)
        p[y][x] = ((n-1-x)*l[y] + (x+1)*t[n] + (n-1-y)*t[x] + (y+1)*l[n] + n) >> (sh + 1);
    end else if (m == 1) begin
      dc = n;
      for (int i = 0; i < n; i++) dc += t[i] + l[i];
      dc = dc >> (sh + 1);
      for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) p[y][x] = dc;
      if (!chroma && n < 32) begin
        p[0][0] = (l[0] + 2*dc + t[0] + 2) >> 2;
        for (int x = 1; x < n; x++) p[0][x] = (t[x] + 3*dc + 2) >> 2;
        for (int y = 1; y < n; y++) p[y][0] = (l[y] + 3*dc + 2) >> 2;
      end
    end else begin
      main_array(m, n, c, t, l, r);
      a = angle_of(m);
      for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
        int u, v;   // u: distance from main array, v: position along it
        u = (m >= 18) ? y : x;
        v = (m >= 18) ? x : y;
        pos = (u + 1) * a;
        ind = pos >>> 5;
        f   = pos & 31;
        if (f == 0) p[y][x] = r[v + ind + 1];
        else        p[y][x] = ((32 - f) * r[v + ind + 1] + f * r[v + ind + 2] + 16) >> 5;
      end
    end
  endfunction
endpackage
