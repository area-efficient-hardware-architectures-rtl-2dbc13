// sao_model_pkg: behavioural reference of the SAO filter for one CTU: edge and band
// classification, statistics N/E, the rate-distortion decision
// (dJ = N*O^2 - 2*O*E + lambda*(|O|+1), offsets 0..7 with the HEVC sign rules)
// and the filtered output. Samples outside the CTU count as missing neighbours.
package sao_model_pkg;
  typedef int img_t [64][64];

  function automatic int eo_cat(int c, int a, int b);
    if (c < a && c < b) return 1;
    if ((c < a && c == b) || (c == a && c < b)) return 2;
    if ((c > a && c == b) || (c == a && c > b)) return 3;
    if (c > a && c > b) return 4;
    return 0;
  endfunction

  // neighbour offsets of the four EO classes: (dx_a, dy_a); b is the mirror
  function automatic void eo_dir(int cls, output int dx, output int dy);
    case (cls)
      0: begin dx = -1; dy = 0; end
      1: begin dx = 0; dy = -1; end
      2: begin dx = -1; dy = -1; end
      default: begin dx = 1; dy = -1; end
    endcase
  endfunction

  function automatic int cat_at(input img_t d, input int n, input int cls, input int x, input int y);
    int dx, dy;
    eo_dir(cls, dx, dy);
    if (x+dx < 0 || x+dx >= n || y+dy < 0 || y+dy >= n || x-dx < 0 || x-dx >= n || y-dy < 0 || y-dy >= n)
      return 0;
    return eo_cat(d[y][x], d[y+dy][x+dx], d[y-dy][x-dx]);
  endfunction

  function automatic void best_off(input int n, input int e, input int s, input int lambda,
                                   output int bj, output int bo);
    int o, j;
    bj = lambda; bo = 0;
    for (int m = 1; m < 8; m++) begin
      o = s * m;
      j = n*o*o - 2*o*e + lambda*(m + 1);
      if (j < bj) begin bj = j; bo = o; end
    end
  endfunction

  // type: 0 off, 1 BO, 2 EO
  function automatic void decide(input img_t d, input img_t o, input int n, input int lambda,
                                 output int typ, output int cls, output int pos, output int offs [4],
                                 output int cost);
    int en [4][5], ee [4][5], bn [32], be [32];
    int ej [4][5], eo [4][5], bj [32], bo [32];
    int j, k;
    for (int c = 0; c < 4; c++) for (k = 0; k < 5; k++) begin en[c][k] = 0; ee[c][k] = 0; end
    for (int b = 0; b < 32; b++) begin bn[b] = 0; be[b] = 0; end
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      for (int c = 0; c < 4; c++) begin
        k = cat_at(d, n, c, x, y);
        en[c][k]++; ee[c][k] += o[y][x] - d[y][x];
      end
      bn[d[y][x] >> 3]++; be[d[y][x] >> 3] += o[y][x] - d[y][x];
    end
    for (int c = 0; c < 4; c++) for (k = 1; k < 5; k++) best_off(en[c][k], ee[c][k], k < 3 ? 1 : -1, lambda, ej[c][k], eo[c][k]);
    for (int b = 0; b < 32; b++) best_off(bn[b], be[b], be[b] < 0 ? -1 : 1, lambda, bj[b], bo[b]);
    typ = 0; cls = 0; pos = 0; cost = 0;
    for (int c = 0; c < 4; c++) begin
      j = ej[c][1] + ej[c][2] + ej[c][3] + ej[c][4];
      if (j < cost) begin cost = j; typ = 2; cls = c; end
    end
    for (int p = 0; p < 32; p++) begin
      j = bj[p] + bj[(p+1)%32] + bj[(p+2)%32] + bj[(p+3)%32];
      if (j < cost) begin cost = j; typ = 1; pos = p; end
    end
    for (k = 0; k < 4; k++)
      offs[k] = (typ == 2) ? eo[cls][k+1] : (typ == 1) ? bo[(pos+k)%32] : 0;
  endfunction

  function automatic int apply(input img_t d, input int n, input int typ, input int cls,
                               input int pos, input int offs [4], input int x, input int y);
    int k, v;
    v = d[y][x];
    if (typ == 2) begin
      k = cat_at(d, n, cls, x, y);
      if (k > 0) v += offs[k-1];
    end else if (typ == 1) begin
      k = ((v >> 3) - pos + 32) % 32;
      if (k < 4) v += offs[k];
    end
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction
endpackage
