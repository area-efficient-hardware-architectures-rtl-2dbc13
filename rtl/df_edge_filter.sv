// df_edge_filter: deblocking of one edge segment of four lines.
// Each line holds p3 p2 p1 p0 | q0 q1 q2 q3 across the edge (line_i[j][0..3] = p3..p0,
// line_i[j][4..7] = q0..q3). The decisions use lines 0 and 3 only:
//   d = dp0 + dp3 + dq0 + dq3 with dpi = |p2-2p1+p0| (line i)   -> filter if Bs > 0 and d < beta
//   strong if, for lines 0 and 3:  2*(dp+dq) < beta/4, |p3-p0|+|q0-q3| < beta/8,
//                                  |p0-q0| < (5*tc+1)/2
//   normal filter side decisions:  dp0+dp3 < 3*beta/16 (modify p1), same for q1
// Strong filtering rewrites p2..q2 (clipped to +-2tc); normal filtering adds a
// delta clipped to +-tc to p0/q0 when |delta| < 10*tc, and optionally p1/q1.
// The four line filters work in parallel, so a segment is done in one cycle.
// All decision arithmetic is signed and wide enough that no sum can overflow.
// The decision rules follow the design; the filter equations and the full-width
// arithmetic are the HEVC ones. beta and tc are inputs (already looked up from QP).
// Purely combinational.
module df_edge_filter
  import hevc_pkg::*;
(
  input  pix_t       line_i [4][8],
  input  logic [1:0] bs,
  input  logic [6:0] beta,
  input  logic [4:0] tc,
  output pix_t       line_o [4][8],
  output logic       on,        // segment filtered
  output logic       strong_o   // strong filter chosen
);
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    int p [4][4];
    int q [4][4];
    int dp0, dp3, dq0, dq3, d, b, t;
    logic s0, s3, dep, deq;
    b = int'(beta);
    t = int'(tc);
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        p[j][i] = int'(line_i[j][3-i]);
        q[j][i] = int'(line_i[j][4+i]);
      end
    dp0 = iabs(p[0][2] - 2*p[0][1] + p[0][0]);
    dp3 = iabs(p[3][2] - 2*p[3][1] + p[3][0]);
    dq0 = iabs(q[0][2] - 2*q[0][1] + q[0][0]);
    dq3 = iabs(q[3][2] - 2*q[3][1] + q[3][0]);
    d   = dp0 + dp3 + dq0 + dq3;
    on  = (bs != 2'd0) && (d < b);
    s0  = (2*(dp0 + dq0) < (b >> 2)) && (iabs(p[0][3] - p[0][0]) + iabs(q[0][0] - q[0][3]) < (b >> 3)) &&
          (iabs(p[0][0] - q[0][0]) < ((5*t + 1) >> 1));
    s3  = (2*(dp3 + dq3) < (b >> 2)) && (iabs(p[3][3] - p[3][0]) + iabs(q[3][0] - q[3][3]) < (b >> 3)) &&
          (iabs(p[3][0] - q[3][0]) < ((5*t + 1) >> 1));
    strong_o = on && s0 && s3;
    dep = (dp0 + dp3) < ((b + (b >> 1)) >> 3);
    deq = (dq0 + dq3) < ((b + (b >> 1)) >> 3);
    line_o = line_i;
    for (int j = 0; j < 4; j++) begin
      int delta, dlt;
      delta = 0;
      dlt   = 0;
      if (strong_o) begin
        line_o[j][3] = pix_t'(clip3(p[j][0]-2*t, p[j][0]+2*t, (p[j][2] + 2*p[j][1] + 2*p[j][0] + 2*q[j][0] + q[j][1] + 4) >> 3));
        line_o[j][2] = pix_t'(clip3(p[j][1]-2*t, p[j][1]+2*t, (p[j][2] + p[j][1] + p[j][0] + q[j][0] + 2) >> 2));
        line_o[j][1] = pix_t'(clip3(p[j][2]-2*t, p[j][2]+2*t, (2*p[j][3] + 3*p[j][2] + p[j][1] + p[j][0] + q[j][0] + 4) >> 3));
        line_o[j][4] = pix_t'(clip3(q[j][0]-2*t, q[j][0]+2*t, (p[j][1] + 2*p[j][0] + 2*q[j][0] + 2*q[j][1] + q[j][2] + 4) >> 3));
        line_o[j][5] = pix_t'(clip3(q[j][1]-2*t, q[j][1]+2*t, (p[j][0] + q[j][0] + q[j][1] + q[j][2] + 2) >> 2));
        line_o[j][6] = pix_t'(clip3(q[j][2]-2*t, q[j][2]+2*t, (p[j][0] + q[j][0] + q[j][1] + 3*q[j][2] + 2*q[j][3] + 4) >> 3));
      end else if (on) begin
        delta = (9*(q[j][0] - p[j][0]) - 3*(q[j][1] - p[j][1]) + 8) >>> 4;
        if (iabs(delta) < 10*t) begin
          delta = clip3(-t, t, delta);
          line_o[j][3] = clip_pix(p[j][0] + delta);
          line_o[j][4] = clip_pix(q[j][0] - delta);
          if (dep) begin
            dlt = clip3(-(t >> 1), t >> 1, ((((p[j][2] + p[j][0] + 1) >> 1) - p[j][1] + delta) >>> 1));
            line_o[j][2] = clip_pix(p[j][1] + dlt);
          end
          if (deq) begin
            dlt = clip3(-(t >> 1), t >> 1, ((((q[j][2] + q[j][0] + 1) >> 1) - q[j][1] - delta) >>> 1));
            line_o[j][5] = clip_pix(q[j][1] + dlt);
          end
        end
      end
    end
  end
endmodule
