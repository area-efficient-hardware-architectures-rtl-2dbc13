// intra_angular_pred: directional predictor of the intra engine (modes 2..34).
// For each lane's position (x, y) it derives the projection of the sample onto the
// main reference array and the interpolation weight:
//   vertical   (18..34): ind = ((y+1)*angle) >> 5, frac = ((y+1)*angle) & 31,
//                        a = main[x+ind+1], b = main[x+ind+2]
//   horizontal (2..17) : the same with x and y exchanged
// and hands a*(32-frac) + b*frac (+16, >>5) to the shared AM unit. Every lane selects
// its references on its own, so horizontal modes are also produced row by row,
// which is what lets the transform take the samples directly.
// Interface: ref_i[k + 32] is main[k]. Purely combinational.
module intra_angular_pred
  import hevc_pkg::*;
#(
  parameter int LANES = 8,
  parameter int MAX_N = 32
) (
  input  logic [5:0] mode,
  input  logic [4:0] x [LANES],
  input  logic [4:0] y [LANES],
  input  pix_t       ref_i [3*MAX_N+1],
  output am_op_t     op [LANES]
);
  always_comb begin
    int ang, pos, ind, frac, ia, ib, along, across;
    logic ver;
    ang = intra_angle(mode);
    ver = intra_is_ver(mode);
    for (int l = 0; l < LANES; l++) begin
      along  = ver ? int'(x[l]) : int'(y[l]);   // position along the main array
      across = ver ? int'(y[l]) : int'(x[l]);   // distance from the main array
      pos  = (across + 1) * ang;
      ind  = pos >>> 5;
      frac = pos & 31;
      ia = along + ind + 1 + MAX_N;
      ib = ia + 1;
      if (ia < 0) ia = 0;
      if (ia > 3*MAX_N) ia = 3*MAX_N;
      if (ib < 0) ib = 0;
      if (ib > 3*MAX_N) ib = 3*MAX_N;
      op[l] = '0;                               // products 2 and 3 unused
      op[l].s[0] = {1'b0, ref_i[ia]};
      op[l].w[0] = 7'(32 - frac);
      op[l].s[1] = {1'b0, ref_i[ib]};
      op[l].w[1] = 7'(frac);
    end
  end
endmodule
