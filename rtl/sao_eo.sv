// sao_eo: SAO edge-offset classifier and filter for LANES samples per cycle.
// Each sample c is compared with its two neighbours a and b along the EO class
// direction (0: horizontal, 1: vertical, 2: 135 deg, 3: 45 deg; the caller selects
// the neighbours):
//   category 1 (local minimum)  c < a and c < b
//   category 2 (concave edge)   c < a and c == b, or c == a and c < b
//   category 3 (convex edge)    c > a and c == b, or c == a and c > b
//   category 4 (local maximum)  c > a and c > b
//   category 0 otherwise, or when a neighbour does not exist (nb_ok = 0).
// The filtered sample is clip(c + offs[cat-1]) (unchanged for category 0).
// The classification follows the design (the four classes and five categories);
// the rest is HEVC. Purely combinational.
module sao_eo
  import hevc_pkg::*;
#(
  parameter int LANES = 8
) (
  input  pix_t              cur  [LANES],
  input  pix_t              nb_a [LANES],
  input  pix_t              nb_b [LANES],
  input  logic [LANES-1:0]  nb_ok,
  input  logic signed [3:0] offs [4],
  output logic [2:0]        cat  [LANES],
  output pix_t              pix  [LANES]
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic lt_a, lt_b, gt_a, gt_b;
      lt_a = cur[l] < nb_a[l];
      lt_b = cur[l] < nb_b[l];
      gt_a = cur[l] > nb_a[l];
      gt_b = cur[l] > nb_b[l];
      if (!nb_ok[l])                                   cat[l] = 3'd0;
      else if (lt_a && lt_b)                           cat[l] = 3'd1;
      else if ((lt_a && !gt_b && !lt_b) || (!lt_a && !gt_a && lt_b)) cat[l] = 3'd2;
      else if ((gt_a && !gt_b && !lt_b) || (!lt_a && !gt_a && gt_b)) cat[l] = 3'd3;
      else if (gt_a && gt_b)                           cat[l] = 3'd4;
      else                                             cat[l] = 3'd0;
      if (cat[l] == 3'd0) pix[l] = cur[l];
      else                pix[l] = clip_pix(int'(cur[l]) + int'(offs[2'(cat[l] - 3'd1)]));
    end
  end
endmodule
