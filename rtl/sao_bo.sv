// sao_bo: SAO band-offset classifier and filter for LANES samples per cycle.
// The 8-bit range is split into 32 bands of 8 values (band = sample >> 3). Four
// consecutive bands starting at band_pos (wrapping modulo 32) carry the offsets
// offs[0..3]; samples in the other 28 bands are unchanged. No neighbour is needed,
// so nothing is buffered. The band split follows the design; the wrap-around is
// HEVC. Purely combinational.
module sao_bo
  import hevc_pkg::*;
#(
  parameter int LANES = 8
) (
  input  pix_t              cur  [LANES],
  input  logic [4:0]        band_pos,
  input  logic signed [3:0] offs [4],
  output logic [4:0]        band [LANES],
  output pix_t              pix  [LANES]
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [4:0] k;
      band[l] = cur[l][7:3];
      k = band[l] - band_pos;
      if (k < 5'd4) pix[l] = clip_pix(int'(cur[l]) + int'(offs[k[1:0]]));
      else          pix[l] = cur[l];
    end
  end
endmodule
