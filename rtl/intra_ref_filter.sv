// intra_ref_filter: filtering (F) stage of the intra engine.
// Decides per PU whether the reference samples are smoothed and how:
//  - no smoothing for 4x4 PUs, for DC, for chroma, and for angular modes close to
//    pure horizontal/vertical (the per-size list of filtered modes);
//  - strong_f smoothing for 32x32 PUs whose top and left rows are both nearly linear
//    (|c + R[63] - 2 R[31]| < 8 on each side): each side becomes the linear
//    interpolation between the corner and the far end sample;
//  - otherwise the [1 2 1]/4 three-tap filter, leaving the two end samples as they are.
// Interface: same layout as intra_ref_select (top_i[k] = Ref[k][-1]).
// Timing: one register stage; out_valid follows in_valid by a cycle.
// Smoothing before the reference array is built (rather than inside the processing
// elements) is this implementation's choice; the rules are the HEVC ones.
module intra_ref_filter
  import hevc_pkg::*;
#(
  parameter int MAX_N = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [5:0] mode,
  input  logic [2:0] log2n,
  input  logic       chroma,
  input  pix_t       corner_i,
  input  pix_t       top_i  [2*MAX_N],
  input  pix_t       left_i [2*MAX_N],
  output pix_t       corner_o,
  output pix_t       top_o  [2*MAX_N],
  output pix_t       left_o [2*MAX_N],
  output logic       out_valid
);
  pix_t c_f;
  pix_t t_f [2*MAX_N];
  pix_t l_f [2*MAX_N];
  logic smooth, strong_f;
  pix_t tp, lp;

  always_comb begin
    int n2, tl, ll;
    n2     = 2 << log2n;                       // 2N
    smooth = intra_smooth(mode, log2n) && !chroma;
    // strong_f-filter test (32x32 only, bit depth 8 -> threshold 1 << 3)
    tl = int'(corner_i) + int'(top_i[2*MAX_N-1])  - 2*int'(top_i[MAX_N-1]);
    ll = int'(corner_i) + int'(left_i[2*MAX_N-1]) - 2*int'(left_i[MAX_N-1]);
    strong_f = smooth && (log2n == 3'd5) && (MAX_N == 32) &&
             (tl < 8) && (tl > -8) && (ll < 8) && (ll > -8);
    c_f = corner_i;
    tp  = corner_i;
    lp  = corner_i;
    for (int k = 0; k < 2*MAX_N; k++) begin
      t_f[k] = top_i[k];
      l_f[k] = left_i[k];
    end
    if (strong_f) begin
      for (int k = 0; k < 2*MAX_N - 1; k++) begin
        t_f[k] = pix_t'(((63 - k) * int'(corner_i) + (k + 1) * int'(top_i[2*MAX_N-1])  + 32) >> 6);
        l_f[k] = pix_t'(((63 - k) * int'(corner_i) + (k + 1) * int'(left_i[2*MAX_N-1]) + 32) >> 6);
      end
    end else if (smooth) begin
      c_f = pix_t'((int'(left_i[0]) + 2*int'(corner_i) + int'(top_i[0]) + 2) >> 2);
      for (int k = 0; k < 2*MAX_N - 1; k++) begin
        if (k < n2 - 1) begin
          t_f[k] = pix_t'((int'(tp) + 2*int'(top_i[k]) + int'(top_i[k+1]) + 2) >> 2);
          l_f[k] = pix_t'((int'(lp) + 2*int'(left_i[k]) + int'(left_i[k+1]) + 2) >> 2);
        end
        tp = top_i[k];
        lp = left_i[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      corner_o  <= '0;
      for (int k = 0; k < 2*MAX_N; k++) begin
        top_o[k]  <= '0;
        left_o[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        corner_o <= c_f;
        for (int k = 0; k < 2*MAX_N; k++) begin
          top_o[k]  <= t_f[k];
          left_o[k] <= l_f[k];
        end
      end
    end
  end
endmodule
