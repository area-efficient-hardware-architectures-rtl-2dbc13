// hevc_top: the two encoder blocks side by side, each with its own ports.
//  - intra_*: row-wise intra prediction engine (8 predicted samples per cycle,
//    PUs 4x4..32x32, 35 modes), ready to feed a row-wise DCT/DST;
//  - ilf_*:   integrated in-loop filter (deblocking then SAO) on 64x64 CTUs,
//    8 samples per cycle in and out.
// They share only the clock and reset; see intra_engine and inloop_filter for the
// handshakes and timing.
module hevc_top
  import hevc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // intra prediction engine
  input  logic              intra_start,
  output logic              intra_ready,
  input  logic [5:0]        intra_mode,
  input  logic [2:0]        intra_log2n,
  input  logic              intra_chroma,
  input  logic [4:0]        intra_avail,
  input  pix_t              intra_corner,
  input  pix_t              intra_top  [64],
  input  pix_t              intra_left [64],
  output logic              intra_out_valid,
  output logic              intra_out_first,
  output logic              intra_out_last,
  output pix_t              intra_out_pix [8],
  // integrated in-loop filter
  input  logic              ilf_in_valid,
  output logic              ilf_in_ready,
  input  pix_t              ilf_in_rec [8],
  input  pix_t              ilf_in_org [8],
  input  logic [1:0]        ilf_bs_v,
  input  logic [1:0]        ilf_bs_h,
  input  logic [6:0]        ilf_beta,
  input  logic [4:0]        ilf_tc,
  input  logic [7:0]        ilf_lambda,
  output logic              ilf_out_valid,
  output logic              ilf_out_last,
  output pix_t              ilf_out_pix [8],
  output logic              ilf_df_dec_valid,
  output logic [1:0]        ilf_df_dec_on,
  output logic [1:0]        ilf_df_dec_strong,
  output logic              ilf_sao_dec_valid,
  output sao_type_e         ilf_sao_type,
  output logic [1:0]        ilf_sao_eo_class,
  output logic [4:0]        ilf_sao_band_pos,
  output logic signed [3:0] ilf_sao_offs [4]
);
  intra_engine #(.LANES(8), .MAX_N(32)) u_intra (
    .clk, .rst_n, .start(intra_start), .ready(intra_ready), .mode(intra_mode),
    .log2n(intra_log2n), .chroma(intra_chroma), .avail(intra_avail),
    .corner(intra_corner), .top(intra_top), .left(intra_left),
    .out_valid(intra_out_valid), .out_first(intra_out_first), .out_last(intra_out_last),
    .out_pix(intra_out_pix));

  inloop_filter #(.CTU(64)) u_ilf (
    .clk, .rst_n, .in_valid(ilf_in_valid), .in_ready(ilf_in_ready), .in_rec(ilf_in_rec),
    .in_org(ilf_in_org), .bs_v(ilf_bs_v), .bs_h(ilf_bs_h), .beta(ilf_beta), .tc(ilf_tc),
    .lambda(ilf_lambda), .out_valid(ilf_out_valid), .out_last(ilf_out_last),
    .out_pix(ilf_out_pix), .df_dec_valid(ilf_df_dec_valid), .df_dec_on(ilf_df_dec_on),
    .df_dec_strong(ilf_df_dec_strong), .sao_dec_valid(ilf_sao_dec_valid),
    .sao_type(ilf_sao_type), .sao_eo_class(ilf_sao_eo_class),
    .sao_band_pos(ilf_sao_band_pos), .sao_offs(ilf_sao_offs));
endmodule
