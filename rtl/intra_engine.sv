// intra_engine: row-wise intra prediction engine for PUs of 4x4 .. 32x32 and all
// 35 modes (0 planar, 1 DC, 2..34 directional), producing LANES = 8 predicted
// samples per clock cycle in raster (row by row) order, so that a transform that
// consumes rows can take them without an intermediate block buffer.
// Pipeline (one cycle each):
//   RS  reference selection and substitution      (intra_ref_select)
//   F   reference smoothing                       (intra_ref_filter)
//   RB  main reference array of the mode, 776 bit (intra_ref_buffer)
//   O   shared multiply-add unit / DC adders      (intra_am_unit, intra_dc_pred)
//   P   output register
// After RB the controller issues N*N/8 beats; beat b covers raster positions
// 8b .. 8b+7 (two rows of a 4x4 PU, one row of an 8x8 PU, part of a row otherwise).
// Interface: start is taken when ready is high, with mode, log2n (2..5), chroma,
// the 5-bit availability {LB,L,C,T,TR} and the raw neighbours (top[k] = Ref[k][-1],
// left[k] = Ref[-1][k], k < 2N). ready is low from start until the last beat of
// the PU has been issued, so the next PU's reference stages wait for the current
// one (the caller writes the new PU's border samples back into the neighbours).
// Timing: first samples 5 cycles after start, then one beat per cycle:
// 2 cycles for 4x4, 8 for 8x8, 32 for 16x16 and 128 for 32x32.
// The stage order and 8-sample rate follow the design; starting the next PU only
// when the current one has been issued is this implementation's simplification.
module intra_engine
  import hevc_pkg::*;
#(
  parameter int LANES = 8,
  parameter int MAX_N = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  input  logic [5:0] mode,
  input  logic [2:0] log2n,
  input  logic       chroma,
  input  logic [4:0] avail,
  input  pix_t       corner,
  input  pix_t       top  [2*MAX_N],
  input  pix_t       left [2*MAX_N],
  output logic       out_valid,
  output logic       out_first,
  output logic       out_last,
  output pix_t       out_pix [LANES]
);
  // ---------------------------------------------------------------- control
  logic       busy, issuing;
  logic [5:0] mode_q;
  logic [2:0] log2n_q;
  logic       chroma_q;
  logic [7:0] beat, beats_m1, beat_now;
  logic       go, issue;
  logic       rs_v, f_v, rb_v;

  assign ready = !busy;
  assign go    = start && ready;
  assign beats_m1 = 8'(((1 << (2*log2n_q)) / LANES) - 1);
  assign issue    = rb_v || issuing;
  assign beat_now = rb_v ? 8'd0 : beat;

  // ---------------------------------------------------------------- RS, F, RB
  pix_t rs_c, f_c;
  pix_t rs_t [2*MAX_N];
  pix_t rs_l [2*MAX_N];
  pix_t f_t  [2*MAX_N];
  pix_t f_l  [2*MAX_N];
  pix_t rb   [3*MAX_N+1];

  intra_ref_select #(.MAX_N(MAX_N)) u_rs (
    .clk, .rst_n, .load(go), .log2n, .avail,
    .corner_i(corner), .top_i(top), .left_i(left),
    .corner_o(rs_c), .top_o(rs_t), .left_o(rs_l), .valid_o(rs_v));

  intra_ref_filter #(.MAX_N(MAX_N)) u_f (
    .clk, .rst_n, .in_valid(rs_v), .mode(mode_q), .log2n(log2n_q), .chroma(chroma_q),
    .corner_i(rs_c), .top_i(rs_t), .left_i(rs_l),
    .corner_o(f_c), .top_o(f_t), .left_o(f_l), .out_valid(f_v));

  intra_ref_buffer #(.MAX_N(MAX_N)) u_rb (
    .clk, .rst_n, .in_valid(f_v), .mode(mode_q), .log2n(log2n_q),
    .corner_i(f_c), .top_i(f_t), .left_i(f_l), .ref_o(rb), .out_valid(rb_v));

  // The DC and planar predictors read the filtered neighbours; hold them for the
  // whole PU alongside the main array.
  pix_t h_t [2*MAX_N];
  pix_t h_l [2*MAX_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; beat <= '0;
      mode_q <= '0; log2n_q <= 3'd2; chroma_q <= 1'b0;
      for (int k = 0; k < 2*MAX_N; k++) begin h_t[k] <= '0; h_l[k] <= '0; end
    end else begin
      if (go) begin
        busy <= 1'b1; mode_q <= mode; log2n_q <= log2n; chroma_q <= chroma;
      end
      if (f_v) begin
        h_t <= f_t; h_l <= f_l;
      end
      if (rb_v) begin
        issuing <= 1'b1; beat <= 8'd1;        // beat 0 is issued in the RB cycle
      end else if (issuing) begin
        if (beat == beats_m1) begin
          issuing <= 1'b0; busy <= 1'b0;
        end
        beat <= beat + 8'd1;
      end
    end
  end

  // ---------------------------------------------------------------- positions
  logic [4:0] px [LANES];
  logic [4:0] py [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int k;
      k = int'(beat_now) * LANES + l;
      px[l] = 5'(k & ((1 << log2n_q) - 1));
      py[l] = 5'(k >> log2n_q);
    end
  end

  // ---------------------------------------------------------------- O stage
  am_op_t op_pl [LANES];
  am_op_t op_an [LANES];
  am_op_t op    [LANES];
  logic [10:0] rnd;
  logic [2:0]  shift;
  pix_t am_res [LANES];
  pix_t dc_res [LANES];
  logic am_v, dc_v;
  logic is_dc_o, first_o, last_o;

  intra_planar_pred #(.LANES(LANES), .MAX_N(MAX_N)) u_planar (
    .log2n(log2n_q), .x(px), .y(py), .top_i(h_t), .left_i(h_l), .op(op_pl));

  intra_angular_pred #(.LANES(LANES), .MAX_N(MAX_N)) u_ang (
    .mode(mode_q), .x(px), .y(py), .ref_i(rb), .op(op_an));

  always_comb begin
    if (mode_q == 6'd0) begin
      op    = op_pl;
      rnd   = 11'(1 << log2n_q);
      shift = log2n_q + 3'd1;
    end else begin
      op    = op_an;
      rnd   = 11'd16;
      shift = 3'd5;
    end
  end

  intra_am_unit #(.LANES(LANES)) u_am (
    .clk, .rst_n, .in_valid(issue && mode_q != 6'd1), .op, .rnd, .shift,
    .res(am_res), .out_valid(am_v));

  intra_dc_pred #(.LANES(LANES), .MAX_N(MAX_N)) u_dc (
    .clk, .rst_n, .in_valid(issue && mode_q == 6'd1), .log2n(log2n_q), .chroma(chroma_q),
    .x(px), .y(py), .top_i(h_t), .left_i(h_l), .pix(dc_res), .out_valid(dc_v));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_dc_o <= 1'b0; first_o <= 1'b0; last_o <= 1'b0;
    end else begin
      is_dc_o <= (mode_q == 6'd1);
      first_o <= rb_v;
      last_o  <= issuing && beat == beats_m1;
    end
  end

  // ---------------------------------------------------------------- P stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_first <= 1'b0; out_last <= 1'b0;
      for (int l = 0; l < LANES; l++) out_pix[l] <= '0;
    end else begin
      out_valid <= am_v || dc_v;
      out_first <= (am_v || dc_v) && first_o;
      out_last  <= (am_v || dc_v) && last_o;
      out_pix   <= is_dc_o ? dc_res : am_res;
    end
  end

  // A PU is never started while another is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) go |-> !busy);
  // The reference stages see exactly one PU at a time.
  assert property (@(posedge clk) disable iff (!rst_n) rb_v |-> !issuing);
  // The engine never claims to be ready while a PU is being issued.
  assert property (@(posedge clk) disable iff (!rst_n) issuing |-> busy);
endmodule
