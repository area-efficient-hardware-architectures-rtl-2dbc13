// intra_ref_buffer: reconfigurable reference buffer (RB) of the intra engine.
// Builds, for the selected angular mode, the main reference array used by the
// directional predictor and holds it in a 97-entry register (indices -32..+64,
// 97 x 8 = 776 bits, enough for a 32x32 PU).
//  - vertical modes (18..34): main[0] = corner, main[k] = top[k-1] for k = 1..2N;
//  - horizontal modes (2..17): the same with the left column;
//  - negative angles extend the array below index 0 with side-array samples
//    projected through the inverse angle: main[k] = side[((k*invAngle+128)>>8) - 1]
//    for k = (N*angle)>>5 .. -1.
// Entries that a mode never reads hold the nearest end sample.
// Interface: ref_o[k + 32] is main[k]. Timing: one register stage (out_valid
// follows in_valid). The buffer size and the projection follow the design; building
// only the selected mode's array is this implementation's choice.
module intra_ref_buffer
  import hevc_pkg::*;
#(
  parameter int MAX_N = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [5:0] mode,
  input  logic [2:0] log2n,
  input  pix_t       corner_i,
  input  pix_t       top_i  [2*MAX_N],
  input  pix_t       left_i [2*MAX_N],
  output pix_t       ref_o  [3*MAX_N+1],
  output logic       out_valid
);
  localparam int OFS = MAX_N;
  localparam int LEN = 3*MAX_N + 1;

  pix_t arr [LEN];

  always_comb begin
    int n, ang, inv, lo, idx;
    logic ver;
    n   = 1 << log2n;
    idx = 0;
    arr = '{default: '0};
    ver = intra_is_ver(mode);
    ang = intra_angle(mode);
    inv = intra_inv_angle(mode);
    lo  = (n * ang) >>> 5;
    for (int k = -MAX_N; k <= 2*MAX_N; k++) begin
      if (k == 0) begin
        arr[k+OFS] = corner_i;
      end else if (k > 0) begin
        idx = (k <= 2*n) ? k - 1 : 2*n - 1;
        arr[k+OFS] = ver ? top_i[idx] : left_i[idx];
      end else if (ang < 0 && k >= lo) begin
        idx = ((k * inv + 128) >>> 8) - 1;
        if (idx < 0) idx = 0;
        if (idx > 2*MAX_N - 1) idx = 2*MAX_N - 1;
        arr[k+OFS] = ver ? left_i[idx] : top_i[idx];
      end else begin
        arr[k+OFS] = corner_i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < LEN; k++) ref_o[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < LEN; k++) ref_o[k] <= arr[k];
    end
  end
endmodule
