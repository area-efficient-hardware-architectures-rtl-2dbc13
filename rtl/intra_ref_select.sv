// intra_ref_select: reference selection (RS) stage of the intra engine.
// Captures the neighbours of the current PU - corner, top, top-right, left and
// left-bottom - together with a 5-bit availability register, and replaces the
// missing ones by HEVC reference substitution: the samples are scanned from the
// bottom of the left-bottom column up to the corner and then along the top row to
// the top-right end; an unavailable sample takes the value of the previous
// available one in that order (the first available one if none precedes it), and
// the whole set is 128 when nothing is available.
// Interface: avail = {LB, L, C, T, TR}; top_i[k] is Ref[k][-1] (k < 2N),
// left_i[k] is Ref[-1][k]. Entries beyond 2N-1 are ignored and returned as
// substituted values. Timing: one register stage; valid_o follows load by a cycle.
// The 5-bit availability register follows the design; per-group (rather than
// per-sample) availability is this implementation's choice.
module intra_ref_select
  import hevc_pkg::*;
#(
  parameter int MAX_N = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [2:0] log2n,
  input  logic [4:0] avail,
  input  pix_t       corner_i,
  input  pix_t       top_i  [2*MAX_N],
  input  pix_t       left_i [2*MAX_N],
  output pix_t       corner_o,
  output pix_t       top_o  [2*MAX_N],
  output pix_t       left_o [2*MAX_N],
  output logic       valid_o
);
  localparam int L = 4*MAX_N + 1;   // linear scan length

  pix_t lin_v  [L];
  logic lin_ok [L];
  pix_t lin_s  [L];

  always_comb begin
    int n;
    pix_t first, last;
    logic found;
    n = 1 << log2n;
    found = 1'b0;
    first = 8'd128;
    lin_v  = '{default: '0};
    lin_ok = '{default: 1'b0};
    lin_s  = '{default: '0};
    // Linear order: p = 0 .. 2*MAX_N-1 -> left[2*MAX_N-1-p]; p = 2*MAX_N -> corner;
    // p > 2*MAX_N -> top[p-2*MAX_N-1].
    for (int p = 0; p < L; p++) begin
      int k;
      k = 0;
      if (p < 2*MAX_N) begin
        k = 2*MAX_N - 1 - p;
        lin_v[p]  = left_i[k];
        lin_ok[p] = (k < n) ? avail[3] : (k < 2*n) ? avail[4] : 1'b0;
      end else if (p == 2*MAX_N) begin
        lin_v[p]  = corner_i;
        lin_ok[p] = avail[2];
      end else begin
        k = p - 2*MAX_N - 1;
        lin_v[p]  = top_i[k];
        lin_ok[p] = (k < n) ? avail[1] : (k < 2*n) ? avail[0] : 1'b0;
      end
    end
    for (int p = 0; p < L; p++)
      if (!found && lin_ok[p]) begin
        found = 1'b1;
        first = lin_v[p];
      end
    last = first;
    for (int p = 0; p < L; p++) begin
      if (lin_ok[p]) last = lin_v[p];
      lin_s[p] = last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o  <= 1'b0;
      corner_o <= 8'd128;
      for (int k = 0; k < 2*MAX_N; k++) begin
        top_o[k]  <= 8'd128;
        left_o[k] <= 8'd128;
      end
    end else begin
      valid_o <= load;
      if (load) begin
        corner_o <= lin_s[2*MAX_N];
        for (int k = 0; k < 2*MAX_N; k++) begin
          left_o[k] <= lin_s[2*MAX_N - 1 - k];
          top_o[k]  <= lin_s[2*MAX_N + 1 + k];
        end
      end
    end
  end
endmodule
