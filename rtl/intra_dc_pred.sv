// intra_dc_pred: DC predictor of the intra engine.
// DC = (sum of the N top and N left references + N) >> (log2N + 1). For luma PUs
// smaller than 32x32 the first row and column are smoothed towards the references:
//   (0,0): (L[0] + 2*DC + T[0] + 2) >> 2,  (x,0): (T[x] + 3*DC + 2) >> 2,
//   (0,y): (L[y] + 3*DC + 2) >> 2; every other sample (and every chroma sample) is DC.
// Each lane carries its own (x, y), so 8 row-wise samples come out per cycle.
// Timing: one register stage, matching the AM unit so both paths line up.
// The rounding term +N comes from the HEVC definition of DC; a plain adder tree
// (instead of a reused set of three-input adders) is this implementation's choice.
module intra_dc_pred
  import hevc_pkg::*;
#(
  parameter int LANES = 8,
  parameter int MAX_N = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] log2n,
  input  logic       chroma,
  input  logic [4:0] x [LANES],
  input  logic [4:0] y [LANES],
  input  pix_t       top_i  [2*MAX_N],
  input  pix_t       left_i [2*MAX_N],
  output pix_t       pix [LANES],
  output logic       out_valid
);
  pix_t dc;
  pix_t p [LANES];

  always_comb begin
    int n, sum;
    logic filt;
    n = 1 << log2n;
    sum = n;
    for (int k = 0; k < MAX_N; k++)
      if (k < n) sum = sum + int'(top_i[k]) + int'(left_i[k]);
    dc = pix_t'(sum >> (log2n + 3'd1));
    filt = !chroma && (log2n < 3'd5);
    for (int l = 0; l < LANES; l++) begin
      if (filt && x[l] == 5'd0 && y[l] == 5'd0)
        p[l] = pix_t'((int'(left_i[0]) + 2*int'(dc) + int'(top_i[0]) + 2) >> 2);
      else if (filt && y[l] == 5'd0)
        p[l] = pix_t'((int'(top_i[6'(x[l])]) + 3*int'(dc) + 2) >> 2);
      else if (filt && x[l] == 5'd0)
        p[l] = pix_t'((int'(left_i[6'(y[l])]) + 3*int'(dc) + 2) >> 2);
      else
        p[l] = dc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) pix[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pix <= p;
    end
  end
endmodule
