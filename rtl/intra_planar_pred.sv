// intra_planar_pred: planar predictor of the intra engine.
// For each lane's sample position (x, y) in an N x N PU it forms the four weighted
// terms of the planar average
//   pred = ((N-1-x)*L[y] + (x+1)*T[N] + (N-1-y)*T[x] + (y+1)*L[N] + N) >> (log2N + 1)
// and hands them to the shared AM unit, which does the multiplications. Because
// every lane carries its own (x, y), rows are produced in raster order whatever the
// PU size. Interface: top_i/left_i are the (filtered) references; op is the AM
// operand of each lane. Purely combinational.
module intra_planar_pred
  import hevc_pkg::*;
#(
  parameter int LANES = 8,
  parameter int MAX_N = 32
) (
  input  logic [2:0] log2n,
  input  logic [4:0] x [LANES],
  input  logic [4:0] y [LANES],
  input  pix_t       top_i  [2*MAX_N],
  input  pix_t       left_i [2*MAX_N],
  output am_op_t     op [LANES]
);
  always_comb begin
    int n;
    n = 1 << log2n;
    for (int l = 0; l < LANES; l++) begin
      op[l].s[0] = {1'b0, left_i[6'(y[l])]};
      op[l].w[0] = 7'(n - 1 - int'(x[l]));
      op[l].s[1] = {1'b0, top_i[n]};
      op[l].w[1] = 7'(int'(x[l]) + 1);
      op[l].s[2] = {1'b0, top_i[6'(x[l])]};
      op[l].w[2] = 7'(n - 1 - int'(y[l]));
      op[l].s[3] = {1'b0, left_i[n]};
      op[l].w[3] = 7'(int'(y[l]) + 1);
    end
  end
endmodule
