// intra_am_unit: the dedicated addition-multiplication (AM) unit of the intra
// engine. All planar and directional predictions reduce to the same operation, so
// one shared bank of multipliers serves every mode: each of the LANES lanes computes
//   res = clip((s0*w0 + s1*w1 + s2*w2 + s3*w3 + rnd) >> shift)
// Directional prediction uses two products ((32-f)*a + f*b + 16) >> 5, planar all
// four. Interface: one am_op_t per lane; rnd and shift are common to all lanes.
// Timing: one register stage (the arithmetic 'O' stage); out_valid follows in_valid.
// A shared multiply-add unit follows the design; four products per lane (rather than
// the two of a directional sample) is this implementation's choice so planar fits.
module intra_am_unit
  import hevc_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  am_op_t        op [LANES],
  input  logic [10:0]   rnd,
  input  logic [2:0]    shift,
  output pix_t          res [LANES],
  output logic          out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) res[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int l = 0; l < LANES; l++) begin
          logic [17:0] acc;
          acc = 18'(rnd);
          for (int t = 0; t < 4; t++) acc = acc + 18'(op[l].s[t]) * 18'(op[l].w[t]);
          acc = acc >> shift;
          res[l] <= (acc > 18'd255) ? 8'd255 : acc[7:0];
        end
    end
  end
endmodule
