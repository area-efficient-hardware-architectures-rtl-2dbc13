// sao_stats: sample-difference (SD) module of the SAO filter.
// For LANES samples per cycle it forms the difference original - deblocked and
// accumulates, per EO class (4) and category (1..4) and per BO band (32), the
// number of samples N and the sum of differences E that the fast distortion
// estimate needs (dD = N*O^2 - 2*O*E). Category-0 samples are not counted.
// Interface: clr zeroes all sums (takes priority), en accumulates the current lanes.
// Timing: sums are registered; the statistics of a cycle are visible next cycle.
// Counters are sized for one 64x64 CTU (13-bit N, 22-bit signed E).
module sao_stats
  import hevc_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  pix_t              org [LANES],
  input  pix_t              cur [LANES],
  input  logic [2:0]        eo_cat [4][LANES],
  output logic [12:0]       eo_n [4][4],
  output logic signed [21:0] eo_e [4][4],
  output logic [12:0]       bo_n [32],
  output logic signed [21:0] bo_e [32]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 4; k++) begin eo_n[c][k] <= '0; eo_e[c][k] <= '0; end
      for (int b = 0; b < 32; b++) begin bo_n[b] <= '0; bo_e[b] <= '0; end
    end else if (clr) begin
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 4; k++) begin eo_n[c][k] <= '0; eo_e[c][k] <= '0; end
      for (int b = 0; b < 32; b++) begin bo_n[b] <= '0; bo_e[b] <= '0; end
    end else if (en) begin
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 4; k++) begin
          logic [12:0] dn;
          logic signed [21:0] de;
          dn = '0; de = '0;
          for (int l = 0; l < LANES; l++)
            if (eo_cat[c][l] == 3'(k + 1)) begin
              dn = dn + 13'd1;
              de = de + 22'(signed'({1'b0, org[l]}) - signed'({1'b0, cur[l]}));
            end
          eo_n[c][k] <= eo_n[c][k] + dn;
          eo_e[c][k] <= eo_e[c][k] + de;
        end
      for (int b = 0; b < 32; b++) begin
        logic [12:0] dn;
        logic signed [21:0] de;
        dn = '0; de = '0;
        for (int l = 0; l < LANES; l++)
          if (cur[l][7:3] == 5'(b)) begin
            dn = dn + 13'd1;
            de = de + 22'(signed'({1'b0, org[l]}) - signed'({1'b0, cur[l]}));
          end
        bo_n[b] <= bo_n[b] + dn;
        bo_e[b] <= bo_e[b] + de;
      end
    end
  end
endmodule
