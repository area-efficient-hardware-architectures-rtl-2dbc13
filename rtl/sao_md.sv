// sao_md: SAO mode decision (MD) by fast rate-distortion estimation.
// For every statistic entry (16 EO class/category pairs, then 32 BO bands) one per
// cycle, eight offset magnitudes m = 0..7 are tried in parallel:
//   O = s*m, dJ = N*O^2 - 2*O*E + lambda*R, R = m + 1 bits (estimated)
// where the sign s is +1 for EO categories 1-2, -1 for categories 3-4 and the
// sign of E for a band. The cheapest (dJ, O) of each entry is kept. Then, in one
// cycle, the four EO class costs, the 32 costs of a four-band window and "SAO off"
// (cost 0) are compared and the cheapest is the decision.
// Interface: start (pulse) with the statistics held stable until done; done pulses
// with type, eo_class, band_pos and the four offsets valid until the next start.
// Timing: 48 entry cycles + 1 decision cycle.
// dD = N*O^2 - 2*O*E and dJ = dD + lambda*R follow the design; the bit estimate
// R and the offset search range are this implementation's choices.
module sao_md
  import hevc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [12:0]        eo_n [4][4],
  input  logic signed [21:0] eo_e [4][4],
  input  logic [12:0]        bo_n [32],
  input  logic signed [21:0] bo_e [32],
  input  logic [7:0]         lambda,
  output logic               done,
  output sao_type_e          sao_type,
  output logic [1:0]         eo_class,
  output logic [4:0]         band_pos,
  output logic signed [3:0]  offs [4],
  output logic signed [31:0] cost
);
  logic              run;
  logic [5:0]        idx;
  logic signed [31:0] bj [48];
  logic signed [3:0]  bo [48];

  // evaluate the current entry
  logic signed [31:0] e_best_j;
  logic signed [3:0]  e_best_o;
  always_comb begin
    int n, e, s, o, j;
    if (idx < 6'd16) begin
      n = int'(eo_n[idx[3:2]][idx[1:0]]);
      e = int'(eo_e[idx[3:2]][idx[1:0]]);
      s = (idx[1:0] < 2'd2) ? 1 : -1;
    end else begin
      n = int'(bo_n[5'(idx - 6'd16)]);
      e = int'(bo_e[5'(idx - 6'd16)]);
      s = (e < 0) ? -1 : 1;
    end
    e_best_j = 32'(int'(lambda));
    e_best_o = '0;
    for (int m = 1; m < 8; m++) begin
      o = s * m;
      j = n*o*o - 2*o*e + int'(lambda) * (m + 1);
      if (j < int'(e_best_j)) begin
        e_best_j = 32'(j);
        e_best_o = 4'(o);
      end
    end
  end

  // final decision
  sao_type_e          d_type;
  logic [1:0]         d_class;
  logic [4:0]         d_pos;
  logic signed [31:0] d_cost;
  always_comb begin
    logic signed [31:0] j;
    d_type = SAO_OFF; d_class = '0; d_pos = '0; d_cost = '0;
    for (int c = 0; c < 4; c++) begin
      j = bj[4*c] + bj[4*c+1] + bj[4*c+2] + bj[4*c+3];
      if (j < d_cost) begin d_cost = j; d_type = SAO_EO; d_class = 2'(c); end
    end
    for (int p = 0; p < 32; p++) begin
      j = bj[16 + p] + bj[16 + ((p+1)%32)] + bj[16 + ((p+2)%32)] + bj[16 + ((p+3)%32)];
      if (j < d_cost) begin d_cost = j; d_type = SAO_BO; d_pos = 5'(p); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; idx <= '0; done <= 1'b0;
      sao_type <= SAO_OFF; eo_class <= '0; band_pos <= '0; cost <= '0;
      for (int k = 0; k < 4; k++) offs[k] <= '0;
      for (int k = 0; k < 48; k++) begin bj[k] <= '0; bo[k] <= '0; end
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1; idx <= '0;
      end else if (run) begin
        if (idx < 6'd48) begin
          bj[idx] <= e_best_j;
          bo[idx] <= e_best_o;
          idx <= idx + 6'd1;
        end else begin
          run <= 1'b0; done <= 1'b1;
          sao_type <= d_type; eo_class <= d_class; band_pos <= d_pos; cost <= d_cost;
          for (int k = 0; k < 4; k++)
            case (d_type)
              SAO_EO:  offs[k] <= bo[4*int'(d_class) + k];
              SAO_BO:  offs[k] <= bo[16 + ((int'(d_pos) + k) % 32)];
              default: offs[k] <= '0;
            endcase
        end
      end
    end
  end
endmodule
