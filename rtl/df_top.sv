// df_top: deblocking filter (DF) for one 8x8 window that straddles a corner of the
// 8x8 deblocking grid: the vertical edge lies between columns 3 and 4 and the
// horizontal edge between rows 3 and 4.
// Control unit: rows arrive 8 samples per cycle. The 6-bit write address
// {A,B,C,D,E,F} = {row, column} is turned into the transposed address
// {D,E,F,A,B,C} by swapping its halves, so every sample is written at once into a
// normal image and a transposed image (64 registers each) and no transpose memory
// or transpose pass is needed.
// Vertical filter (VF) and horizontal filter (HF) then run in parallel, each one
// df_edge_filter (four line filters) working on one 4-line segment per cycle: VF on
// rows of the normal image, HF on rows of the transposed image (the columns).
// Average buffer: the output sample is (VF + HF + 1) >> 1, read row by row with the
// HF result taken back through the transposed address.
// Interface: in_valid/in_ready row handshake (8 rows), out_valid rows (8 rows, no
// back-pressure). bs_v[s]/bs_h[s] are the boundary strengths of segment s of the
// vertical/horizontal edge. Timing: 8 load cycles, 2 filter cycles, 8 output cycles.
// The transposed-address loading, parallel VF/HF and averaging follow the design;
// dec_* report the edge decisions for monitoring.
// The window placement and the one-window-at-a-time schedule are this
// implementation's choices.
module df_top
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pix_t       in_row [8],
  input  logic [1:0] bs_v [2],
  input  logic [1:0] bs_h [2],
  input  logic [6:0] beta,
  input  logic [4:0] tc,
  output logic       out_valid,
  output pix_t       out_row [8],
  // per filter cycle: which of VF/HF ({h,v}) filtered its segment, and strongly
  output logic       dec_valid,
  output logic [1:0] dec_on,
  output logic [1:0] dec_strong
);
  typedef enum logic [1:0] {LOAD, FILT, DRAIN} state_e;
  state_e     state;
  logic [2:0] cnt;
  pix_t       nrm [64];
  pix_t       trn [64];

  // transposed address: {A,B,C,D,E,F} -> {D,E,F,A,B,C}
  function automatic logic [5:0] taddr(input logic [5:0] a);
    return {a[2:0], a[5:3]};
  endfunction

  pix_t vf_in [4][8], vf_out [4][8];
  pix_t hf_in [4][8], hf_out [4][8];
  logic vf_on, vf_st, hf_on, hf_st;

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 8; i++) begin
        vf_in[j][i] = nrm[{cnt[0], 2'(j), 3'(i)}];
        hf_in[j][i] = trn[{cnt[0], 2'(j), 3'(i)}];
      end
  end

  df_edge_filter u_vf (.line_i(vf_in), .bs(bs_v[cnt[0]]), .beta, .tc,
                       .line_o(vf_out), .on(vf_on), .strong_o(vf_st));
  df_edge_filter u_hf (.line_i(hf_in), .bs(bs_h[cnt[0]]), .beta, .tc,
                       .line_o(hf_out), .on(hf_on), .strong_o(hf_st));

  assign in_ready   = (state == LOAD);
  assign dec_valid  = (state == FILT);
  assign dec_on     = {hf_on, vf_on};
  assign dec_strong = {hf_st, vf_st};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD; cnt <= '0; out_valid <= 1'b0;
      for (int k = 0; k < 64; k++) begin nrm[k] <= '0; trn[k] <= '0; end
      for (int i = 0; i < 8; i++) out_row[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        LOAD: if (in_valid) begin
          for (int i = 0; i < 8; i++) begin
            nrm[{cnt, 3'(i)}]        <= in_row[i];
            trn[taddr({cnt, 3'(i)})] <= in_row[i];
          end
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) begin state <= FILT; cnt <= '0; end
        end
        FILT: begin
          for (int j = 0; j < 4; j++)
            for (int i = 0; i < 8; i++) begin
              nrm[{cnt[0], 2'(j), 3'(i)}] <= vf_out[j][i];
              trn[{cnt[0], 2'(j), 3'(i)}] <= hf_out[j][i];
            end
          cnt <= cnt + 3'd1;
          if (cnt == 3'd1) begin state <= DRAIN; cnt <= '0; end
        end
        default: begin
          out_valid <= 1'b1;
          for (int i = 0; i < 8; i++)
            out_row[i] <= pix_t'((9'(nrm[{cnt, 3'(i)}]) + 9'(trn[taddr({cnt, 3'(i)})]) + 9'd1) >> 1);
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) begin state <= LOAD; cnt <= '0; end
        end
      endcase
    end
  end
endmodule
