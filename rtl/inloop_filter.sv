// inloop_filter: integrated in-loop filter (deblocking + SAO) for CTU x CTU blocks.
// In-loop filter scheduler:
//   LOAD  reconstructed and original samples of a CTU arrive 8 per cycle in raster
//         order into the DF buffer and the original buffer;
//   DF    every interior corner of the 8x8 grid is deblocked in place: the 8x8
//         window around corner (8i, 8j), i, j = 1 .. CTU/8-1, is sent row by row to
//         df_top and its result written back. The windows tile the CTU without
//         overlap, so the order does not matter;
//   FEED  the deblocked CTU and the original are streamed to sao_top, 8 per cycle.
// sao_top then gathers statistics, decides and streams the filtered CTU out while
// the next CTU is already loading here.
// CTU borders are left unfiltered by the DF (they need the neighbouring CTUs).
// Interface: in_valid/in_ready stream in, out_valid/out_pix/out_last stream out,
// per-CTU controls bs_v/bs_h (Bs of all vertical/horizontal edges), beta, tc,
// lambda, and monitor outputs for the DF decisions and the SAO decision.
// Timing (CTU = 64): 512 load + 49 x 19 DF (18 in df_top, one to start the next
// window) + 512 feed cycles here, i.e. one CTU every 1955 cycles; SAO overlaps.
// The DF -> DF buffer -> SAO -> output structure follows the design; the window
// schedule and per-CTU controls are this implementation's choices.
module inloop_filter
  import hevc_pkg::*;
#(
  parameter int CTU = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  pix_t              in_rec [8],
  input  pix_t              in_org [8],
  input  logic [1:0]        bs_v,
  input  logic [1:0]        bs_h,
  input  logic [6:0]        beta,
  input  logic [4:0]        tc,
  input  logic [7:0]        lambda,
  output logic              out_valid,
  output logic              out_last,
  output pix_t              out_pix [8],
  output logic              df_dec_valid,
  output logic [1:0]        df_dec_on,
  output logic [1:0]        df_dec_strong,
  output logic              sao_dec_valid,
  output sao_type_e         sao_type,
  output logic [1:0]        sao_eo_class,
  output logic [4:0]        sao_band_pos,
  output logic signed [3:0] sao_offs [4]
);
  localparam int AW    = $clog2(CTU * CTU);
  localparam int NW    = CTU / 8 - 1;       // interior corners per direction

  typedef enum logic [1:0] {LOAD, DF, FEED} state_e;
  state_e state;
  pix_t   rec_mem [CTU*CTU];
  pix_t   org_mem [CTU*CTU];
  logic [AW-1:0] waddr;                     // sample address in LOAD / FEED
  logic [$clog2(NW+1)-1:0] wi, wj;          // window indices 1..NW
  logic [2:0] rin, rout;                    // window rows sent / received
  logic sent_all;                           // all 8 rows of the window sent

  // ------------------------------------------------------------ DF
  pix_t df_in [8], df_out [8];
  logic df_in_valid, df_in_ready, df_out_valid;
  logic [1:0] bs_v2 [2], bs_h2 [2];
  assign bs_v2 = '{bs_v, bs_v};
  assign bs_h2 = '{bs_h, bs_h};

  function automatic logic [AW-1:0] win_addr(input int i, input int j, input int r, input int c);
    return AW'((8*i - 4 + r) * CTU + 8*j - 4 + c);
  endfunction

  always_comb
    for (int c = 0; c < 8; c++) df_in[c] = rec_mem[win_addr(int'(wi), int'(wj), int'(rin), c)];
  assign df_in_valid = (state == DF) && (rin != 3'd0 || !sent_all);


  df_top u_df (.clk, .rst_n, .in_valid(df_in_valid), .in_ready(df_in_ready), .in_row(df_in),
    .bs_v(bs_v2), .bs_h(bs_h2), .beta, .tc, .out_valid(df_out_valid), .out_row(df_out),
    .dec_valid(df_dec_valid), .dec_on(df_dec_on), .dec_strong(df_dec_strong));

  // ------------------------------------------------------------ SAO
  pix_t sao_deb [8], sao_org [8];
  logic sao_in_valid, sao_in_ready;
  logic signed [31:0] sao_cost;
  always_comb
    for (int c = 0; c < 8; c++) begin
      sao_deb[c] = rec_mem[waddr + AW'(c)];
      sao_org[c] = org_mem[waddr + AW'(c)];
    end
  assign sao_in_valid = (state == FEED);

  sao_top #(.CTU(CTU)) u_sao (.clk, .rst_n, .in_valid(sao_in_valid), .in_ready(sao_in_ready),
    .in_deb(sao_deb), .in_org(sao_org), .lambda, .out_valid, .out_last, .out_pix,
    .dec_valid(sao_dec_valid), .sao_type, .eo_class(sao_eo_class), .band_pos(sao_band_pos),
    .offs(sao_offs), .sao_cost);

  assign in_ready = (state == LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD; waddr <= '0; wi <= 1; wj <= 1; rin <= '0; rout <= '0; sent_all <= 1'b0;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          for (int c = 0; c < 8; c++) begin
            rec_mem[waddr + AW'(c)] <= in_rec[c];
            org_mem[waddr + AW'(c)] <= in_org[c];
          end
          waddr <= waddr + AW'(8);
          if (int'(waddr) == CTU*CTU - 8) begin
            waddr <= '0;
            state <= (NW > 0) ? DF : FEED;
            wi <= 1; wj <= 1; rin <= '0; rout <= '0; sent_all <= 1'b0;
          end
        end
        DF: begin
          if (df_in_valid && df_in_ready) begin
            rin <= rin + 3'd1;
            if (rin == 3'd7) sent_all <= 1'b1;
          end
          if (df_out_valid) begin
            for (int c = 0; c < 8; c++)
              rec_mem[win_addr(int'(wi), int'(wj), int'(rout), c)] <= df_out[c];
            rout <= rout + 3'd1;
            if (rout == 3'd7) begin
              sent_all <= 1'b0;
              if (int'(wj) == NW) begin
                wj <= 1;
                if (int'(wi) == NW) state <= FEED;
                else wi <= wi + 1'b1;
              end else wj <= wj + 1'b1;
            end
          end
        end
        default: if (sao_in_ready) begin
          waddr <= waddr + AW'(8);
          if (int'(waddr) == CTU*CTU - 8) begin waddr <= '0; state <= LOAD; end
        end
      endcase
    end
  end

  // The SAO stage accepts the whole CTU without pausing once it is in LOAD.
  assert property (@(posedge clk) disable iff (!rst_n) (state == FEED && waddr != '0) |-> sao_in_ready);
endmodule
