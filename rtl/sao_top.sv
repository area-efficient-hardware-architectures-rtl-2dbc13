// sao_top: sample adaptive offset (SAO) filter for one CTU x CTU block.
// SAO control unit, in four phases:
//   LOAD   deblocked and original samples arrive 8 per cycle in raster order and are
//          written into the DF buffer and the original buffer (8-sample words);
//   STAT   the CTU is read back 8 samples per cycle; the 3 x 10 neighbourhood of the
//          8 samples is taken from the word buffer, the four EO classes classify
//          them (four sao_eo units) and the SD module (sao_stats) accumulates
//          N and E per EO class/category and per BO band;
//   MD     sao_md picks EO (class and offsets), BO (band position and offsets) or off;
//   APPLY  the CTU is read once more and filtered 8 samples per cycle with the chosen
//          type, and streamed out in raster order.
// Samples outside the CTU are treated as missing neighbours (EO category 0).
// Interface: in_valid/in_ready (ready during LOAD), out_valid/out_pix/out_last, and
// the decision and its estimated cost (dec_valid pulses when it is known). Timing for CTU = 64: 512 load,
// 512 statistics, 51 decision (start, 48 entries, decision, hand-over) and 512 output cycles.
// The phase structure, the SD/EO/BO/MD split and 8 samples per cycle follow the
// design; the buffer layout and the CTU-border rule are this implementation's choice.
module sao_top
  import hevc_pkg::*;
#(
  parameter int CTU = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  pix_t              in_deb [8],
  input  pix_t              in_org [8],
  input  logic [7:0]        lambda,
  output logic              out_valid,
  output logic              out_last,
  output pix_t              out_pix [8],
  output logic              dec_valid,
  output sao_type_e         sao_type,
  output logic [1:0]        eo_class,
  output logic [4:0]        band_pos,
  output logic signed [3:0] offs [4],
  output logic signed [31:0] sao_cost
);
  localparam int GW    = CTU / 8;          // words per row
  localparam int WORDS = CTU * GW;
  localparam int AW    = $clog2(WORDS);

  typedef enum logic [1:0] {LOAD, STAT, MD, APPLY} phase_e;
  phase_e            phase;
  logic [AW-1:0]     addr;
  logic [63:0]       deb_mem [WORDS];
  logic [63:0]       org_mem [WORDS];

  assign in_ready = (phase == LOAD);

  // ------------------------------------------------------------ neighbourhood
  pix_t win [3][10];
  logic wok [3][10];
  always_comb begin
    int gy, gx;
    gy = int'(addr) / GW;
    gx = int'(addr) % GW;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 10; k++) begin
        int yy, xx;
        logic [63:0] w;
        yy = gy + r - 1;
        xx = gx*8 + k - 1;
        wok[r][k] = (yy >= 0) && (yy < CTU) && (xx >= 0) && (xx < CTU);
        w = wok[r][k] ? deb_mem[AW'(yy*GW + xx/8)] : 64'd0;
        win[r][k] = wok[r][k] ? w[8*(xx%8) +: 8] : 8'd0;
      end
  end

  pix_t cur [8], org [8];
  pix_t na [4][8];
  pix_t nb [4][8];
  logic [7:0] nok [4];
  always_comb begin
    logic [63:0] ow;
    ow = org_mem[addr];
    for (int l = 0; l < 8; l++) begin
      cur[l] = win[1][l+1];
      org[l] = ow[8*l +: 8];
      // class 0: horizontal
      na[0][l] = win[1][l];   nb[0][l] = win[1][l+2];
      nok[0][l] = wok[1][l] && wok[1][l+2];
      // class 1: vertical
      na[1][l] = win[0][l+1]; nb[1][l] = win[2][l+1];
      nok[1][l] = wok[0][l+1] && wok[2][l+1];
      // class 2: 135 degrees (up-left, down-right)
      na[2][l] = win[0][l];   nb[2][l] = win[2][l+2];
      nok[2][l] = wok[0][l] && wok[2][l+2];
      // class 3: 45 degrees (up-right, down-left)
      na[3][l] = win[0][l+2]; nb[3][l] = win[2][l];
      nok[3][l] = wok[0][l+2] && wok[2][l];
    end
  end

  // ------------------------------------------------------------ EO / BO units
  logic [2:0] cat [4][8];
  pix_t eo_pix [4][8];
  pix_t bo_pix [8];
  logic [4:0] bo_band [8];
  for (genvar c = 0; c < 4; c++) begin : g_eo
    sao_eo #(.LANES(8)) u_eo (.cur(cur), .nb_a(na[c]), .nb_b(nb[c]), .nb_ok(nok[c]),
                              .offs(offs), .cat(cat[c]), .pix(eo_pix[c]));
  end
  sao_bo #(.LANES(8)) u_bo (.cur(cur), .band_pos, .offs, .band(bo_band), .pix(bo_pix));

  // ------------------------------------------------------------ SD and MD
  logic [12:0]        eo_n [4][4];
  logic signed [21:0] eo_e [4][4];
  logic [12:0]        bo_n [32];
  logic signed [21:0] bo_e [32];
  logic md_start, md_done;

  sao_stats #(.LANES(8)) u_sd (.clk, .rst_n, .clr(phase == LOAD), .en(phase == STAT),
    .org, .cur, .eo_cat(cat), .eo_n, .eo_e, .bo_n, .bo_e);

  sao_md u_md (.clk, .rst_n, .start(md_start), .eo_n, .eo_e, .bo_n, .bo_e, .lambda,
    .done(md_done), .sao_type, .eo_class, .band_pos, .offs, .cost(sao_cost));

  assign dec_valid = md_done;

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= LOAD; addr <= '0; md_start <= 1'b0;
      out_valid <= 1'b0; out_last <= 1'b0;
      for (int l = 0; l < 8; l++) out_pix[l] <= '0;
    end else begin
      md_start  <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (phase)
        LOAD: if (in_valid) begin
          for (int l = 0; l < 8; l++) begin
            deb_mem[addr][8*l +: 8] <= in_deb[l];
            org_mem[addr][8*l +: 8] <= in_org[l];
          end
          addr <= addr + 1'b1;
          if (int'(addr) == WORDS - 1) begin phase <= STAT; addr <= '0; end
        end
        STAT: begin
          addr <= addr + 1'b1;
          if (int'(addr) == WORDS - 1) begin phase <= MD; addr <= '0; md_start <= 1'b1; end
        end
        MD: if (md_done) phase <= APPLY;
        default: begin
          out_valid <= 1'b1;
          out_last  <= (int'(addr) == WORDS - 1);
          for (int l = 0; l < 8; l++)
            case (sao_type)
              SAO_EO:  out_pix[l] <= eo_pix[eo_class][l];
              SAO_BO:  out_pix[l] <= bo_pix[l];
              default: out_pix[l] <= cur[l];
            endcase
          addr <= addr + 1'b1;
          if (int'(addr) == WORDS - 1) begin phase <= LOAD; addr <= '0; end
        end
      endcase
    end
  end
endmodule
