// tb_inloop_filter: end-to-end check of the integrated in-loop filter on 64x64 CTUs.
// Each CTU is a blocky picture (flat 8x8 blocks with small steps, larger steps and
// textured blocks, so that strong, normal and skipped deblocking all occur) with an
// original that SAO can approach. The expected output is computed with
// df_model_pkg (every interior 8x8-grid corner window) and sao_model_pkg.
// Also checks that the next CTU can be loaded while SAO still works on the previous
// one, and counts DF strong/normal/off decisions and SAO types.
module tb_inloop_filter;
  import hevc_pkg::*;
  import df_model_pkg::*;
  import sao_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_last, df_dec_valid, sao_dec_valid;
  pix_t in_rec [8], in_org [8], out_pix [8];
  logic [1:0] bs_v, bs_h, df_dec_on, df_dec_strong, sao_eo_class;
  logic [6:0] beta;
  logic [4:0] tc, sao_band_pos;
  logic [7:0] lambda;
  sao_type_e sao_type;
  logic signed [3:0] sao_offs [4];

  inloop_filter #(.CTU(64)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_rec, .in_org, .bs_v, .bs_h,
    .beta, .tc, .lambda, .out_valid, .out_last, .out_pix, .df_dec_valid, .df_dec_on,
    .df_dec_strong, .sao_dec_valid, .sao_type, .sao_eo_class, .sao_band_pos, .sao_offs);

  int checks = 0, failures = 0;
  int n_strong = 0, n_on = 0, n_dec = 0, n_overlap = 0;
  int m_on = 0, m_strong = 0;
  int seen [3] = '{0, 0, 0};
  localparam int NCTU = 4;
  img_t rec [NCTU], org [NCTU], expv [NCTU];
  int out_k = 0, out_ctu = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && df_dec_valid) begin
    n_dec += 2;
    n_on += int'(df_dec_on[0]) + int'(df_dec_on[1]);
    n_strong += int'(df_dec_strong[0]) + int'(df_dec_strong[1]);
  end
  always @(posedge clk) if (rst_n && sao_dec_valid) seen[int'(sao_type)]++;
  // a CTU being loaded while an earlier CTU has not been fully output yet
  int in_words = 0;
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (in_words / 512 > out_ctu) n_overlap++;
    in_words++;
  end

  // expected picture of one CTU
  task automatic model_ctu(input int i);
    img_t d;
    win_t w, r;
    int bsv [2], bsh [2], typ, cls, pos, cost, a, b;
    int mo [4];
    d = rec[i];
    bsv = '{int'(bs_v), int'(bs_v)};
    bsh = '{int'(bs_h), int'(bs_h)};
    for (int wi = 1; wi < 8; wi++) for (int wj = 1; wj < 8; wj++) begin
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) w[y][x] = d[8*wi-4+y][8*wj-4+x];
      window(w, bsv, bsh, int'(beta), int'(tc), r, a, b);
      m_on += a; m_strong += b;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) d[8*wi-4+y][8*wj-4+x] = r[y][x];
    end
    decide(d, org[i], 64, int'(lambda), typ, cls, pos, mo, cost);
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++)
      expv[i][y][x] = apply(d, 64, typ, cls, pos, mo, x, y);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int l = 0; l < 8; l++) begin
      checks++;
      if (int'(out_pix[l]) != expv[out_ctu][out_k / 8][(out_k % 8)*8 + l]) begin
        failures++;
        if (failures < 10) $display("ctu %0d y %0d x %0d got %0d exp %0d", out_ctu, out_k / 8,
                                    (out_k % 8)*8 + l, out_pix[l], expv[out_ctu][out_k / 8][(out_k % 8)*8 + l]);
      end
    end
    out_k++;
    if (out_k == 512) begin
      checks++;
      if (!out_last) failures++;
      out_k = 0; out_ctu++;
    end
  end

  initial begin
    in_valid = 0; bs_v = 2'd2; bs_h = 2'd1; beta = 7'd38; tc = 5'd6; lambda = 8'd6;
    for (int l = 0; l < 8; l++) begin in_rec[l] = 0; in_org[l] = 0; end
    for (int i = 0; i < NCTU; i++)
      for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
        int base;
        // blocks: flat with small steps, large steps, or textured
        case ((x / 8 + y / 8 + i) % 4)
          0: base = 100 + 2*(x / 8) + (y / 8);
          1: base = 100 + 4*((x / 8) % 2) + 3*((y / 8) % 2);
          2: base = 80 + 30*((x / 8) % 2);
          default: base = 90 + int'($urandom_range(0, 40));
        endcase
        org[i][y][x] = 100 + x / 4 + y / 4;
        rec[i][y][x] = (i == 2) ? org[i][y][x] + ((x % 8 == 3) ? 5 : 0) : base;
        if (i == 3) rec[i][y][x] = org[i][y][x];
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCTU; i++) begin
      model_ctu(i);
      for (int w = 0; w < 512; w++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int l = 0; l < 8; l++) begin
          in_rec[l] = pix_t'(rec[i][w / 8][(w % 8)*8 + l]);
          in_org[l] = pix_t'(org[i][w / 8][(w % 8)*8 + l]);
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    while (out_ctu < NCTU) @(posedge clk);
    checks += 2;
    if (m_on != n_on) begin failures++; $display("DF on %0d model %0d", n_on, m_on); end
    if (m_strong != n_strong) begin failures++; $display("DF strong %0d model %0d", n_strong, m_strong); end
    $display("mechanisms: df_segments=%0d df_filtered=%0d df_strong=%0d df_normal=%0d sao_off=%0d sao_bo=%0d sao_eo=%0d load_during_sao=%0d",
             n_dec, n_on, n_strong, n_on - n_strong, seen[0], seen[1], seen[2], n_overlap);
    if (n_strong == 0 || n_on - n_strong == 0 || n_dec - n_on == 0 || seen[0] == 0 ||
        seen[2] == 0 || seen[1] + seen[2] + seen[0] != NCTU || n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
