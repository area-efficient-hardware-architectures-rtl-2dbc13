// tb_hevc_top: whole-design run at the default sizes (intra PUs up to 32x32,
// 64x64 CTUs). The intra engine predicts PUs of every size in every mode family
// (planar, DC, positive and negative angles, horizontal and vertical) while the
// in-loop filter deblocks and SAO-filters four CTUs at the same time. All outputs
// are compared with the behavioural models; the PU latency (5 cycles) and the
// PU/CTU output counts are checked, and every mechanism (reference substitution,
// three-tap and strong smoothing, DF strong/normal/off, SAO EO/BO/off) is counted.
module tb_hevc_top;
  import hevc_pkg::*;
  import intra_model_pkg::*;
  import df_model_pkg::*;
  import sao_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic intra_start, intra_ready, intra_chroma, intra_out_valid, intra_out_first, intra_out_last;
  logic [5:0] intra_mode;
  logic [2:0] intra_log2n;
  logic [4:0] intra_avail;
  pix_t intra_corner, intra_top [64], intra_left [64], intra_out_pix [8];
  logic ilf_in_valid, ilf_in_ready, ilf_out_valid, ilf_out_last, ilf_df_dec_valid, ilf_sao_dec_valid;
  pix_t ilf_in_rec [8], ilf_in_org [8], ilf_out_pix [8];
  logic [1:0] ilf_bs_v, ilf_bs_h, ilf_df_dec_on, ilf_df_dec_strong, ilf_sao_eo_class;
  logic [6:0] ilf_beta;
  logic [4:0] ilf_tc, ilf_sao_band_pos;
  logic [7:0] ilf_lambda;
  sao_type_e ilf_sao_type;
  logic signed [3:0] ilf_sao_offs [4];

  hevc_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_strong_ref = 0, n_3tap = 0, n_subst = 0, n_neg = 0, n_pos = 0;
  int n_df_on = 0, n_df_strong = 0, n_df_seg = 0;
  int seen [3] = '{0, 0, 0};
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- intra side
  task automatic run_pu(input int m, input int l2, input bit [4:0] av, input bit linear);
    int n, c_s, c_f, t0, beats, k;
    a64_t ti, li, ts, ls, tf, lf;
    blk_t p;
    n = 1 << l2;
    for (int i = 0; i < 64; i++) begin
      ti[i] = linear ? 120 + i/16 : $urandom_range(0, 255);
      li[i] = linear ? 120 - i/16 : $urandom_range(0, 255);
    end
    c_s = linear ? 120 : $urandom_range(0, 255);
    subst(n, av, c_s, ti, li, c_f, ts, ls);
    smooth(m, n, 1'b0, c_f, ts, ls, c_f, tf, lf);
    predict(m, n, 1'b0, c_f, tf, lf, p);
    if (smooth_rule(m, n, 1'b0)) begin if (linear && n == 32) n_strong_ref++; else n_3tap++; end
    if (av != 5'b11111) n_subst++;
    if (m >= 2) begin if (angle_of(m) < 0) n_neg++; else n_pos++; end
    @(negedge clk);
    while (!intra_ready) @(negedge clk);
    intra_mode = 6'(m); intra_log2n = 3'(l2); intra_chroma = 1'b0; intra_avail = av;
    intra_corner = pix_t'(c_s);
    for (int i = 0; i < 64; i++) begin intra_top[i] = pix_t'(ti[i]); intra_left[i] = pix_t'(li[i]); end
    intra_start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    intra_start = 1'b0;
    beats = 0;
    while (1) begin
      @(posedge clk); #1;
      if (intra_out_valid) begin
        if (beats == 0) begin
          checks++;
          if (cycle - t0 != 5) begin failures++; $display("intra latency %0d", cycle - t0); end
        end
        for (int l = 0; l < 8; l++) begin
          k = beats*8 + l;
          checks++;
          if (int'(intra_out_pix[l]) != p[k / n][k % n]) begin
            failures++;
            if (failures < 10) $display("intra mode %0d n %0d (%0d,%0d) got %0d exp %0d", m, n,
                                        k % n, k / n, intra_out_pix[l], p[k / n][k % n]);
          end
        end
        beats++;
        if (intra_out_last) break;
      end
    end
    checks++;
    if (beats != n*n/8) failures++;
  endtask

  // ---------------------------------------------------------------- in-loop side
  localparam int NCTU = 4;
  img_t rec [NCTU], org [NCTU], expv [NCTU];
  int out_k = 0, out_ctu = 0, last_ctu_cycle = 0;
  bit ilf_done = 0;

  always @(posedge clk) if (rst_n && ilf_df_dec_valid) begin
    n_df_seg += 2;
    n_df_on += int'(ilf_df_dec_on[0]) + int'(ilf_df_dec_on[1]);
    n_df_strong += int'(ilf_df_dec_strong[0]) + int'(ilf_df_dec_strong[1]);
  end
  always @(posedge clk) if (rst_n && ilf_sao_dec_valid) seen[int'(ilf_sao_type)]++;

  always @(posedge clk) if (rst_n && ilf_out_valid) begin
    for (int l = 0; l < 8; l++) begin
      checks++;
      if (int'(ilf_out_pix[l]) != expv[out_ctu][out_k / 8][(out_k % 8)*8 + l]) begin
        failures++;
        if (failures < 10) $display("ilf ctu %0d word %0d lane %0d got %0d exp %0d", out_ctu, out_k, l,
                                    ilf_out_pix[l], expv[out_ctu][out_k / 8][(out_k % 8)*8 + l]);
      end
    end
    out_k++;
    if (out_k == 512) begin
      checks++;
      if (!ilf_out_last) failures++;
      if (out_ctu > 0) $display("in-loop filter: CTU %0d finished %0d cycles after CTU %0d", out_ctu, cycle - last_ctu_cycle, out_ctu - 1);
      last_ctu_cycle = cycle;
      out_k = 0; out_ctu++;
    end
  end

  task automatic model_ctu(input int i);
    img_t d;
    win_t w, r;
    int bsv [2], bsh [2], typ, cls, pos, cost, a, b;
    int mo [4];
    d = rec[i];
    bsv = '{int'(ilf_bs_v), int'(ilf_bs_v)};
    bsh = '{int'(ilf_bs_h), int'(ilf_bs_h)};
    for (int wi = 1; wi < 8; wi++) for (int wj = 1; wj < 8; wj++) begin
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) w[y][x] = d[8*wi-4+y][8*wj-4+x];
      window(w, bsv, bsh, int'(ilf_beta), int'(ilf_tc), r, a, b);
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) d[8*wi-4+y][8*wj-4+x] = r[y][x];
    end
    decide(d, org[i], 64, int'(ilf_lambda), typ, cls, pos, mo, cost);
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++)
      expv[i][y][x] = apply(d, 64, typ, cls, pos, mo, x, y);
  endtask

  initial begin : ilf_driver
    ilf_in_valid = 0; ilf_bs_v = 2'd2; ilf_bs_h = 2'd2; ilf_beta = 7'd40; ilf_tc = 5'd5; ilf_lambda = 8'd6;
    for (int l = 0; l < 8; l++) begin ilf_in_rec[l] = 0; ilf_in_org[l] = 0; end
    for (int i = 0; i < NCTU; i++)
      for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
        org[i][y][x] = 90 + x / 2 + y / 4;
        case (i)
          0: rec[i][y][x] = ((x / 8 + y / 8) % 3 == 0) ? 96 + 3*((x / 8) % 2) : 80 + 25*((y / 8) % 2) + $urandom_range(0, 3);
          1: rec[i][y][x] = org[i][y][x] + ((x % 8 == 2) ? 6 : (x % 8 == 6) ? -6 : 0);
          3: rec[i][y][x] = org[i][y][x];
          default: rec[i][y][x] = ((x + y) % 2) ? 200 - $urandom_range(0, 60) : 40 + $urandom_range(0, 60);
        endcase
      end
    @(posedge rst_n);
    for (int i = 0; i < NCTU; i++) begin
      model_ctu(i);
      for (int w = 0; w < 512; w++) begin
        @(negedge clk);
        ilf_in_valid = 1'b1;
        for (int l = 0; l < 8; l++) begin
          ilf_in_rec[l] = pix_t'(rec[i][w / 8][(w % 8)*8 + l]);
          ilf_in_org[l] = pix_t'(org[i][w / 8][(w % 8)*8 + l]);
        end
        @(posedge clk);
        while (!ilf_in_ready) @(posedge clk);
      end
      @(negedge clk);
      ilf_in_valid = 1'b0;
    end
    while (out_ctu < NCTU) @(posedge clk);
    ilf_done = 1;
  end

  initial begin
    intra_start = 0; intra_mode = 0; intra_log2n = 2; intra_chroma = 0; intra_avail = 0; intra_corner = 0;
    for (int i = 0; i < 64; i++) begin intra_top[i] = 0; intra_left[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int m = 0; m < 35; m += 3)
        run_pu(m, l2, (m % 2) ? 5'b11111 : 5'($urandom), 1'b0);
    run_pu(0, 5, 5'b11111, 1'b1);
    run_pu(26, 5, 5'b11111, 1'b1);
    wait (ilf_done);
    $display("mechanisms: ref_substitution=%0d three_tap=%0d strong_smoothing=%0d negative_angle=%0d positive_angle=%0d df_segments=%0d df_filtered=%0d df_strong=%0d sao_off=%0d sao_bo=%0d sao_eo=%0d",
             n_subst, n_3tap, n_strong_ref, n_neg, n_pos, n_df_seg, n_df_on, n_df_strong, seen[0], seen[1], seen[2]);
    if (n_subst == 0 || n_3tap == 0 || n_strong_ref == 0 || n_neg == 0 || n_pos == 0 ||
        n_df_strong == 0 || n_df_on - n_df_strong == 0 || n_df_seg - n_df_on == 0 ||
        seen[0] == 0 || seen[1] + seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
