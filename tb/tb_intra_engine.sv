// tb_intra_engine: end-to-end check of the intra prediction engine.
// Every mode (0..34) at every PU size (4..32) is run once with random neighbours and
// availability, followed by random PUs (some chroma, some with near-linear
// neighbours so that strong smoothing triggers). Each predicted sample is compared
// with the behavioural model in intra_model_pkg, and the timing is checked: first
// samples 5 cycles after start, exactly N*N/8 output cycles per PU.
// Also checks that start is ignored while the engine is busy (stall).
module tb_intra_engine;
  import hevc_pkg::*;
  import intra_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, ready, chroma, out_valid, out_first, out_last;
  logic [5:0] mode;
  logic [2:0] log2n;
  logic [4:0] avail;
  pix_t corner;
  pix_t top [64], left [64], out_pix [8];

  intra_engine dut (.clk, .rst_n, .start, .ready, .mode, .log2n, .chroma, .avail,
    .corner, .top, .left, .out_valid, .out_first, .out_last, .out_pix);

  int checks = 0, failures = 0, cycle = 0;
  int n_strong = 0, n_3tap = 0, n_nofilt = 0, n_neg = 0, n_subst = 0, n_stall = 0, n_chroma = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pu(input int m, input int l2, input bit ch, input bit [4:0] av, input bit linear);
    int n, c_s, c_f, t0, beats, k, ptr;
    a64_t ti, li, ts, ls, tf, lf;
    blk_t p;
    n = 1 << l2;
    for (int i = 0; i < 64; i++) begin
      ti[i] = linear ? 100 + i/8 : $urandom_range(0, 255);
      li[i] = linear ? 100 - i/8 : $urandom_range(0, 255);
    end
    c_s = linear ? 100 : $urandom_range(0, 255);
    subst(n, av, c_s, ti, li, c_f, ts, ls);
    smooth(m, n, ch, c_f, ts, ls, c_f, tf, lf);
    predict(m, n, ch, c_f, tf, lf, p);
    if (smooth_rule(m, n, ch)) begin
      if (n == 32 && (c_f != ((ls[0] + 2*c_s + ts[0] + 2) >> 2) || linear)) n_strong += linear;
      else n_3tap++;
    end else n_nofilt++;
    if (m >= 2 && angle_of(m) < 0) n_neg++;
    if (av != 5'b11111) n_subst++;
    if (ch) n_chroma++;
    // drive
    @(negedge clk);
    while (!ready) @(negedge clk);
    mode = 6'(m); log2n = 3'(l2); chroma = ch; avail = av; corner = pix_t'(c_s);
    for (int i = 0; i < 64; i++) begin top[i] = pix_t'(ti[i]); left[i] = pix_t'(li[i]); end
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    // a second start while busy must be ignored
    if (!ready) begin n_stall++; end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    beats = 0; ptr = 0;
    while (1) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (beats == 0) begin
          checks++;
          if (cycle - t0 != 5) begin
            failures++;
            $display("latency %0d (mode %0d n %0d)", cycle - t0, m, n);
          end
          checks++;
          if (!out_first) failures++;
        end
        for (int l = 0; l < 8; l++) begin
          k = ptr + l;
          checks++;
          if (int'(out_pix[l]) != p[k / n][k % n]) begin
            failures++;
            if (failures < 20)
              $display("mismatch mode %0d n %0d av %b ch %0d (%0d,%0d): got %0d exp %0d",
                       m, n, av, ch, k % n, k / n, out_pix[l], p[k / n][k % n]);
          end
        end
        ptr += 8;
        beats++;
        if (out_last) break;
      end
    end
    checks++;
    if (beats != n*n/8) begin
      failures++;
      $display("beats %0d expected %0d", beats, n*n/8);
    end
  endtask

  initial begin
    start = 0; mode = 0; log2n = 2; chroma = 0; avail = 0; corner = 0;
    for (int i = 0; i < 64; i++) begin top[i] = 0; left[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int m = 0; m < 35; m++)
        run_pu(m, l2, 1'b0, 5'(($urandom_range(0, 3) == 0) ? $urandom : 5'b11111), 1'b0);
    run_pu(1, 3, 1'b0, 5'b00000, 1'b0);            // nothing available -> 128
    for (int i = 0; i < 12; i++) run_pu(0, 5, 1'b0, 5'b11111, 1'b1);   // strong smoothing
    for (int i = 0; i < 6; i++)  run_pu(2 + 8*i % 33, 5, 1'b0, 5'b11111, 1'b1);
    for (int i = 0; i < 150; i++)
      run_pu($urandom_range(0, 34), $urandom_range(2, 5), ($urandom_range(0, 9) == 0),
             5'($urandom), ($urandom_range(0, 7) == 0));
    $display("mechanisms: strong=%0d three_tap=%0d no_filter=%0d negative_angle=%0d substitution=%0d chroma=%0d stall=%0d",
             n_strong, n_3tap, n_nofilt, n_neg, n_subst, n_chroma, n_stall);
    if (n_strong == 0 || n_3tap == 0 || n_nofilt == 0 || n_neg == 0 || n_subst == 0 ||
        n_chroma == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
