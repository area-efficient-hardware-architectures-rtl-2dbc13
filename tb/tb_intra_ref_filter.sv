// tb_intra_ref_filter: random and smooth reference sets for every mode and size,
// luma and chroma, compared with the model of the smoothing rule ([1 2 1] filter,
// strong bilinear filter for flat 32x32 sets, no filter for 4x4/DC/chroma).
// Checks the one-cycle latency and that all three outcomes occurred.
module tb_intra_ref_filter;
  import hevc_pkg::*;
  import intra_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid, chroma;
  always #5 clk = ~clk;
  logic [5:0] mode;
  logic [2:0] log2n;
  pix_t corner_i, corner_o, top_i [64], left_i [64], top_o [64], left_o [64];

  intra_ref_filter dut (.*);

  int checks = 0, failures = 0, n_strong = 0, n_3tap = 0, n_none = 0;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    a64_t ti, li, to, lo;
    int c, co, n, tt, ll;
    bit flat, ch;
    mode = 0; log2n = 2; chroma = 0; corner_i = 0;
    for (int i = 0; i < 64; i++) begin top_i[i] = 0; left_i[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int m = 0; m < 35; m++)
        for (int v = 0; v < 3; v++) begin
          n = 1 << l2;
          flat = (v == 1);
          ch = (v == 2);
          c = flat ? 100 : $urandom_range(0, 255);
          for (int i = 0; i < 64; i++) begin
            ti[i] = flat ? 100 + i/8 : $urandom_range(0, 255);
            li[i] = flat ? 100 - i/16 : $urandom_range(0, 255);
          end
          smooth(m, n, ch, c, ti, li, co, to, lo);
          if (!smooth_rule(m, n, ch)) n_none++;
          else begin
            tt = c + ti[63] - 2*ti[31]; ll = c + li[63] - 2*li[31];
            if (n == 32 && tt < 8 && tt > -8 && ll < 8 && ll > -8) n_strong++; else n_3tap++;
          end
          @(negedge clk);
          mode = 6'(m); log2n = 3'(l2); chroma = ch; corner_i = pix_t'(c); in_valid = 1'b1;
          for (int i = 0; i < 64; i++) begin top_i[i] = pix_t'(ti[i]); left_i[i] = pix_t'(li[i]); end
          @(negedge clk);
          in_valid = 1'b0;
          checks += 2;
          if (!out_valid) failures++;
          if (int'(corner_o) != co) failures++;
          for (int i = 0; i < 2*n; i++) begin
            checks += 2;
            if (int'(top_o[i]) != to[i] || int'(left_o[i]) != lo[i]) begin
              failures++;
              if (failures < 10) $display("m=%0d n=%0d i=%0d top %0d/%0d left %0d/%0d", m, n, i,
                                          top_o[i], to[i], left_o[i], lo[i]);
            end
          end
        end
    $display("outcomes: strong=%0d three_tap=%0d none=%0d", n_strong, n_3tap, n_none);
    if (n_strong == 0 || n_3tap == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
