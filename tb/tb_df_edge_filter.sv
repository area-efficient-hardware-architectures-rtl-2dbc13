// tb_df_edge_filter: random 4-line segments of three kinds (flat with a small
// step, moderate step, strong texture) with random Bs, beta and tc, compared with
// the behavioural model of the HEVC on/off, strong/normal decisions and filters.
// The unit is combinational, so outputs are sampled after a settle delay; every
// outcome (off, normal, strong) must occur.
module tb_df_edge_filter;
  import hevc_pkg::*;
  import df_model_pkg::*;

  pix_t line_i [4][8], line_o [4][8];
  logic [1:0] bs;
  logic [6:0] beta;
  logic [4:0] tc;
  logic on, strong_o;

  df_edge_filter dut (.*);

  int checks = 0, failures = 0, n_off = 0, n_norm = 0, n_strong = 0;
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    seg_t L, O;
    bit eon, est;
    int base, step, kind;
    for (int t = 0; t < 6000; t++) begin
      kind = t % 3;
      base = $urandom_range(20, 200);
      step = (kind == 0) ? $urandom_range(0, 6) : $urandom_range(5, 30);
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++)
        L[j][i] = (kind == 2) ? $urandom_range(0, 255)
                              : base + ((i >= 4) ? step : 0) + ((kind == 1) ? $urandom_range(0, 3) : 0);
      bs = 2'($urandom_range(0, 2));
      beta = 7'($urandom_range(6, 64));
      tc = 5'($urandom_range(0, 24));
      seg(L, int'(bs), int'(beta), int'(tc), O, eon, est);
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) line_i[j][i] = pix_t'(L[j][i]);
      #1;
      if (!eon) n_off++; else if (est) n_strong++; else n_norm++;
      checks += 2;
      if (on != eon) failures++;
      if (on && strong_o != est) failures++;
      for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(line_o[j][i]) != O[j][i]) begin
          failures++;
          if (failures < 10) $display("t=%0d line %0d pos %0d got %0d exp %0d", t, j, i, line_o[j][i], O[j][i]);
        end
      end
      #1;
    end
    $display("outcomes: off=%0d normal=%0d strong=%0d", n_off, n_norm, n_strong);
    if (n_off == 0 || n_norm == 0 || n_strong == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
