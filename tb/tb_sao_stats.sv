// tb_sao_stats: accumulates 512 random beats (one 64x64 CTU) with random EO
// categories per class and lane, some beats disabled, and compares every counter
// N and sum E with totals kept by the testbench; then checks that clr empties all
// sums in one cycle and takes priority over en.
module tb_sao_stats;
  import hevc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  always #5 clk = ~clk;
  pix_t org [8], cur [8];
  logic [2:0] eo_cat [4][8];
  logic [12:0] eo_n [4][4], bo_n [32];
  logic signed [21:0] eo_e [4][4], bo_e [32];

  sao_stats dut (.*);

  int checks = 0, failures = 0;
  int rn [4][4], re [4][4], rbn [32], rbe [32];
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic compare(string tag);
    for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (int'(eo_n[c][k]) != rn[c][k]) failures++;
      if (int'(eo_e[c][k]) != re[c][k]) begin
        failures++;
        if (failures < 10) $display("%s eo class %0d cat %0d E got %0d exp %0d", tag, c, k+1, eo_e[c][k], re[c][k]);
      end
    end
    for (int b = 0; b < 32; b++) begin
      checks += 2;
      if (int'(bo_n[b]) != rbn[b]) failures++;
      if (int'(bo_e[b]) != rbe[b]) begin
        failures++;
        if (failures < 10) $display("%s band %0d E got %0d exp %0d", tag, b, bo_e[b], rbe[b]);
      end
    end
  endtask

  initial begin
    bit act;
    for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) begin rn[c][k] = 0; re[c][k] = 0; end
    for (int b = 0; b < 32; b++) begin rbn[b] = 0; rbe[b] = 0; end
    for (int l = 0; l < 8; l++) begin org[l] = 0; cur[l] = 0; for (int c = 0; c < 4; c++) eo_cat[c][l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int t = 0; t < 600; t++) begin
      act = (t % 7 != 3);
      en = act;
      for (int l = 0; l < 8; l++) begin
        cur[l] = pix_t'($urandom_range(0, 255));
        org[l] = (t < 300) ? pix_t'($urandom_range(0, 255)) : pix_t'(int'(cur[l]) / 2);
        for (int c = 0; c < 4; c++) eo_cat[c][l] = 3'($urandom_range(0, 4));
        if (act) begin
          for (int c = 0; c < 4; c++) if (eo_cat[c][l] != 0) begin
            rn[c][int'(eo_cat[c][l]) - 1]++;
            re[c][int'(eo_cat[c][l]) - 1] += int'(org[l]) - int'(cur[l]);
          end
          rbn[int'(cur[l]) >> 3]++;
          rbe[int'(cur[l]) >> 3] += int'(org[l]) - int'(cur[l]);
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
    compare("after accumulation");
    clr = 1'b1; en = 1'b1;
    @(negedge clk);
    clr = 1'b0; en = 1'b0;
    for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) begin rn[c][k] = 0; re[c][k] = 0; end
    for (int b = 0; b < 32; b++) begin rbn[b] = 0; rbe[b] = 0; end
    compare("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
