// tb_intra_ref_select: drives random neighbour samples and every availability
// pattern for all PU sizes, and compares the substituted reference set with the
// behavioural model (walk from the bottom-left, copy the previous sample, 128
// when nothing is available). Also checks the one-cycle latency of valid_o.
module tb_intra_ref_select;
  import hevc_pkg::*;
  import intra_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, valid_o;
  always #5 clk = ~clk;
  logic [2:0] log2n;
  logic [4:0] avail;
  pix_t corner_i, corner_o, top_i [64], left_i [64], top_o [64], left_o [64];

  intra_ref_select dut (.*);

  int checks = 0, failures = 0, n_none = 0, n_part = 0;
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    a64_t ti, li, to, lo;
    int c, co, n;
    log2n = 2; avail = 0; corner_i = 0;
    for (int i = 0; i < 64; i++) begin top_i[i] = 0; left_i[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int av = 0; av < 32; av++) begin
        n = 1 << l2;
        for (int i = 0; i < 64; i++) begin ti[i] = $urandom_range(0, 255); li[i] = $urandom_range(0, 255); end
        c = $urandom_range(0, 255);
        subst(n, 5'(av), c, ti, li, co, to, lo);
        if (av == 0) n_none++; else if (av != 31) n_part++;
        @(negedge clk);
        log2n = 3'(l2); avail = 5'(av); corner_i = pix_t'(c); load = 1'b1;
        for (int i = 0; i < 64; i++) begin top_i[i] = pix_t'(ti[i]); left_i[i] = pix_t'(li[i]); end
        @(negedge clk);
        load = 1'b0;
        checks++;
        if (!valid_o) failures++;
        checks++;
        if (int'(corner_o) != co) failures++;
        for (int i = 0; i < 2*n; i++) begin
          checks += 2;
          if (int'(top_o[i]) != to[i] || int'(left_o[i]) != lo[i]) begin
            failures++;
            if (failures < 10) $display("n=%0d av=%b i=%0d top %0d/%0d left %0d/%0d", n, av, i,
                                        top_o[i], to[i], left_o[i], lo[i]);
          end
        end
        @(negedge clk);
        checks++;
        if (valid_o) failures++;
      end
    if (n_none == 0 || n_part == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
