// tb_intra_ref_buffer: for every angular mode and size, builds the main reference
// array (including the inverse-angle projection of the side references for
// negative angles) in the model and compares it with ref_o[k + 32] over every
// position the prediction can read. Checks the one-cycle latency.
module tb_intra_ref_buffer;
  import hevc_pkg::*;
  import intra_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  always #5 clk = ~clk;
  logic [5:0] mode;
  logic [2:0] log2n;
  pix_t corner_i, top_i [64], left_i [64], ref_o [97];

  intra_ref_buffer dut (.*);

  int checks = 0, failures = 0, n_proj = 0;
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    a64_t ti, li;
    ref_t r;
    int c, n;
    mode = 2; log2n = 2; corner_i = 0;
    for (int i = 0; i < 64; i++) begin top_i[i] = 0; left_i[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int m = 2; m < 35; m++) begin
        n = 1 << l2;
        c = $urandom_range(0, 255);
        for (int i = 0; i < 64; i++) begin ti[i] = $urandom_range(0, 255); li[i] = $urandom_range(0, 255); end
        main_array(m, n, c, ti, li, r);
        if (r[-1] != -1) n_proj++;
        @(negedge clk);
        mode = 6'(m); log2n = 3'(l2); corner_i = pix_t'(c); in_valid = 1'b1;
        for (int i = 0; i < 64; i++) begin top_i[i] = pix_t'(ti[i]); left_i[i] = pix_t'(li[i]); end
        @(negedge clk);
        in_valid = 1'b0;
        checks++;
        if (!out_valid) failures++;
        for (int k = -32; k <= 64; k++)
          if (r[k] != -1) begin
            checks++;
            if (int'(ref_o[k+32]) != r[k]) begin
              failures++;
              if (failures < 10) $display("m=%0d n=%0d k=%0d got %0d exp %0d", m, n, k, ref_o[k+32], r[k]);
            end
          end
      end
    if (n_proj == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
