// tb_intra_pred_units: shared testbench of the three prediction units. Planar and
// angular operand generators each feed their own multiply-add unit, the DC unit
// runs on its own; all are fed the lane coordinates of row-wise beats (8 samples
// per beat, beat b covers raster positions 8b..8b+7) and compared with the model
// prediction of every mode and PU size. Each unit is one cycle from operands to
// samples, which is checked.
module tb_intra_pred_units;
  import hevc_pkg::*;
  import intra_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, v_in = 1'b0, chroma = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] mode;
  logic [2:0] log2n;
  logic [4:0] x [8], y [8];
  pix_t top_i [64], left_i [64], ref_i [97];
  am_op_t op_p [8], op_a [8];
  pix_t pix_p [8], pix_a [8], pix_d [8];
  logic vp, va, vd;

  intra_planar_pred  u_pl (.log2n, .x, .y, .top_i, .left_i, .op(op_p));
  intra_angular_pred u_an (.mode, .x, .y, .ref_i, .op(op_a));
  intra_dc_pred      u_dc (.clk, .rst_n, .in_valid(v_in), .log2n, .chroma, .x, .y, .top_i, .left_i,
                           .pix(pix_d), .out_valid(vd));
  intra_am_unit am_p (.clk, .rst_n, .in_valid(v_in), .op(op_p), .rnd(11'(1 << log2n)),
                      .shift(log2n + 3'd1), .res(pix_p), .out_valid(vp));
  intra_am_unit am_a (.clk, .rst_n, .in_valid(v_in), .op(op_a), .rnd(11'd16), .shift(3'd5),
                      .res(pix_a), .out_valid(va));

  int checks = 0, failures = 0, n_planar = 0, n_dc = 0, n_pos = 0, n_neg = 0;
  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    a64_t ti, li;
    ref_t r;
    blk_t p;
    int c, n, k, got;
    mode = 0; log2n = 2;
    for (int i = 0; i < 64; i++) begin top_i[i] = 0; left_i[i] = 0; end
    for (int i = 0; i < 97; i++) ref_i[i] = 0;
    for (int l = 0; l < 8; l++) begin x[l] = 0; y[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l2 = 2; l2 <= 5; l2++)
      for (int m = 0; m < 35; m++)
        for (int ch = 0; ch < ((m == 1) ? 2 : 1); ch++) begin
          n = 1 << l2;
          c = $urandom_range(0, 255);
          for (int i = 0; i < 64; i++) begin ti[i] = $urandom_range(0, 255); li[i] = $urandom_range(0, 255); end
          predict(m, n, ch[0], c, ti, li, p);
          if (m >= 2) main_array(m, n, c, ti, li, r);
          if (m == 0) n_planar++; else if (m == 1) n_dc++; else if (angle_of(m) < 0) n_neg++; else n_pos++;
          @(negedge clk);
          mode = 6'(m); log2n = 3'(l2); chroma = ch[0];
          for (int i = 0; i < 64; i++) begin top_i[i] = pix_t'(ti[i]); left_i[i] = pix_t'(li[i]); end
          if (m >= 2) for (int i = -32; i <= 64; i++) ref_i[i+32] = pix_t'(r[i] < 0 ? 0 : r[i]);
          for (int b = 0; b < n*n/8; b++) begin
            for (int l = 0; l < 8; l++) begin
              k = 8*b + l;
              x[l] = 5'(k % n); y[l] = 5'(k / n);
            end
            v_in = 1'b1;
            @(negedge clk);
            v_in = 1'b0;
            checks++;
            if (!(vp && va && vd)) failures++;
            for (int l = 0; l < 8; l++) begin
              k = 8*b + l;
              got = (m == 0) ? int'(pix_p[l]) : (m == 1) ? int'(pix_d[l]) : int'(pix_a[l]);
              checks++;
              if (got != p[k / n][k % n]) begin
                failures++;
                if (failures < 10) $display("m=%0d n=%0d ch=%0d (%0d,%0d) got %0d exp %0d", m, n, ch,
                                            k % n, k / n, got, p[k / n][k % n]);
              end
            end
          end
        end
    $display("modes: planar=%0d dc=%0d positive=%0d negative=%0d", n_planar, n_dc, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
