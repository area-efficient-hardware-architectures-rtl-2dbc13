// tb_sao_top: runs three 64x64 CTUs through the SAO filter, built so that the
// decision differs: one with ringing around sharp edges (edge offset expected),
// one with a brightness bias in a narrow range of values (band offset expected), and
// one equal to the original (SAO off). Output samples and the decision are
// compared with sao_model_pkg; the number of cycles per CTU is checked
// (512 load + 512 statistics + 51 decision + 512 output).
module tb_sao_top;
  import hevc_pkg::*;
  import sao_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_last, dec_valid;
  pix_t in_deb [8], in_org [8], out_pix [8];
  logic [7:0] lambda;
  sao_type_e sao_type;
  logic [1:0] eo_class;
  logic [4:0] band_pos;
  logic signed [3:0] offs [4];
  logic signed [31:0] sao_cost;

  sao_top #(.CTU(64)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_deb, .in_org, .lambda,
    .out_valid, .out_last, .out_pix, .dec_valid, .sao_type, .eo_class, .band_pos, .offs, .sao_cost);

  int checks = 0, failures = 0, cycle = 0;
  int seen [3] = '{0, 0, 0};
  img_t d, o;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_ctu(input int kind);
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
      o[y][x] = 60 + x + (y / 2);
      case (kind)
        0: d[y][x] = ((x % 8) == 3) ? o[y][x] + 6 : ((x % 8) == 5) ? o[y][x] - 6 : o[y][x];
        1: d[y][x] = (o[y][x] >= 96 && o[y][x] < 120) ? o[y][x] + 5 : o[y][x];
        default: d[y][x] = o[y][x];
      endcase
    end
  endtask

  task automatic run_ctu(input int kind);
    int typ, cls, pos, cost, t0, k, exp_v;
    int mo [4];
    make_ctu(kind);
    decide(d, o, 64, int'(lambda), typ, cls, pos, mo, cost);
    seen[typ]++;
    t0 = cycle;
    for (int w = 0; w < 512; w++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      if (w == 0) t0 = cycle;
      in_valid = 1'b1;
      for (int l = 0; l < 8; l++) begin
        in_deb[l] = pix_t'(d[w / 8][(w % 8)*8 + l]);
        in_org[l] = pix_t'(o[w / 8][(w % 8)*8 + l]);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    k = 0;
    while (k < 512) begin
      @(posedge clk); #1;
      if (dec_valid) begin
        checks += 3;
        if (int'(sao_type) != typ) begin failures++; $display("type %0d exp %0d", sao_type, typ); end
        if (typ == 2 && int'(eo_class) != cls) begin failures++; $display("class %0d exp %0d", eo_class, cls); end
        if (typ == 1 && int'(band_pos) != pos) begin failures++; $display("pos %0d exp %0d", band_pos, pos); end
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(offs[i]) != mo[i]) begin failures++; $display("off%0d %0d exp %0d", i, offs[i], mo[i]); end
        end
      end
      if (out_valid) begin
        for (int l = 0; l < 8; l++) begin
          exp_v = apply(d, 64, typ, cls, pos, mo, (k % 8)*8 + l, k / 8);
          checks++;
          if (int'(out_pix[l]) != exp_v) begin
            failures++;
            if (failures < 10) $display("ctu kind %0d word %0d lane %0d got %0d exp %0d", kind, k, l, out_pix[l], exp_v);
          end
        end
        k++;
        if (k == 512) begin
          checks += 2;
          if (!out_last) failures++;
          if (cycle - t0 != 512 + 512 + 51 + 512) begin
            failures++; $display("CTU took %0d cycles", cycle - t0);
          end
        end
      end
    end
  endtask

  initial begin
    in_valid = 0; lambda = 8'd4;
    for (int l = 0; l < 8; l++) begin in_deb[l] = 0; in_org[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_ctu(0);
    run_ctu(1);
    run_ctu(2);
    $display("decisions: off=%0d bo=%0d eo=%0d", seen[0], seen[1], seen[2]);
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
