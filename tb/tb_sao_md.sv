// tb_sao_md: builds deblocked/original 64x64 CTU pairs of several kinds (no error,
// band-limited bias, edge-dependent bias, noise), forms the statistics in the
// testbench and compares the decision (type, EO class, band position, offsets,
// cost) with the model's exhaustive rate-distortion search. Checks that done comes
// 49 cycles after start (48 entry cycles and one decision cycle) and that off, BO
// and EO were each chosen.
module tb_sao_md;
  import hevc_pkg::*;
  import sao_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  always #5 clk = ~clk;
  logic [12:0] eo_n [4][4], bo_n [32];
  logic signed [21:0] eo_e [4][4], bo_e [32];
  logic [7:0] lambda;
  sao_type_e sao_type;
  logic [1:0] eo_class;
  logic [4:0] band_pos;
  logic signed [3:0] offs [4];
  logic signed [31:0] cost;

  sao_md dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int seen [3] = '{0, 0, 0};
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    img_t d, o;
    int typ, cls, pos, cst, t0, k, kind;
    int mo [4];
    lambda = 0;
    for (int c = 0; c < 4; c++) for (int j = 0; j < 4; j++) begin eo_n[c][j] = 0; eo_e[c][j] = 0; end
    for (int b = 0; b < 32; b++) begin bo_n[b] = 0; bo_e[b] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      kind = t % 4;
      for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
        d[y][x] = (kind == 3) ? $urandom_range(0, 255) : 60 + x + ((y * 7 + x * 3) % 5);
        case (kind)
          0: o[y][x] = d[y][x];
          1: o[y][x] = d[y][x] + (((d[y][x] >> 3) % 32 >= 10 && (d[y][x] >> 3) % 32 < 14) ? 3 : 0);
          default: o[y][x] = d[y][x] + $urandom_range(0, 4) - 2;
        endcase
      end
      if (kind == 2)
        for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
          k = cat_at(d, 64, 0, x, y);
          if (k == 1) o[y][x] = d[y][x] + 4; else if (k == 4) o[y][x] = d[y][x] - 4;
        end
      lambda = 8'($urandom_range(2, 40));
      decide(d, o, 64, int'(lambda), typ, cls, pos, mo, cst);
      for (int c = 0; c < 4; c++) for (int j = 0; j < 4; j++) begin eo_n[c][j] = 0; eo_e[c][j] = 0; end
      for (int b = 0; b < 32; b++) begin bo_n[b] = 0; bo_e[b] = 0; end
      for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
        for (int c = 0; c < 4; c++) begin
          k = cat_at(d, 64, c, x, y);
          if (k > 0) begin eo_n[c][k-1] += 1; eo_e[c][k-1] += 22'(o[y][x] - d[y][x]); end
        end
        bo_n[d[y][x] >> 3] += 1;
        bo_e[d[y][x] >> 3] += 22'(o[y][x] - d[y][x]);
      end
      @(negedge clk);
      start = 1'b1;
      @(posedge clk); #1;
      t0 = cycle;
      start = 1'b0;
      do begin @(posedge clk); #1; end while (!done);
      seen[int'(sao_type)]++;
      checks += 3;
      if (cycle - t0 != 49) begin
        failures++;
        if (failures < 5) $display("decision took %0d cycles", cycle - t0);
      end
      if (int'(sao_type) != typ) failures++;
      if (int'(cost) != cst) failures++;
      if (typ == 2) begin checks++; if (int'(eo_class) != cls) failures++; end
      if (typ == 1) begin checks++; if (int'(band_pos) != pos) failures++; end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(offs[j]) != mo[j]) failures++;
      end
      if (failures > 0 && failures < 10)
        $display("t=%0d type %0d/%0d class %0d/%0d pos %0d/%0d cost %0d/%0d", t, sao_type, typ,
                 eo_class, cls, band_pos, pos, cost, cst);
    end
    $display("decisions: off=%0d bo=%0d eo=%0d", seen[0], seen[1], seen[2]);
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
