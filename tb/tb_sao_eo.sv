// tb_sao_eo: random lanes of (sample, neighbour a, neighbour b) with a bias toward
// equal values so that every category occurs, random missing neighbours and random
// offsets, including ones that drive the result past 0 or 255. Category and
// filtered sample of every lane are compared with the model. Combinational.
module tb_sao_eo;
  import hevc_pkg::*;
  import sao_model_pkg::*;

  pix_t cur [8], nb_a [8], nb_b [8], pix [8];
  logic [7:0] nb_ok;
  logic signed [3:0] offs [4];
  logic [2:0] cat [8];

  sao_eo dut (.*);

  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int pick(int c);
    int r = $urandom_range(0, 2);
    if (r == 0) return c;
    return (c < 3 || c > 252) ? $urandom_range(0, 255) : c + $urandom_range(0, 6) - 3;
  endfunction

  initial begin
    int c, a, b, k, e;
    for (int t = 0; t < 4000; t++) begin
      for (int j = 0; j < 4; j++) offs[j] = 4'($urandom_range(0, 15));
      for (int l = 0; l < 8; l++) begin
        c = (t % 5 == 0) ? ((l % 2) ? 254 : 1) : $urandom_range(0, 255);
        cur[l] = pix_t'(c); nb_a[l] = pix_t'(pick(c)); nb_b[l] = pix_t'(pick(c));
      end
      nb_ok = 8'($urandom_range(0, 255)) | ((t % 2) ? 8'hff : 8'h00);
      #1;
      for (int l = 0; l < 8; l++) begin
        k = nb_ok[l] ? eo_cat(int'(cur[l]), int'(nb_a[l]), int'(nb_b[l])) : 0;
        seen[k]++;
        e = int'(cur[l]) + ((k > 0) ? int'(offs[k-1]) : 0);
        e = e < 0 ? 0 : e > 255 ? 255 : e;
        checks += 2;
        if (int'(cat[l]) != k) failures++;
        if (int'(pix[l]) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d lane %0d c=%0d a=%0d b=%0d got %0d exp %0d", t, l,
                                      cur[l], nb_a[l], nb_b[l], pix[l], e);
        end
      end
      #1;
    end
    $display("categories: %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    for (int k2 = 0; k2 < 5; k2++) if (seen[k2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
