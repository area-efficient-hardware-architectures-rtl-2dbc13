// tb_sao_bo: random samples, every band position (including the windows that wrap
// past band 31) and random offsets. The band index and the filtered sample of every
// lane are compared with the model; in-window and out-of-window samples and
// clipping at both ends must all occur. Combinational.
module tb_sao_bo;
  import hevc_pkg::*;

  pix_t cur [8], pix [8];
  logic [4:0] band_pos, band [8];
  logic signed [3:0] offs [4];

  sao_bo dut (.*);

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_wrap = 0, n_clip = 0;
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int k, e, raw;
    for (int t = 0; t < 4096; t++) begin
      band_pos = 5'(t % 32);
      for (int j = 0; j < 4; j++) offs[j] = 4'($urandom_range(0, 15));
      for (int l = 0; l < 8; l++)
        cur[l] = (l < 4) ? pix_t'(((t % 32 + l) % 32) * 8 + $urandom_range(0, 7)) : pix_t'($urandom_range(0, 255));
      #1;
      for (int l = 0; l < 8; l++) begin
        k = ((int'(cur[l]) >> 3) - int'(band_pos) + 32) % 32;
        raw = int'(cur[l]) + ((k < 4) ? int'(offs[k]) : 0);
        e = raw < 0 ? 0 : raw > 255 ? 255 : raw;
        if (k < 4) begin n_in++; if (int'(band_pos) + k > 31) n_wrap++; end else n_out++;
        if (raw != e) n_clip++;
        checks += 2;
        if (int'(band[l]) != int'(cur[l]) >> 3) failures++;
        if (int'(pix[l]) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d lane %0d c=%0d pos=%0d got %0d exp %0d", t, l, cur[l], band_pos, pix[l], e);
        end
      end
      #1;
    end
    $display("samples: in_window=%0d wrapped=%0d outside=%0d clipped=%0d", n_in, n_wrap, n_out, n_clip);
    if (n_in == 0 || n_wrap == 0 || n_out == 0 || n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
