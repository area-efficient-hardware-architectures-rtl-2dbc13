// tb_df_top: feeds 8x8 windows around a grid corner (random content of several
// kinds, random Bs per segment) row by row and compares the eight output rows
// with the model: vertical and horizontal edge filtered independently and the
// results averaged ((VF + HF + 1) >> 1). Checks the schedule of 8 load cycles,
// 2 filter cycles and 8 output cycles (the first output row is registered on the third clock edge
// after the edge that takes the last input row), and that both edge directions were filtered strongly and normally.
module tb_df_top;
  import hevc_pkg::*;
  import df_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready, out_valid, dec_valid;
  always #5 clk = ~clk;
  pix_t in_row [8], out_row [8];
  logic [1:0] bs_v [2], bs_h [2], dec_on, dec_strong;
  logic [6:0] beta;
  logic [4:0] tc;

  df_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_on [2] = '{0, 0}, n_st [2] = '{0, 0};
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (dec_valid) for (int d = 0; d < 2; d++) begin
    n_on[d] += int'(dec_on[d]);
    n_st[d] += int'(dec_strong[d]);
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    win_t W, R;
    int bv [2], bh [2], a, b, t_last, row, kind, base;
    for (int i = 0; i < 8; i++) in_row[i] = 0;
    bs_v = '{2'd0, 2'd0}; bs_h = '{2'd0, 2'd0}; beta = 0; tc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      kind = t % 4;
      base = $urandom_range(30, 200);
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        case (kind)
          0: W[y][x] = base + ((x >= 4) ? 4 : 0) + ((y >= 4) ? 3 : 0);
          1: W[y][x] = base + ((x >= 4) ? 12 : 0) + ((y >= 4) ? 9 : 0) + $urandom_range(0, 2);
          2: W[y][x] = $urandom_range(0, 255);
          default: W[y][x] = base + ((x >= 4) ? 5 : 0) + ((y >= 4) ? 16 : 0) + $urandom_range(0, 2) * (x % 2);
        endcase
      for (int s = 0; s < 2; s++) begin
        bv[s] = $urandom_range(0, 2); bh[s] = $urandom_range(0, 2);
        bs_v[s] = 2'(bv[s]); bs_h[s] = 2'(bh[s]);
      end
      beta = 7'($urandom_range(20, 64)); tc = 7'($urandom_range(1, 12));
      window(W, bv, bh, int'(beta), int'(tc), R, a, b);
      for (int y = 0; y < 8; y++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        for (int x = 0; x < 8; x++) in_row[x] = pix_t'(W[y][x]);
        in_valid = 1'b1;
        @(posedge clk);
        t_last = cycle;
      end
      @(negedge clk);
      in_valid = 1'b0;
      row = 0;
      while (row < 8) begin
        @(posedge clk); #1;
        if (out_valid) begin
          if (row == 0) begin
            checks++;
            if (cycle - t_last != 4) begin
              failures++;
              if (failures < 5) $display("first output row %0d cycles after last input", cycle - t_last);
            end
          end
          for (int x = 0; x < 8; x++) begin
            checks++;
            if (int'(out_row[x]) != R[row][x]) begin
              failures++;
              if (failures < 10) $display("t=%0d (%0d,%0d) got %0d exp %0d", t, x, row, out_row[x], R[row][x]);
            end
          end
          row++;
        end
      end
    end
    $display("decisions: vertical on=%0d strong=%0d  horizontal on=%0d strong=%0d",
             n_on[0], n_st[0], n_on[1], n_st[1]);
    if (n_st[0] == 0 || n_st[1] == 0 || n_on[0] == n_st[0] || n_on[1] == n_st[1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
