// tb_intra_am_unit: random operands (four samples, four weights per lane) with the
// rounding/shift pairs used by planar (N, log2N+1) and angular (16, 5) prediction,
// including saturating cases. Checks (sum + rnd) >> shift per lane, clipped to
// 8 bits, one cycle after in_valid, and that out_valid tracks in_valid.
module tb_intra_am_unit;
  import hevc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  always #5 clk = ~clk;
  am_op_t op [8];
  logic [10:0] rnd;
  logic [2:0] shift;
  pix_t res [8];

  intra_am_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int e [8];
    int acc;
    rnd = 0; shift = 0;
    for (int l = 0; l < 8; l++) op[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      case (t % 5)
        0: begin rnd = 11'd16; shift = 3'd5; end
        default: begin rnd = 11'(1 << (t % 5 + 1)); shift = 3'(t % 5 + 2); end
      endcase
      for (int l = 0; l < 8; l++) begin
        acc = 0;
        for (int j = 0; j < 4; j++) begin
          op[l].s[j] = 9'($urandom_range(0, 255));
          op[l].w[j] = 7'($urandom_range(0, (t % 7 == 0) ? 127 : 32));
          acc += int'(op[l].s[j]) * int'(op[l].w[j]);
        end
        acc = (acc + int'(rnd)) >> shift;
        e[l] = acc > 255 ? 255 : acc;
      end
      in_valid = (t % 9 != 3);
      @(negedge clk);
      checks++;
      if (out_valid != (t % 9 != 3)) failures++;
      if (out_valid) for (int l = 0; l < 8; l++) begin
        checks++;
        if (int'(res[l]) != e[l]) begin
          failures++;
          if (failures < 10) $display("t=%0d lane %0d got %0d exp %0d", t, l, res[l], e[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
