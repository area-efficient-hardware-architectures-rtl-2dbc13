// hevc_pkg: types, constants and small functions shared by the intra prediction
// engine and the in-loop filter. Samples are 8-bit (the bit depth used throughout).
// The angle and inverse-angle tables are the HEVC intra mode tables (Table 3.3 of
// the design notes); the smoothing rule is the HEVC mode-distance rule that the
// per-size list of filtered modes expresses.
package hevc_pkg;

  localparam int BITDEPTH = 8;

  typedef logic [BITDEPTH-1:0] pix_t;

  // One lane of work for the addition-multiplication unit:
  // res = (s0*w0 + s1*w1 + s2*w2 + s3*w3 + rnd) >> shift
  typedef struct packed {
    logic [3:0][8:0] s;     // samples (9 bit so that sums of samples also fit)
    logic [3:0][6:0] w;     // weights 0..64
  } am_op_t;

  typedef enum logic [1:0] {SAO_OFF = 2'd0, SAO_BO = 2'd1, SAO_EO = 2'd2} sao_type_e;

  // Intra angle of modes 2..34 (0 for planar/DC).
  function automatic int intra_angle(input logic [5:0] mode);
    case (mode)
      6'd2: return 32;  6'd3: return 26;  6'd4: return 21;  6'd5: return 17;
      6'd6: return 13;  6'd7: return 9;   6'd8: return 5;   6'd9: return 2;
      6'd10: return 0;  6'd11: return -2; 6'd12: return -5; 6'd13: return -9;
      6'd14: return -13; 6'd15: return -17; 6'd16: return -21; 6'd17: return -26;
      6'd18: return -32; 6'd19: return -26; 6'd20: return -21; 6'd21: return -17;
      6'd22: return -13; 6'd23: return -9;  6'd24: return -5;  6'd25: return -2;
      6'd26: return 0;  6'd27: return 2;  6'd28: return 5;  6'd29: return 9;
      6'd30: return 13; 6'd31: return 17; 6'd32: return 21; 6'd33: return 26;
      6'd34: return 32;
      default: return 0;
    endcase
  endfunction

  // Inverse angle (256*32/angle) of the negative-angle modes 11..25.
  function automatic int intra_inv_angle(input logic [5:0] mode);
    case (mode)
      6'd11, 6'd25: return -4096; 6'd12, 6'd24: return -1638;
      6'd13, 6'd23: return -910;  6'd14, 6'd22: return -630;
      6'd15, 6'd21: return -482;  6'd16, 6'd20: return -390;
      6'd17, 6'd19: return -315;  6'd18:        return -256;
      default: return 0;
    endcase
  endfunction

  // Vertical family: modes 18..34 use the top row as main array.
  function automatic logic intra_is_ver(input logic [5:0] mode);
    return mode >= 6'd18;
  endfunction

  // Reference smoothing rule (luma): never for 4x4 or DC; planar for N >= 8;
  // angular modes when min(|m-10|,|m-26|) exceeds 7 / 1 / 0 for N = 8 / 16 / 32.
  function automatic logic intra_smooth(input logic [5:0] mode, input logic [2:0] log2n);
    int d, thr;
    if (log2n <= 3'd2 || mode == 6'd1) return 1'b0;
    if (mode == 6'd0) return 1'b1;
    d = (int'(mode) > 10) ? int'(mode) - 10 : 10 - int'(mode);
    if (((int'(mode) > 26) ? int'(mode) - 26 : 26 - int'(mode)) < d)
      d = (int'(mode) > 26) ? int'(mode) - 26 : 26 - int'(mode);
    thr = (log2n == 3'd3) ? 7 : (log2n == 3'd4) ? 1 : 0;
    return d > thr;
  endfunction

  function automatic pix_t clip_pix(input int v);
    if (v < 0) return '0;
    if (v > 255) return 8'd255;
    return pix_t'(v);
  endfunction

endpackage
