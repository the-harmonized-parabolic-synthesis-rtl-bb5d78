// hps_lut_l2: coefficient table of the interval start values l2,i of the
// second sub-function s2(x) = l2,i + j2,i*x_w - c2,i*x_w^2.
//
// One entry per interval i (8 intervals). Each l2,i lies in [1, 2), so the
// integer bit is not stored: the output is l2,i - 1 as a 17-bit fraction in
// units of 2^-17. The entries are the optimised start values of the log2
// design (help function log2(1+x)/x at the interval starts, adjusted for
// truncation); for example l2,0 = 1.44268798828125 = 1 + 58024 * 2^-17.
// Purely combinational: a read-only table decoded from the 3-bit index.
module hps_lut_l2
  import hps_pkg::*;
(
  input  idx_t idx,      // interval index i
  output l2_t  l2_frac   // l2,i - 1, U0.17
);

  always_comb begin
    unique case (idx)
      3'd0: l2_frac = 17'd58024;   // 1.44268798828125000
      3'd1: l2_frac = 17'd47107;   // 1.35939788818359375
      3'd2: l2_frac = 17'd37711;   // 1.28771209716796875
      3'd3: l2_frac = 17'd29510;   // 1.22514343261718750
      3'd4: l2_frac = 17'd22271;   // 1.16991424560546875
      3'd5: l2_frac = 17'd15820;   // 1.12069702148437500
      3'd6: l2_frac = 17'd10023;   // 1.07646942138671875
      3'd7: l2_frac = 17'd4777;    // 1.03644561767578125
      default: l2_frac = '0;
    endcase
  end

endmodule
