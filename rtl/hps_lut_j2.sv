// hps_lut_j2: coefficient table of the gradients j2,i = k2,i + c2,i of the
// second sub-function s2(x) = l2,i + j2,i*x_w - c2,i*x_w^2.
//
// j2,i is negative in all 8 intervals of the log2 design and its magnitude
// is below 2^-3, so the table stores only |j2,i| as 12 bits with weight
// 2^-15 (the three leading zero fraction bits and the sign are implied).
// The subtraction of the sign is done by the s2 datapath. For example
// j2,0 = -0.08929443359375 = -2926 * 2^-15. Purely combinational.
module hps_lut_j2
  import hps_pkg::*;
(
  input  idx_t idx,     // interval index i
  output j2_t  j2_mag   // |j2,i|, units of 2^-15
);

  always_comb begin
    unique case (idx)
      3'd0: j2_mag = 12'd2926;   // -0.089294433593750
      3'd1: j2_mag = 12'd2511;   // -0.076629638671875
      3'd2: j2_mag = 12'd2182;   // -0.066589355468750
      3'd3: j2_mag = 12'd1916;   // -0.058471679687500
      3'd4: j2_mag = 12'd1699;   // -0.051849365234375
      3'd5: j2_mag = 12'd1522;   // -0.046447753906250
      3'd6: j2_mag = 12'd1373;   // -0.041900634765625
      3'd7: j2_mag = 12'd1248;   // -0.038085937500000
      default: j2_mag = '0;
    endcase
  end

endmodule
