// hps_lut_c2: coefficient table of the parabolic coefficients c2,i of the
// second sub-function s2(x) = l2,i + j2,i*x_w - c2,i*x_w^2.
//
// c2,i is negative in all 8 intervals of the log2 design and its magnitude
// is below 2^-7, so the table stores only |c2,i| as 9 bits with weight
// 2^-16 (the seven leading zero fraction bits and the sign are implied).
// Because c2,i < 0, the term -c2,i*x_w^2 is added by the s2 datapath. For
// example c2,0 = -0.00604248046875 = -396 * 2^-16. Purely combinational.
module hps_lut_c2
  import hps_pkg::*;
(
  input  idx_t idx,     // interval index i
  output c2_t  c2_mag   // |c2,i|, units of 2^-16
);

  always_comb begin
    unique case (idx)
      3'd0: c2_mag = 9'd396;   // -0.0060424804687500
      3'd1: c2_mag = 9'd324;   // -0.0049438476562500
      3'd2: c2_mag = 9'd265;   // -0.0040435791015625
      3'd3: c2_mag = 9'd213;   // -0.0032501220703125
      3'd4: c2_mag = 9'd173;   // -0.0026397705078125
      3'd5: c2_mag = 9'd146;   // -0.0022277832031250
      3'd6: c2_mag = 9'd124;   // -0.0018920898437500
      3'd7: c2_mag = 9'd108;   // -0.0016479492187500
      default: c2_mag = '0;
    endcase
  end

endmodule
