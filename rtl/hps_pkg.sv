// hps_pkg: word lengths and fixed-point types of the log2 approximation
// built with Harmonized Parabolic Synthesis (HPS).
//
// The approximation is y = s1(x) * s2(x) with s1(x) = x (c1 = 0) and s2 a
// second-degree interpolation over 2^W_IDX equal intervals. All widths below
// are the datapath word lengths of the published log2 design (14-bit operand,
// 8 intervals, 17-bit result). Fixed-point formats:
//   x        U0.14   operand, 0 <= x < 1
//   x_w      U0.11   x with its W_IDX interval bits removed
//   x_w^2    U0.9    truncated square of x_w
//   l2       U1.17   interval start value; the integer bit is always 1 and
//                    is not stored (17 stored fraction bits)
//   |j2|     U0.15   gradient magnitude; its 3 leading fraction bits are zero
//                    so only 12 bits are stored. j2 < 0 in every interval.
//   |c2|     U0.16   parabola coefficient magnitude; 7 leading fraction bits
//                    are zero so 9 bits are stored. c2 < 0 in every interval.
//   s2       U1.17   integer bit always 1, 17 fraction bits carried
//   y        U0.17   result, y ~ log2(1 + x)
package hps_pkg;

  localparam int unsigned X_W    = 14;          // operand fraction bits
  localparam int unsigned W_IDX  = 3;           // w: I = 2^w intervals
  localparam int unsigned N_INT  = 1 << W_IDX;  // I = 8
  localparam int unsigned XW_W   = X_W - W_IDX; // 11
  localparam int unsigned SQ_W   = 9;           // x_w^2 word length
  localparam int unsigned L_W    = 17;          // l2 stored fraction bits
  localparam int unsigned J_W    = 12;          // |j2| stored bits
  localparam int unsigned C_W    = 9;           // |c2| stored bits
  localparam int unsigned S_W    = 17;          // s2 fraction / bus width
  localparam int unsigned Y_W    = 17;          // result fraction bits

  // Binary points, counted as fraction bits.
  localparam int unsigned J_FRAC = 15;
  localparam int unsigned C_FRAC = 16;

  // Right shifts that bring each product to the 2^-17 grid of s2:
  //   |j2| * x_w   : 2^-15 * 2^-11 = 2^-26  -> shift 9
  //   |c2| * x_w^2 : 2^-16 * 2^-9  = 2^-25  -> shift 8
  //   x * s2       : 2^-14 * 2^-17 = 2^-31  -> shift 14
  localparam int unsigned JP_SHIFT = J_FRAC + XW_W - S_W;
  localparam int unsigned CP_SHIFT = C_FRAC + SQ_W - S_W;
  localparam int unsigned Y_SHIFT  = X_W + S_W - Y_W;

  typedef logic [X_W-1:0]   x_t;
  typedef logic [W_IDX-1:0] idx_t;
  typedef logic [XW_W-1:0]  xw_t;
  typedef logic [SQ_W-1:0]  sq_t;
  typedef logic [L_W-1:0]   l2_t;
  typedef logic [J_W-1:0]   j2_t;
  typedef logic [C_W-1:0]   c2_t;
  typedef logic [S_W-1:0]   s2_t;
  typedef logic [Y_W-1:0]   y_t;

endpackage
