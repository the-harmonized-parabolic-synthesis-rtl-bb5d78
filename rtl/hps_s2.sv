// hps_s2: second sub-function of the HPS log2 approximation,
//   s2(x) = l2,i + j2,i * x_w - c2,i * x_w^2          (i = interval index)
//
// Three coefficient tables are read with the interval index i. The gradient
// branch multiplies |j2,i| (12 bits) by x_w (11 bits); the parabola branch
// multiplies |c2,i| (9 bits) by the truncated square x_w^2 (9 bits). Both
// products are truncated to 17 bits on the 2^-17 grid of l2. Since j2,i and
// c2,i are negative in every interval, the first adder subtracts |j2,i|*x_w
// from l2,i and the second adds |c2,i|*x_w^2 (that is, subtracts c2,i*x_w^2).
//
// s2 stays in [1, 2) for every operand, so only its 17 fraction bits are
// carried; the integer 1 is implied. The sum l2,i - |j2,i|*x_w can dip just
// below 1 near the end of an interval, but the final s2 cannot, so the two
// adders work modulo 2^17 and the 17-bit result is exact. The word lengths
// are those of the published log2 design.
//
// Timing: with PIPELINED = 0 (default, as in the evaluated log2 design) the
// block is purely combinational and clk is unused. With PIPELINED = 1 a
// register stage sits after the two multipliers (l2,i, both truncated
// products), so s2_frac follows idx/xw/xw_sq by one clock. These registers
// carry data only and are not reset.
module hps_s2
  import hps_pkg::*;
#(
  parameter bit PIPELINED = 1'b0   // 1: register after the multipliers
) (
  input  logic clk,
  input  idx_t idx,      // interval index i (3 MSBs of x)
  input  xw_t  xw,       // x_w, U0.11
  input  sq_t  xw_sq,    // x_w^2, U0.9
  output s2_t  s2_frac   // s2 - 1, U0.17
);

  l2_t l2;
  j2_t j2;
  c2_t c2;

  hps_lut_l2 u_lut_l2 (.idx(idx), .l2_frac(l2));
  hps_lut_j2 u_lut_j2 (.idx(idx), .j2_mag (j2));
  hps_lut_c2 u_lut_c2 (.idx(idx), .c2_mag (c2));

  logic [J_W+XW_W-1:0] j_prod;   // |j2| * x_w, 2^-26 grid
  logic [C_W+SQ_W-1:0] c_prod;   // |c2| * x_w^2, 2^-25 grid
  s2_t                 j_term;   // truncated to 2^-17 grid, 17 bits
  s2_t                 c_term;
  l2_t                 l2_q;     // after the optional stage
  s2_t                 j_term_q;
  s2_t                 c_term_q;
  s2_t                 lin;      // l2 + j2*x_w (mod 2^17)

  always_comb begin
    j_prod = (J_W+XW_W)'(j2) * (J_W+XW_W)'(xw);
    c_prod = (C_W+SQ_W)'(c2) * (C_W+SQ_W)'(xw_sq);
    j_term = S_W'(j_prod >> JP_SHIFT);
    c_term = S_W'(c_prod >> CP_SHIFT);
  end

  if (PIPELINED) begin : g_stage
    always_ff @(posedge clk) begin
      l2_q     <= l2;
      j_term_q <= j_term;
      c_term_q <= c_term;
    end
  end else begin : g_comb
    always_comb begin
      l2_q     = l2;
      j_term_q = j_term;
      c_term_q = c_term;
    end
  end

  always_comb begin
    lin     = l2_q - j_term_q;
    s2_frac = lin + c_term_q;
  end

endmodule
