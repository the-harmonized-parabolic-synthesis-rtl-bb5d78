// hps_log2_core: processing part of the HPS log2 unit, y ~ log2(1 + x) for
// 0 <= x < 1, built as the product of two sub-functions, y = s1(x) * s2(x).
//
// Datapath (14-bit x, 17-bit y):
//   * The 3 MSBs of x are the interval index i, the 11 LSBs are x_w, the
//     position of x inside its interval (x_w = frac(8x)).
//   * A folded squarer forms x_w^2, truncated to 9 bits.
//   * hps_s2 evaluates s2 = l2,i + j2,i*x_w - c2,i*x_w^2 from three 8-entry
//     coefficient tables.
//   * The first sub-function is s1(x) = x + c1*(x - x^2) with c1 = 0, so it
//     reduces to s1(x) = x and needs no hardware.
//   * The final multiplier forms x * s2. s2 = 1 + s2_frac with the integer 1
//     implied, so the product is x*s2_frac (14 x 17 bits) plus x shifted by
//     17, truncated to 17 fraction bits.
// Over all 2^14 operands the maximum absolute error against log2(1+x) is
// about 1.59e-5 (better than 15 bits) and the error is centred on zero.
//
// Timing: PIPELINED = 0 (default) gives a purely combinational unit, as in
// the evaluated log2 design; y and out_valid follow x and in_valid in the
// same cycle and clk/rst_n are unused. PIPELINED = 1 inserts the two
// register stages of the generic architecture: one after the s2 multipliers
// and one in front of the final multiplier, giving a latency of 2 clocks at
// one result per clock. The placement of the first stage and the valid
// signal with its asynchronous active-low reset are this design's choices.
module hps_log2_core
  import hps_pkg::*;
#(
  parameter bit PIPELINED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  x_t   x,          // U0.14
  output logic out_valid,
  output y_t   y           // U0.17
);

  localparam int unsigned PROD_W = X_W + S_W + 1;

  idx_t idx;
  xw_t  xw;
  sq_t  xw_sq;
  s2_t  s2_frac;
  x_t   s1;                // first sub-function, c1 = 0: s1(x) = x

  assign idx = x[X_W-1 -: W_IDX];
  assign xw  = x[XW_W-1:0];

  hps_squarer #(.IN_W(XW_W), .OUT_W(SQ_W)) u_sq (.a(xw), .sq(xw_sq));

  hps_s2 #(.PIPELINED(PIPELINED)) u_s2 (
    .clk    (clk),
    .idx    (idx),
    .xw     (xw),
    .xw_sq  (xw_sq),
    .s2_frac(s2_frac)
  );

  // s1 and s2 as seen by the final multiplier
  x_t   s1_m;
  s2_t  s2_m;
  logic valid_m;

  if (PIPELINED) begin : g_pipe
    x_t   s1_d;
    logic valid_d;
    // stage 1: s1 travels alongside the registered s2 products
    always_ff @(posedge clk) s1_d <= s1;
    // stage 2: in front of the final multiplier
    always_ff @(posedge clk) begin
      s1_m <= s1_d;
      s2_m <= s2_frac;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_d <= 1'b0;
        valid_m <= 1'b0;
      end else begin
        valid_d <= in_valid;
        valid_m <= valid_d;
      end
    end
  end else begin : g_comb
    always_comb begin
      s1_m    = s1;
      s2_m    = s2_frac;
      valid_m = in_valid;
    end
  end

  assign s1 = x;

  logic [PROD_W-1:0] prod;   // s1 * s2 on the 2^-31 grid

  always_comb begin
    prod = PROD_W'(s1_m) * PROD_W'(s2_m) + (PROD_W'(s1_m) << S_W);
  end

  assign y         = y_t'(prod >> Y_SHIFT);
  assign out_valid = valid_m;

endmodule
