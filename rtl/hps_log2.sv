// hps_log2: binary logarithm of an operand in a simple floating-point
// format, 2^e * v with a signed exponent e and a mantissa 1 <= v < 2.
//
// log2(2^e * v) = e + log2(v). The exponent is taken over unchanged as the
// integer part of the result; only the mantissa is approximated.
//   Preprocessing : v = 1 + x, so x is the mantissa with its leading 1
//                   dropped: the 14 stored mantissa bits are x (U0.14).
//   Processing    : hps_log2_core computes y ~ log2(1 + x) (U0.17) with
//                   Harmonized Parabolic Synthesis, error below 2^-15.9.
//   Postprocessing: none; y is already the fraction of the result.
// The result is the signed fixed-point number out_int + out_frac * 2^-17,
// i.e. {out_int, out_frac} read as a two's complement value with 17
// fraction bits.
//
// The exponent width EXP_W and the valid signals are this design's choices.
// Timing: PIPELINED = 0 (default) is combinational, like the evaluated log2
// implementation; PIPELINED = 1 adds two register stages (latency 2, one
// result per clock) and the exponent is delayed to match.
module hps_log2
  import hps_pkg::*;
#(
  parameter int unsigned EXP_W     = 8,
  parameter bit          PIPELINED = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [EXP_W-1:0] in_exp,    // e
  input  x_t                      in_mant,   // fraction of v = 1.in_mant
  output logic                    out_valid,
  output logic signed [EXP_W-1:0] out_int,   // integer part of log2
  output y_t                      out_frac   // fraction of log2, U0.17
);

  // preprocessing: x = v - 1 is the stored fraction of the mantissa
  x_t x;
  assign x = in_mant;

  hps_log2_core #(.PIPELINED(PIPELINED)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(out_valid),
    .y        (out_frac)
  );

  // postprocessing: the exponent becomes the integer part of the result
  if (PIPELINED) begin : g_exp_pipe
    logic signed [EXP_W-1:0] exp_d;
    always_ff @(posedge clk) begin
      exp_d   <= in_exp;
      out_int <= exp_d;
    end
  end else begin : g_exp_comb
    assign out_int = in_exp;
  end

endmodule
