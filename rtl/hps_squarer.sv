// hps_squarer: squaring unit for x_w, the position of x inside its interval.
//
// A squarer needs only about half the partial products of a general
// multiplier because the product matrix of a*a is symmetric: every cross
// term a_i*a_j (i < j) appears twice and is added once at weight 2^(i+j+1),
// and the diagonal terms a_i*a_i reduce to a_i at weight 2^(2i). This module
// forms exactly that folded partial-product set and sums it. The full
// 2*IN_W-bit square is then truncated to its OUT_W most significant bits,
// which for the log2 design (IN_W = 11, OUT_W = 9) gives x_w^2 as U0.9.
// The folded structure is this design's reading of the "special squaring
// unit"; only its function and its 11-in / 9-out widths are fixed.
// Purely combinational.
module hps_squarer #(
  parameter int unsigned IN_W  = 11,  // operand width, U0.IN_W
  parameter int unsigned OUT_W = 9    // kept MSBs of the square, U0.OUT_W
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] sq
);

  localparam int unsigned FULL_W = 2 * IN_W;

  logic [FULL_W-1:0] full;

  always_comb begin
    full = '0;
    for (int unsigned i = 0; i < IN_W; i++) begin
      // diagonal term a_i * a_i = a_i at weight 2^(2i)
      full = full + (FULL_W'(a[i]) << (2 * i));
      // folded cross terms a_i * a_j, i < j, at weight 2^(i+j+1)
      for (int unsigned j = i + 1; j < IN_W; j++) begin
        full = full + (FULL_W'(a[i] & a[j]) << (i + j + 1));
      end
    end
  end

  assign sq = full[FULL_W-1 -: OUT_W];

endmodule
