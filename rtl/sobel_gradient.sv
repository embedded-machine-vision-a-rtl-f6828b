// sobel_gradient: one Sobel gradient component and its magnitude.
//
// A 3x3 Sobel mask has three zero coefficients, so each gradient needs only
// six pixels, paired as positive minus negative:
//
//   G = (a_pos - a_neg) + 2*(c_pos - c_neg) + (b_pos - b_neg)
//
// For Gx the pairs are (w13,w31), (w23,w21), (w33,w11); for Gy they are
// (w31,w13), (w32,w12), (w33,w11). The same unit serves both axes; only the
// wiring of the pixels differs. The factor 2 is a wired one-bit left shift.
// Adder widths follow the datapath: a 10-bit difference, a 9-bit
// difference widened to 10 by the shift, an 11-bit partial sum, an 11-bit
// difference and a 12-bit signed result. A negative result is turned positive
// by two's complement; |G| is at most 1020 and fits the 11-bit magnitude.
//
// Purely combinational: the whole gradient settles in one clock period.
module sobel_gradient
  import vision_pkg::*;
(
  input  pixel_t                   a_pos,
  input  pixel_t                   a_neg,
  input  pixel_t                   c_pos,
  input  pixel_t                   c_neg,
  input  pixel_t                   b_pos,
  input  pixel_t                   b_neg,
  output logic signed [GRAD_W-1:0] g,
  output logic        [ABS_W-1:0]  g_abs
);

  logic signed [9:0]  diff_a;     // a_pos - a_neg
  logic signed [8:0]  diff_c;     // c_pos - c_neg
  logic signed [9:0]  diff_c2;    // 2 * diff_c, by wiring
  logic signed [10:0] partial;    // diff_a + diff_c2
  logic signed [10:0] diff_b;     // b_pos - b_neg
  logic signed [GRAD_W-1:0] neg_g;

  always_comb begin
    diff_a  = $signed({2'b00, a_pos}) - $signed({2'b00, a_neg});
    diff_c  = $signed({1'b0, c_pos}) - $signed({1'b0, c_neg});
    diff_c2 = {diff_c, 1'b0};
    partial = 11'(diff_a) + 11'(diff_c2);
    diff_b  = $signed({3'b000, b_pos}) - $signed({3'b000, b_neg});
    g       = 12'(partial) + 12'(diff_b);
    neg_g   = -g;
    g_abs   = g[GRAD_W-1] ? neg_g[ABS_W-1:0] : g[ABS_W-1:0];
  end

endmodule
