// threshold_unit: binarises a value against a threshold T.
//
// g = 1 when f >= T, else 0: the output is a one-bit foreground/background
// (edge/non-edge) pixel. The rule follows the design's thresholding step.
// Combinational.
module threshold_unit #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] value,
  input  logic [W-1:0] threshold,
  output logic         bin
);

  assign bin = (value >= threshold);

endmodule
