// abs_unit - absolute value unit: mag = |diff| for a signed two's-complement input.
//
// A negative input is negated (invert and add one); the unsigned result has the
// input's width, which is enough for the magnitude of the most negative value.
// The negate-and-compare form and the width are this design's choices; the
// unit's place between the subtractor and comparator C6 follows the classifier's
// architecture. Combinational, no clock.
module abs_unit #(
  parameter int unsigned W = rd_pkg::DIFF_W
) (
  input  logic signed [W-1:0] diff,
  output logic        [W-1:0] mag
);

  always_comb mag = diff[W-1] ? (~diff + 1'b1) : diff;

endmodule
