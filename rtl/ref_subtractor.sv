// ref_subtractor - subtractor unit of the F5 distance check: diff = F5 - REFERENCE.
//
// Both operands are sign-extended by one bit before the subtraction, so the
// signed result is exact for every 32-bit input (the guard bit is this design's
// choice). Combinational, no clock.
module ref_subtractor
  import rd_pkg::*;
#(
  parameter int unsigned         W         = FEAT_W,
  parameter logic signed [W-1:0] REFERENCE = rd_pkg::REF_VALUE
) (
  input  logic signed [W-1:0] feature,
  output logic signed [W:0]   diff
);

  always_comb diff = {feature[W-1], feature} - {REFERENCE[W-1], REFERENCE};

endmodule
