// threshold_cmp - one decision node of the tree: a signed fixed-point feature
// compared with a threshold constant built into the logic.
//
// With the threshold a parameter, synthesis reduces the comparison to a carry
// chain against a constant (a LUT-based comparator on an FPGA). MODE selects the
// strict "greater than" of comparators C1..C5 and C4 or the "less or equal" of
// C4a, as in the classifier's architecture. Purely combinational: hit follows
// feature within the same cycle. The default THRESHOLD of 0 only lets the module
// stand alone; every instance sets one of the model's thresholds.
module threshold_cmp
  import rd_pkg::*;
#(
  parameter int unsigned      W         = FEAT_W,
  parameter logic signed [W-1:0] THRESHOLD = '0,
  parameter cmp_mode_e        MODE      = CMP_GT
) (
  input  logic signed [W-1:0] feature,
  output logic                hit
);

  always_comb begin
    if (MODE == CMP_GT) hit = (feature >  THRESHOLD);
    else                hit = (feature <= THRESHOLD);
  end

endmodule
