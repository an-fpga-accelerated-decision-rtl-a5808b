// tolerance_cmp - comparator C6: in_tol = (mag < TOLERANCE), mag being the
// unsigned distance |F5 - REF_VALUE| from the absolute value unit.
//
// The strict "less than" is how this design reads the comparator's label; the
// tolerance constant is the model's. Combinational, no clock.
module tolerance_cmp #(
  parameter int unsigned W         = rd_pkg::DIFF_W,
  parameter logic [W-1:0] TOLERANCE = W'(rd_pkg::TOLERANCE)
) (
  input  logic [W-1:0] mag,
  output logic         in_tol
);

  always_comb in_tol = (mag < TOLERANCE);

endmodule
