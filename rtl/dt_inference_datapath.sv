// dt_inference_datapath - the combinational decision-tree inference logic.
//
// All decision nodes are evaluated at once: six threshold comparators look at
// F1..F6 against the embedded constants T1..T6 while the subtractor, absolute
// value unit and comparator C6 measure how far F5 lies from the reference value.
// The priority decision module then picks the leaf that the tree would reach.
// The delay from features to cls is one comparator plus the priority logic
// (the subtractor chain runs beside it); there is no clock and no state.
// Which feature feeds which comparator, and the comparison senses, follow the
// classifier's architecture; the 33-bit width of the F5 path is this design's.
module dt_inference_datapath
  import rd_pkg::*;
(
  input  feature_vec_t features,
  output class_e       cls,
  output logic         within_tol
);

  cmp_flags_t                flags;
  logic signed [DIFF_W-1:0]  diff;
  logic        [DIFF_W-1:0]  mag;

  threshold_cmp #(.THRESHOLD(T1), .MODE(CMP_GT)) u_c1 (
    .feature(features.svcscan_shared_process_services), .hit(flags.c1));
  threshold_cmp #(.THRESHOLD(T2), .MODE(CMP_GT)) u_c2 (
    .feature(features.svcscan_process_services), .hit(flags.c2));
  threshold_cmp #(.THRESHOLD(T3), .MODE(CMP_GT)) u_c3 (
    .feature(features.handles_nevent), .hit(flags.c3));
  threshold_cmp #(.THRESHOLD(T4), .MODE(CMP_GT)) u_c4 (
    .feature(features.handles_nthread), .hit(flags.c4));
  threshold_cmp #(.THRESHOLD(T6), .MODE(CMP_LE)) u_c4a (
    .feature(features.psxview_not_in_ethread_pool_false_avg), .hit(flags.c4a));
  threshold_cmp #(.THRESHOLD(T5), .MODE(CMP_GT)) u_c5 (
    .feature(features.handles_nmutant), .hit(flags.c5));

  ref_subtractor #(.REFERENCE(REF_VALUE)) u_sub (
    .feature(features.handles_nmutant), .diff(diff));
  abs_unit #(.W(DIFF_W)) u_abs (.diff(diff), .mag(mag));
  tolerance_cmp #(.W(DIFF_W), .TOLERANCE(DIFF_W'(TOLERANCE))) u_c6 (
    .mag(mag), .in_tol(flags.c6));

  priority_decision u_dec (.flags(flags), .cls(cls), .within_tol(within_tol));

endmodule
