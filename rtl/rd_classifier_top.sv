// rd_classifier_top - single-cycle decision-tree ransomware classifier.
//
// Six signed 32-bit fixed-point features of a process snapshot (value x 1000)
// enter on `features`; the combinational decision-tree datapath classifies them
// and the output register captures the result on the next rising edge of clk.
// A new sample may be presented every clock: latency is one cycle (20 ns at the
// 50 MHz of the reference board) and throughput one sample per cycle. There is
// no handshake. `ransomware` is the class (1 = ransomware); `within_tol` is the
// registered result of the F5 tolerance check, which this design brings out
// beside the class. rst_n (asynchronous, active low) clears both outputs.
module rd_classifier_top
  import rd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  feature_vec_t features,
  output logic         ransomware,
  output logic         within_tol
);

  // The feature bundle must be exactly N_FEATURES words of FEAT_W bits.
  if ($bits(feature_vec_t) != N_FEATURES * FEAT_W) begin : g_bad_feature_width
    $error("feature_vec_t does not hold %0d features of %0d bits", N_FEATURES, FEAT_W);
  end

  class_e cls_d;
  logic   tol_d;

  dt_inference_datapath u_datapath (
    .features  (features),
    .cls       (cls_d),
    .within_tol(tol_d)
  );

  output_register #(.W(2)) u_out_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({tol_d, cls_d == CLASS_RANSOMWARE}),
    .q    ({within_tol, ransomware})
  );

endmodule
