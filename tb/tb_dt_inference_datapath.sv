// tb_dt_inference_datapath - checks the combinational decision-tree datapath
// against the real-valued tree walk of rd_ref_pkg.
//
// Samples are generated to reach each of the tree's seven leaves in turn, with
// values often on or next to a threshold, and F5 often near the reference
// value; the class and the tolerance flag are compared for every sample, and a
// leaf or tolerance outcome that never occurred counts as a failure.
module tb_dt_inference_datapath;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;
  import rd_ref_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  int leaf_hits[N_LEAVES];
  int tol_hits[2];
  feature_vec_t features;
  class_e       cls;
  logic         within_tol;

  dt_inference_datapath dut (.features(features), .cls(cls), .within_tol(within_tol));

  initial begin
    int  leaf;
    bit  exp_cls, exp_tol;
    foreach (leaf_hits[i]) leaf_hits[i] = 0;
    tol_hits = '{0, 0};
    for (int n = 0; n < 7000; n++) begin
      features = gen_sample(n % N_LEAVES);
      #1;
      exp_cls = ref_classify(features, leaf);
      exp_tol = ref_within_tol(features);
      leaf_hits[leaf]++;
      tol_hits[exp_tol]++;
      checks += 2;
      if ((cls == CLASS_RANSOMWARE) !== exp_cls) begin
        failures++;
        $display("FAIL class: leaf %0d features=%h cls=%0d", leaf, features, cls);
      end
      if (within_tol !== exp_tol) begin
        failures++;
        $display("FAIL tol: F5=%0d within_tol=%b", features.handles_nmutant, within_tol);
      end
    end
    foreach (leaf_hits[i]) begin
      checks++;
      if (leaf_hits[i] == 0) begin
        failures++;
        $display("FAIL: leaf %0d never reached", i);
      end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (tol_hits[i] == 0) begin
        failures++;
        $display("FAIL: tolerance flag never %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
