// tb_rd_classifier_top - end-to-end test of the classifier at its default
// configuration, streaming the batch sizes of the evaluation workloads.
//
// A 50 MHz clock (20 ns period) drives the classifier. Batches of 1, 50, 100,
// 150, 500 and 1000 samples are presented back to back, one new sample per
// clock on the falling edge. After every rising edge the registered class and
// tolerance flag must equal the real-valued reference tree walk for the sample
// captured at that edge, which checks the one-cycle latency. Each batch must
// take exactly one clock per sample (N x 20 ns) from first to last result.
// An asynchronous reset is asserted between batches and must clear both
// outputs at once. Every leaf of the tree, both outcomes of the tolerance check
// and the reset must each occur at least once, or a failure is counted.
module tb_rd_classifier_top;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;
  import rd_ref_pkg::*;

  localparam realtime T_CLK = 20ns;  // 50 MHz

  logic clk = 1'b0;
  always #(T_CLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int leaf_hits[N_LEAVES];
  int tol_hits[2];
  int resets = 0;
  int n_ransom = 0, n_benign = 0;

  logic         rst_n;
  feature_vec_t features;
  logic         ransomware, within_tol;

  rd_classifier_top dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .features  (features),
    .ransomware(ransomware),
    .within_tol(within_tol)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_batch(int n);
    bit      exp_cls, exp_tol;
    int      leaf;
    realtime t_first, t_last;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      features = gen_sample(int'($urandom_range(N_LEAVES - 1)));
      exp_cls  = ref_classify(features, leaf);
      exp_tol  = ref_within_tol(features);
      @(posedge clk);
      if (i == 0) t_first = $realtime;
      t_last = $realtime;
      #1;
      leaf_hits[leaf]++;
      tol_hits[exp_tol]++;
      if (exp_cls) n_ransom++; else n_benign++;
      check(ransomware === exp_cls, $sformatf("class (leaf %0d, sample %0d of %0d)", leaf, i, n));
      check(within_tol === exp_tol, $sformatf("tolerance flag (F5=%0d)", features.handles_nmutant));
    end
    // one result per clock: n results span (n - 1) periods after the first
    check(t_last - t_first == (n - 1) * T_CLK,
          $sformatf("batch of %0d took %0t", n, t_last - t_first + T_CLK));
    $display("batch %0d: %0d results in %0t (%0t per sample)", n, n,
             t_last - t_first + T_CLK, T_CLK);
  endtask

  task automatic pulse_reset();
    @(negedge clk);
    features = gen_sample(4);  // a ransomware sample, so q is 1 before reset
    @(posedge clk);
    #1 check(ransomware === 1'b1, "output set before reset");
    #3 rst_n = 1'b0;
    #1;
    check(ransomware === 1'b0 && within_tol === 1'b0, "asynchronous reset clears outputs");
    @(posedge clk);
    #1 check(ransomware === 1'b0 && within_tol === 1'b0, "outputs held in reset");
    resets++;
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    int batches[] = '{1, 50, 100, 150, 500, 1000};
    $timeformat(-9, 0, " ns", 0);
    foreach (leaf_hits[i]) leaf_hits[i] = 0;
    tol_hits = '{0, 0};
    rst_n    = 1'b0;
    features = '0;
    repeat (2) @(posedge clk);
    #1 check(ransomware === 1'b0 && within_tol === 1'b0, "outputs in power-on reset");
    @(negedge clk) rst_n = 1'b1;
    foreach (batches[b]) begin
      run_batch(batches[b]);
      pulse_reset();
    end
    foreach (leaf_hits[i]) begin
      $display("leaf %0d reached %0d times", i, leaf_hits[i]);
      check(leaf_hits[i] > 0, $sformatf("leaf %0d reached", i));
    end
    $display("tolerance check false %0d, true %0d times; resets %0d; benign %0d, ransomware %0d",
             tol_hits[0], tol_hits[1], resets, n_benign, n_ransom);
    check(tol_hits[0] > 0 && tol_hits[1] > 0, "tolerance check both ways");
    check(resets > 0, "reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
