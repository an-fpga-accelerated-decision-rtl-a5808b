// tb_threshold_cmp - checks the threshold comparator in both modes.
//
// Two instances are tested: a "greater than" comparator with threshold T1
// (116500) and a "less or equal" comparator with T6 (41). Each is driven with
// the threshold itself, its neighbours, the extremes of the 32-bit range and
// random values; expected results come from 64-bit integer arithmetic.
module tb_threshold_cmp;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  feat_t f_gt, f_le;
  logic  hit_gt, hit_le;

  threshold_cmp #(.THRESHOLD(T1), .MODE(CMP_GT)) dut_gt (.feature(f_gt), .hit(hit_gt));
  threshold_cmp #(.THRESHOLD(T6), .MODE(CMP_LE)) dut_le (.feature(f_le), .hit(hit_le));

  task automatic apply(longint a, longint b);
    f_gt = feat_t'(a);
    f_le = feat_t'(b);
    #1;
    checks += 2;
    if (hit_gt !== (a > 64'sd116500)) begin
      failures++;
      $display("FAIL gt: feature=%0d hit=%b", a, hit_gt);
    end
    if (hit_le !== (b <= 64'sd41)) begin
      failures++;
      $display("FAIL le: feature=%0d hit=%b", b, hit_le);
    end
  endtask

  initial begin
    longint edges_gt[] = '{116500, 116499, 116501, 0, -1, 64'sd2147483647, -64'sd2147483648};
    longint edges_le[] = '{41, 40, 42, 0, -1, 64'sd2147483647, -64'sd2147483648};
    foreach (edges_gt[i]) apply(edges_gt[i], edges_le[i]);
    repeat (2000) apply(longint'(feat_t'($urandom)), longint'(feat_t'($urandom)));
    repeat (2000) apply(116500 + longint'($urandom_range(200)) - 100,
                        41 + longint'($urandom_range(200)) - 100);
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
