// tb_ref_subtractor - checks diff = F5 - 100 over random and extreme inputs,
// the expected value computed in 64-bit integers.
module tb_ref_subtractor;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  feat_t                    f;
  logic signed [DIFF_W-1:0] diff;

  ref_subtractor dut (.feature(f), .diff(diff));

  task automatic apply(feat_t v);
    longint expect_d;
    f = v;
    #1;
    expect_d = longint'(v) - 64'sd100;
    checks++;
    if (longint'(diff) != expect_d) begin
      failures++;
      $display("FAIL: feature=%0d diff=%0d expected %0d", v, diff, expect_d);
    end
  endtask

  initial begin
    apply(32'sd100); apply(32'sd0); apply(32'sd99); apply(32'sd101);
    apply(32'sh7fff_ffff); apply(32'sh8000_0000); apply(-32'sd1);
    repeat (3000) apply(feat_t'($urandom));
    repeat (1000) apply(feat_t'(int'($urandom_range(6000)) - 3000));
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
