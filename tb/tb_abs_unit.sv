// tb_abs_unit - checks the 33-bit absolute value unit against 64-bit integer
// arithmetic: zero, +-1, the extremes and random values.
module tb_abs_unit;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [DIFF_W-1:0] d;
  logic        [DIFF_W-1:0] mag;

  abs_unit dut (.diff(d), .mag(mag));

  task automatic apply(longint v);
    longint expect_m;
    d = DIFF_W'(v);
    #1;
    expect_m = (v < 0) ? -v : v;
    checks++;
    if (longint'({31'd0, mag}) != expect_m) begin
      failures++;
      $display("FAIL: diff=%0d mag=%0d expected %0d", v, mag, expect_m);
    end
  endtask

  initial begin
    apply(0); apply(1); apply(-1); apply(2000); apply(-2000);
    apply(64'sd4294967295); apply(-64'sd4294967296);
    repeat (3000) apply(longint'($urandom) - 64'sd2147483648 + longint'($urandom) - 64'sd2147483648);
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
