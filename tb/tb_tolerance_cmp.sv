// tb_tolerance_cmp - checks comparator C6 (mag < 2000) at the boundary, at the
// ends of its range and on random magnitudes.
module tb_tolerance_cmp;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DIFF_W-1:0] mag;
  logic              in_tol;

  tolerance_cmp dut (.mag(mag), .in_tol(in_tol));

  task automatic apply(longint v);
    mag = DIFF_W'(v);
    #1;
    checks++;
    if (in_tol !== (v < 2000)) begin
      failures++;
      $display("FAIL: mag=%0d in_tol=%b", v, in_tol);
    end
  endtask

  initial begin
    apply(0); apply(1999); apply(2000); apply(2001); apply(64'd8589934591);
    repeat (2000) apply(longint'($urandom_range(4000)));
    repeat (2000) apply({longint'($urandom_range(1)), 32'($urandom)});
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
