// tb_priority_decision - drives all 128 combinations of the seven comparator
// flags and checks the class against a walk of the tree written as nested
// conditions on the original "feature <= threshold" nodes, plus the
// pass-through of the tolerance flag.
module tb_priority_decision;
  timeunit 1ns; timeprecision 1ps;
  import rd_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  cmp_flags_t flags;
  class_e     cls;
  logic       within_tol;

  priority_decision dut (.flags(flags), .cls(cls), .within_tol(within_tol));

  // Node tests as the tree states them (True = go left).
  function automatic logic tree(cmp_flags_t fl);
    logic n1, n2, n3, n4, n5, n6;
    n1 = !fl.c1;   // F1 <= 116.5
    n2 = !fl.c2;   // F2 <= 25.0
    n3 = !fl.c3;   // F3 <= 3368.5
    n4 = !fl.c4;   // F4 <= 886.5
    n5 = !fl.c5;   // F5 <= 262.0
    n6 = fl.c4a;   // F6 <= 0.041
    if (!n1) return 1'b0;
    if (!n2) return 1'b0;
    if (n3) begin
      if (n4) return 1'b1;
      return n5 ? 1'b0 : 1'b1;
    end
    return n6 ? 1'b1 : 1'b0;
  endfunction

  initial begin
    for (int v = 0; v < 128; v++) begin
      flags = cmp_flags_t'(v[6:0]);
      #1;
      checks += 2;
      if ((cls == CLASS_RANSOMWARE) !== tree(flags)) begin
        failures++;
        $display("FAIL: flags=%b cls=%0d expected %b", flags, cls, tree(flags));
      end
      if (within_tol !== flags.c6) begin
        failures++;
        $display("FAIL: flags=%b within_tol=%b", flags, within_tol);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
