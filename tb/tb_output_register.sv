// tb_output_register - checks that the output register holds its input from
// one rising edge to the next, clears on reset (also between edges, since the
// reset is asynchronous) and delays data by exactly one clock.
module tb_output_register;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst_n;
  logic [1:0] d, q, prev;

  output_register #(.W(2)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic expect_q(logic [1:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, e, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = 2'b11;
    repeat (2) @(posedge clk);
    #1 expect_q(2'b00, "in reset");
    @(negedge clk) rst_n = 1'b1;
    d = 2'b10;
    #1 expect_q(2'b00, "before first edge");
    prev = 2'b10;
    repeat (500) begin
      @(posedge clk);
      #1 expect_q(prev, "capture");
      @(negedge clk);
      expect_q(prev, "hold");
      d    = 2'($urandom);
      prev = d;
    end
    // asynchronous reset between edges
    d = 2'b11;
    @(posedge clk);
    #1 expect_q(2'b11, "before async reset");
    #4 rst_n = 1'b0;
    #1 expect_q(2'b00, "async reset");
    @(posedge clk);
    #1 expect_q(2'b00, "held in reset");
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
