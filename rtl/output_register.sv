// output_register - the registered output stage of the classifier.
//
// Captures the datapath's result on every rising clock edge, so a sample put on
// the feature inputs in one cycle has its class on q after the next edge: one
// clock of latency and one sample per clock. The asynchronous active-low reset
// clears q to 0 (benign); the reset style is this design's choice. W = 2 holds
// {C6 flag, class}; W = 1 would keep the class bit only.
module output_register #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
