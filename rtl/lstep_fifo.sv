// lstep_fifo: fixed-latency FIFO ("L-step FIFO" of Figure 3).
//
// Delays a word by exactly DEPTH clock cycles. In the decoder one instance
// per state carries the CSA decision together with the state metric
// difference, so that both reach the path-equivalence detector and the
// delta selector when the survivor memory has resolved the most-likely state
// for that step. It is written as a shift register (every word moves every
// cycle, no read/write pointers), which matches the fully pipelined,
// one-step-per-cycle operation; DEPTH must be at least 1. The register reset
// to zero is this design's choice.
module lstep_fifo #(
  parameter int unsigned WIDTH = 7,
  parameter int unsigned DEPTH = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) sr[k] <= '0;
    end else begin
      sr[0] <= din;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  assign dout = sr[DEPTH-1];

endmodule
