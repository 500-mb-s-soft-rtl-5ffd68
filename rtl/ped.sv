// ped: M-step path-equivalence detector (Figure 6).
//
// A second register exchange, fed with the CSA decisions after the L-step
// FIFO. Row i, stage k holds the decision k steps before the current step on
// the survivor into state i. For the current step m, the two paths competing
// for state i are the survivors of its predecessors {i[1:0],0} and
// {i[1:0],1}; an equality test of those two rows at one stage tells whether
// the competing paths agree on the decision at that depth. The test sits on
// the two inputs of the stage's exchange multiplexer, so every stage is one
// register, one multiplexer and one equality gate per state.
//
// Output eq[i][j-1] = EQ(i,j), the equivalence of the two competing
// decisions found by a j-step traceback from state i, j = 1..M. A one-step
// traceback reaches the two branches of the merge itself, whose decisions
// are complementary by definition, so EQ(i,1) is 0; EQ(i,j) for j >= 2 comes
// from the equality test at register stage j-1, which makes the exchange M-1 stages
// long. The register exchange and the meaning of EQ(i,j) follow the
// document; counting the merge branch itself as the one-step traceback is
// this design's reading of it. eq is combinational from the registers and belongs to the decisions
// dec applied in the same cycle.
module ped
  import sova_pkg::*;
#(
  parameter int unsigned M = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NS-1:0]         dec,
  output logic [NS-1:0][M-1:0]  eq
);

  logic [NS-1:0] q [1:M-1];   // q[k][s]: row s, stage k

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < M; k++) q[k] <= '0;
    end else begin
      q[1] <= dec;
      for (int k = 1; k < M - 1; k++)
        for (int s = 0; s < NS; s++)
          q[k+1][s] <= q[k][pred_state(state_t'(s), dec[s])];
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      eq[i][0] = 1'b0;
      for (int j = 1; j < M; j++)
        eq[i][j] = ~(q[j][pred_state(state_t'(i), 1'b0)] ^
                     q[j][pred_state(state_t'(i), 1'b1)]);
    end
  end

endmodule
