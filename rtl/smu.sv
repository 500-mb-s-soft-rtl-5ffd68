// smu: L-step survivor memory unit, a pipelined register exchange
// (Figure 5).
//
// Every state owns a row of L one-bit registers. Each cycle the first
// register of row i takes the new CSA decision of state i, and register k+1
// of row i takes register k of the predecessor that state i just chose
// ({i[1:0], dec[i]}), through one 2:1 multiplexer per bit. After the update,
// register k of row i holds the decision made k-1 steps earlier on the
// survivor path into state i, so each stage is one register and one
// multiplexer deep and needs no memory pointers.
//
// Output: the most-likely state L steps back. Row 0 is used as the
// reference (after L steps the survivors have merged); since a state is its
// last three decisions, the state at that step is formed from the last three
// registers of row 0. The result is registered once, as the pipeline
// register drawn on the SMU output in Figure 3. Timing: with dec(n) applied
// in cycle n, ml_state in cycle n+2 is the state at step n-L+1 of the
// survivor into state 0 at step n. Taking a fixed row instead of searching
// for the best state, and the output register, are this design's choices.
module smu
  import sova_pkg::*;
#(
  parameter int unsigned L = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] dec,
  output state_t        ml_state
);

  logic [NS-1:0] r [1:L];   // r[k][s]: row s, stage k

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= L; k++) r[k] <= '0;
      ml_state <= '0;
    end else begin
      r[1] <= dec;
      for (int k = 1; k < L; k++)
        for (int s = 0; s < NS; s++)
          r[k+1][s] <= r[k][pred_state(state_t'(s), dec[s])];
      ml_state <= {r[L-2][0], r[L-1][0], r[L][0]};
    end
  end

endmodule
