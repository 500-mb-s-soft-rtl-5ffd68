// rmu: pipelined reliability measure unit (Figures 3 and 7).
//
// M identical sections in a row. A reliability word enters the first section
// as "infinity" (the largest 6-bit value) and moves one section per clock.
// All sections see the same state metric difference delta of the current
// merge on the most-likely path. Section j multiplexes EQ(i,j) of the
// most-likely state i out of the path-equivalence detector and then:
//   EQ = 1: passes the previous reliability on unchanged;
//   EQ = 0: passes min(delta, previous reliability) on
// (one comparator "delta < r" and a 2:1 multiplexer per section; the
// multiplexer takes delta when delta < r and EQ = 0). Because a word meets merge m+j-1 in section j and
// EQ(i,j) looks j-1 steps behind that merge, every section works on the same
// decided bit, and the word leaving section M is its reliability.
//
// Timing: a word entering in cycle c leaves (registered) in cycle c+M.
module rmu
  import sova_pkg::*;
#(
  parameter int unsigned M = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mag_t                  delta,
  input  state_t                ml_state,
  input  logic [NS-1:0][M-1:0]  eq,
  output mag_t                  rel
);

  mag_t r [M];      // r[j]: register after section j+1
  mag_t r_in [M];   // reliability entering section j+1

  always_comb begin
    r_in[0] = MAG_MAX;
    for (int j = 1; j < M; j++) r_in[j] = r[j-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < M; j++) r[j] <= MAG_MAX;
    end else begin
      for (int j = 0; j < M; j++)
        r[j] <= (!eq[ml_state][j] && (delta < r_in[j])) ? delta : r_in[j];
    end
  end

  assign rel = r[M-1];

endmodule
