// sova_epr4: inner soft output Viterbi decoder (SOVA_EPR4), matched to the
// 8-state EPR4 magnetic-recording channel.
//
// The EPR4 branch metric generator feeds the shared SOVA datapath
// (sova_core). Each clock takes one channel sample y (6-bit two's
// complement, noiseless levels 0, +-8, +-16) and one a-priori value for the
// same channel bit, and each clock delivers one 7-bit sign-magnitude output:
// the decided channel bit and its 6-bit reliability. The output for the
// channel bit sent with sample n appears LAT = L + M + 8 cycles after that
// sample; out_valid repeats in_valid with the same delay. The decoder starts
// with all state metrics equal (no known start state).
module sova_epr4
  import sova_pkg::*;
#(
  parameter int unsigned L = 15,
  parameter int unsigned M = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [Y_W-1:0] y,
  input  soft_t                 apriori,
  output logic                  out_valid,
  output soft_t                 out
);

  bm_vec_t bm;
  logic    bm_valid;

  bmg_epr4 u_bmg (
    .clk     (clk),
    .rst_n   (rst_n),
    .y       (y),
    .apriori (apriori),
    .bm      (bm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bm_valid <= 1'b0;
    else        bm_valid <= in_valid;
  end

  sova_core #(.L(L), .M(M)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bm_valid),
    .bm        (bm),
    .out_valid (out_valid),
    .out       (out)
  );

endmodule
