// sova_11_13: outer soft output Viterbi decoder (SOVA_11_13), matched to the
// 8-state (11,13) convolutional code.
//
// The (11,13) branch metric generator feeds the shared SOVA datapath
// (sova_core). Each clock takes one trellis step: the soft values of the two
// code bits of one information bit, 7-bit sign-magnitude each, with a flag
// per code bit that marks it as punctured (the code is punctured to rate
// 8/9; the pattern is applied by whoever drives erased). Each clock delivers
// one 7-bit sign-magnitude output: the decided information bit and its
// 6-bit reliability, LAT = L + M + 8 cycles after the step's inputs.
// out_valid repeats in_valid with the same delay.
module sova_11_13
  import sova_pkg::*;
#(
  parameter int unsigned L = 15,
  parameter int unsigned M = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  soft_t [1:0] llr,
  input  logic  [1:0] erased,
  output logic        out_valid,
  output soft_t       out
);

  bm_vec_t bm;
  logic    bm_valid;

  bmg_11_13 u_bmg (
    .clk    (clk),
    .rst_n  (rst_n),
    .llr    (llr),
    .erased (erased),
    .bm     (bm)
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
