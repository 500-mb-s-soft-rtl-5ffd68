// sova_chip: the test chip with its two soft output Viterbi decoders side by
// side: SOVA_EPR4, the inner decoder of a serially concatenated turbo
// system on an EPR4 channel, and SOVA_11_13, the outer decoder of the
// (11,13) code. The interleavers that join them in a turbo decoder are not
// on the chip, so each decoder has its own inputs and outputs and they share
// only clock and reset. Each decodes one bit per clock (500 Mb/s at 500 MHz
// in the reference implementation) with latency L + M + 8 cycles.
module sova_chip
  import sova_pkg::*;
#(
  parameter int unsigned L = 15,
  parameter int unsigned M = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // inner decoder (EPR4 channel)
  input  logic                  epr4_in_valid,
  input  logic signed [Y_W-1:0] epr4_y,
  input  soft_t                 epr4_apriori,
  output logic                  epr4_out_valid,
  output soft_t                 epr4_out,
  // outer decoder ((11,13) code)
  input  logic                  c1113_in_valid,
  input  soft_t [1:0]           c1113_llr,
  input  logic  [1:0]           c1113_erased,
  output logic                  c1113_out_valid,
  output soft_t                 c1113_out
);

  sova_epr4 #(.L(L), .M(M)) u_sova_epr4 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (epr4_in_valid),
    .y         (epr4_y),
    .apriori   (epr4_apriori),
    .out_valid (epr4_out_valid),
    .out       (epr4_out)
  );

  sova_11_13 #(.L(L), .M(M)) u_sova_11_13 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c1113_in_valid),
    .llr       (c1113_llr),
    .erased    (c1113_erased),
    .out_valid (c1113_out_valid),
    .out       (c1113_out)
  );

endmodule
