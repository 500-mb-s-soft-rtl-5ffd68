// csa_array: the eight compare-select-add units of the 8-state trellis
// (Figure 3, "8x Compare-Select-Add").
//
// Each unit i owns the two partial-sum registers of the branches leaving
// state i. Unit i reads the partial sums of its predecessors
// {i[1:0],0} and {i[1:0],1} on the branch with input bit i[2] (the input bit
// that leads into state i) and adds the branch metrics of the branches that
// leave state i in the next step.
//
// Interface: bm carries the branch metrics of step n+1 while the registers
// hold the partial sums of step n. One step per clock; dec and delta of all
// states appear one cycle after the branch metrics that complete them were
// applied. The trellis wiring follows the shift-register state definition of
// sova_pkg.
module csa_array
  import sova_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  bm_vec_t         bm,
  output logic [NS-1:0]   dec,
  output mag_t [NS-1:0]   delta
);

  pm_t [NS-1:0][1:0] p;   // p[s][u]: partial sum of branch s --u-->

  for (genvar i = 0; i < NS; i++) begin : g_csa
    localparam state_t I  = state_t'(i);
    localparam state_t P0 = {I[1:0], 1'b0};
    localparam state_t P1 = {I[1:0], 1'b1};
    csa u_csa (
      .clk    (clk),
      .rst_n  (rst_n),
      .pa     (p[P0][I[2]]),
      .pb     (p[P1][I[2]]),
      .bm0    (bm[i][0]),
      .bm1    (bm[i][1]),
      .p_out0 (p[i][0]),
      .p_out1 (p[i][1]),
      .dec    (dec[i]),
      .delta  (delta[i])
    );
  end

endmodule
