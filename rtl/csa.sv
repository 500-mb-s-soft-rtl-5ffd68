// csa: transformed compare-select-add unit for one trellis state (Figure 4).
//
// The classic add-compare-select recursion is retimed so that the registers
// hold partial sums P = sm(n) + bm(n) of the branches leaving each state. In
// one cycle the unit compares the two partial sums that enter its state
// (pa from predecessor {i[1:0],0}, pb from predecessor {i[1:0],1}) and, in
// parallel, adds the next branch metrics bm0/bm1 to both of them; the compare
// result then selects the finished sums. The critical path is therefore one
// adder-wide compare plus a 2:1 multiplexer, at the cost of four adders and
// two multiplexers instead of two adders and one.
//
// Outputs (registered, valid the cycle after the inputs):
//   p_out0/p_out1 - new partial sums sm_i(n+1) + bm_i,u(n+1) for u = 0/1
//   dec           - 1 when the path from pb survived (smaller metric wins,
//                   a tie keeps pa)
//   delta         - |pa - pb|, saturated to 6 bits: the state metric
//                   difference between the survivor and the discarded path
//
// Partial sums use modulo (wrap-around) arithmetic; the compare looks at the
// sign of the wrapped difference, which is exact while the spread of the
// metrics stays below half the range. Normalisation, tie rule, widths and the
// reset value (all sums 0, no known start state) are this design's choices.
module csa
  import sova_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pm_t  pa,
  input  pm_t  pb,
  input  bm_t  bm0,
  input  bm_t  bm1,
  output pm_t  p_out0,
  output pm_t  p_out1,
  output logic dec,
  output mag_t delta
);

  pm_t  diff, sum_a0, sum_a1, sum_b0, sum_b1, mag;
  logic sel_b;

  always_comb begin
    // compare and add run side by side
    diff   = pa - pb;
    sum_a0 = pa + pm_t'(bm0);
    sum_a1 = pa + pm_t'(bm1);
    sum_b0 = pb + pm_t'(bm0);
    sum_b1 = pb + pm_t'(bm1);
    // pa - pb > 0 (as a wrapped signed number) means pb is the smaller
    sel_b  = !diff[PM_W-1] && (diff != '0);
    mag    = diff[PM_W-1] ? (pm_t'(0) - diff) : diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_out0 <= '0;
      p_out1 <= '0;
      dec    <= 1'b0;
      delta  <= '0;
    end else begin
      p_out0 <= sel_b ? sum_b0 : sum_a0;
      p_out1 <= sel_b ? sum_b1 : sum_a1;
      dec    <= sel_b;
      delta  <= (mag > pm_t'(MAG_MAX)) ? MAG_MAX : mag[MAG_W-1:0];
    end
  end

endmodule
