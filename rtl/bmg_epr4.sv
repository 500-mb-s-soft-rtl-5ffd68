// bmg_epr4: branch metric generator of the inner decoder, matched to the
// EPR4 partial-response channel (1 + D - D^2 - D^3).
//
// The trellis state is the last three channel bits; a bit b is sent as
// a = 2b-1. The noiseless sample of the branch that leaves state
// s = {x(n-1), x(n-2), x(n-3)} with input x(n) = u is
//   d = a(u) + a(s[2]) - a(s[1]) - a(s[0])  in {-4,-2,0,2,4},
// scaled by UNIT to the sample grid. The branch metric is the squared error
// (y - UNIT*d)^2 shifted right by SHIFT and saturated to 7 bits, plus the
// magnitude of the a-priori value from the outer decoder when u disagrees
// with its sign bit (a bit-wise a-priori penalty; zero magnitude means no
// a-priori knowledge). The document names this unit only; the metric form,
// scaling and widths are this design's choices.
//
// Interface: y and apriori are sampled every clock; bm is registered, so the
// metrics of a sample are available one cycle later.
module bmg_epr4
  import sova_pkg::*;
#(
  parameter int unsigned UNIT  = 4,
  parameter int unsigned SHIFT = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Y_W-1:0] y,
  input  soft_t                 apriori,
  output bm_vec_t               bm
);

  bm_vec_t bm_d;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 2; u++) begin
        automatic logic [2:0] st = 3'(s);
        automatic int d  = (u == 1 ? 1 : -1) + (st[2] ? 1 : -1)
                         - (st[1] ? 1 : -1) - (st[0] ? 1 : -1);
        automatic int e  = int'(y) - d * int'(UNIT);
        automatic int sq = (e * e) >>> SHIFT;
        automatic bm_t ch = (sq > int'(BM_MAX)) ? BM_MAX : bm_t'(sq);
        automatic bm_t ap = (apriori.hard != 1'(u)) ? bm_t'(apriori.mag) : '0;
        bm_d[s][u] = sat_add_bm(ch, ap);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bm <= '0;
    else        bm <= bm_d;
  end

endmodule
