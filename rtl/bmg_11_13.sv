// bmg_11_13: branch metric generator of the outer decoder, matched to the
// 8-state (11,13) convolutional code.
//
// Code: octal generators 11 and 13 read with the current input in the MSB,
// i.e. c0 = u ^ u(n-3) and c1 = u ^ u(n-2) ^ u(n-3), a rate-1/2 feed-forward
// code. With state s = {u(n-1), u(n-2), u(n-3)}: c0 = u ^ s[0],
// c1 = u ^ s[1] ^ s[0]. Each code bit arrives as a 7-bit sign-magnitude soft
// value (hard bit, 6-bit reliability), the format the inner decoder emits. A
// branch pays the reliability of every received bit whose hard decision it
// contradicts; bits flagged as erased (punctured away to reach the overall
// code rate of 8/9) cost nothing. The metric form and the puncture interface
// are this design's choices; the puncture pattern is supplied from outside.
//
// Interface: inputs sampled every clock, bm registered (one cycle latency).
module bmg_11_13
  import sova_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  soft_t [1:0]  llr,
  input  logic  [1:0]  erased,
  output bm_vec_t      bm
);

  bm_vec_t bm_d;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 2; u++) begin
        automatic logic [1:0] st = 2'(s);   // u(n-2), u(n-3)
        automatic logic [1:0] c;
        automatic bm_t m0, m1;
        c[0] = 1'(u) ^ st[0];
        c[1] = 1'(u) ^ st[1] ^ st[0];
        m0 = (!erased[0] && (c[0] != llr[0].hard)) ? bm_t'(llr[0].mag) : '0;
        m1 = (!erased[1] && (c[1] != llr[1].hard)) ? bm_t'(llr[1].mag) : '0;
        bm_d[s][u] = sat_add_bm(m0, m1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bm <= '0;
    else        bm <= bm_d;
  end

endmodule
