// sova_pkg: shared types, widths and trellis helpers of the 8-state soft
// output Viterbi decoders (SOVA).
//
// Both decoders use the same trellis shape. The state is the last three input
// bits, newest in the MSB: s(n) = {u(n-1), u(n-2), u(n-3)}. Input u moves state
// s to {u, s[2:1]}, so state i is entered from the two predecessors
// {i[1:0],0} and {i[1:0],1} (this matches Figure 4 of the architecture, where
// state 0 is fed from states 0 and 1). A CSA decision bit of 1 means the
// predecessor with LSB 1 survived; along a path the decision taken at step n
// equals the input bit u(n-4), and the state at step m is
// {d(m+3), d(m+2), d(m+1)}.
//
// Word sizes: soft values are 7-bit sign-magnitude {hard bit, 6-bit
// reliability}, as the decoders' outputs are described. Branch metric,
// partial-sum and channel-sample widths are this design's own choices.
package sova_pkg;

  localparam int unsigned NS       = 8;   // trellis states
  localparam int unsigned SW       = 3;   // state index width
  localparam int unsigned MAG_W    = 6;   // reliability magnitude width
  localparam int unsigned BM_W     = 7;   // branch metric width (saturating)
  localparam int unsigned PM_W     = 12;  // partial-sum width (modulo arithmetic)
  localparam int unsigned Y_W      = 6;   // EPR4 channel sample width (signed)

  localparam logic [MAG_W-1:0] MAG_MAX = '1;  // the "infinity" reliability
  localparam logic [BM_W-1:0]  BM_MAX  = '1;

  typedef logic [SW-1:0]    state_t;
  typedef logic [MAG_W-1:0] mag_t;
  typedef logic [BM_W-1:0]  bm_t;
  typedef logic [PM_W-1:0]  pm_t;

  // 7-bit sign-magnitude soft value: hard = decided bit, mag = reliability
  typedef struct packed {
    logic hard;
    mag_t mag;
  } soft_t;

  // Branch metrics of one trellis step: bm[s][u] belongs to the branch that
  // leaves state s with input bit u.
  typedef bm_t [NS-1:0][1:0] bm_vec_t;

  function automatic state_t pred_state(state_t i, logic d);
    return {i[1:0], d};
  endfunction

  function automatic bm_t sat_add_bm(bm_t a, bm_t b);
    logic [BM_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[BM_W] ? BM_MAX : s[BM_W-1:0];
  endfunction

endpackage
