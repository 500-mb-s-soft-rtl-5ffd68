// sova_core: the SOVA datapath behind the branch metric generator
// (Figure 3), shared by both decoders.
//
// Two tracebacks are cascaded. The first is a conventional Viterbi decoder:
// eight CSA units produce a decision and a state metric difference delta per
// state and step, and an L-step register-exchange survivor memory (SMU)
// resolves the most-likely (ML) state L steps back. Meanwhile the decisions
// and deltas of every state wait in per-state FIFOs until the SMU has
// resolved the ML state of their step. The ML state then picks, with 8:1
// multiplexers, the delta of that state and the EQ(i,j) outputs of the
// M-step path-equivalence detector (PED), which tell whether the path that
// lost at the merge agrees with the ML path j-1 steps earlier. The
// reliability measure unit (RMU) keeps, for every decided bit, the smallest
// delta over the next M merges whose losing path disagrees on that bit. The
// ML state also picks the delayed decision of its own state, which is the
// decided bit; it is delayed M cycles to meet its reliability.
//
// Interface: bm/in_valid once per clock, one trellis step per cycle with no
// stalls. out = {hard bit, 6-bit reliability}, out_valid is in_valid delayed
// by the latency CORE_LAT = L + M + 7 cycles. A decision made at step n is
// the input bit of step n-4, which adds 4 of those cycles; the rest are
// pipeline registers. FIFO depth L+2 matches the SMU's latency including its
// output register. L and M default to 15 as in the document.
module sova_core
  import sova_pkg::*;
#(
  parameter int unsigned L = 15,
  parameter int unsigned M = 15
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  bm_vec_t  bm,
  output logic     out_valid,
  output soft_t    out
);

  localparam int unsigned CORE_LAT = L + M + 7;

  logic [NS-1:0]         dec_c, dec_f;
  mag_t [NS-1:0]         delta_c, delta_f;
  state_t                ml_state;
  logic [NS-1:0][M-1:0]  eq;
  mag_t                  delta_sel, rel;
  logic                  hard_sel;
  logic [M-1:0]          hard_d;
  logic [CORE_LAT-1:0]   valid_d;

  csa_array u_csa (
    .clk   (clk),
    .rst_n (rst_n),
    .bm    (bm),
    .dec   (dec_c),
    .delta (delta_c)
  );

  smu #(.L(L)) u_smu (
    .clk      (clk),
    .rst_n    (rst_n),
    .dec      (dec_c),
    .ml_state (ml_state)
  );

  for (genvar s = 0; s < NS; s++) begin : g_fifo
    lstep_fifo #(.WIDTH(MAG_W + 1), .DEPTH(L + 2)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .din   ({dec_c[s], delta_c[s]}),
      .dout  ({dec_f[s], delta_f[s]})
    );
  end

  ped #(.M(M)) u_ped (
    .clk   (clk),
    .rst_n (rst_n),
    .dec   (dec_f),
    .eq    (eq)
  );

  // selection by the ML state
  assign delta_sel = delta_f[ml_state];
  assign hard_sel  = dec_f[ml_state];

  rmu #(.M(M)) u_rmu (
    .clk      (clk),
    .rst_n    (rst_n),
    .delta    (delta_sel),
    .ml_state (ml_state),
    .eq       (eq),
    .rel      (rel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hard_d  <= '0;
      valid_d <= '0;
    end else begin
      hard_d  <= {hard_d[M-2:0], hard_sel};
      valid_d <= {valid_d[CORE_LAT-2:0], in_valid};
    end
  end

  assign out       = '{hard: hard_d[M-1], mag: rel};
  assign out_valid = valid_d[CORE_LAT-1];

endmodule
