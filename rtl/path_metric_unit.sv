// path_metric_unit: add-compare-select array and state metric memory.
//
// Holds one path metric and one "live" bit per trellis state (the state
// metric memory) and four acs_unit instances. On `step` it takes the branch
// metrics of the current received symbol, runs one trellis step for all
// states and stores the new metrics, live bits and decision bits. The
// decision bits of the last two steps are kept (dec_cur, dec_prev) because
// the survivor memory traces back two steps at a time. On `prune` the live
// bits are cut down to `keep` (paths the survivor memory no longer stores are
// dropped from the trellis). On `init` the memory is set to the start of a
// block: S0 live with metric 0, all other states dead. If `init` and `step`
// come together, the step is taken from that start state, so a new block
// can begin in the same cycle as its first symbol.
//
// The ACS/metric-memory loop follows the published block diagram; the live
// bits and the prune input are this design's way of realising the
// minimum-transition scheme, where paths above the threshold are not kept.
//
// Timing: one trellis step per cycle with `step` high. `step` has priority
// over `prune`.
module path_metric_unit
  import vit_pkg::bm_t, vit_pkg::state_t, vit_pkg::sym_t, vit_pkg::pred_state, vit_pkg::branch_sym;
#(
  parameter int unsigned W = vit_pkg::PM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,          // start a new block
  input  logic         step,          // one trellis step with bm
  input  bm_t          bm [4],        // branch metric per expected symbol
  input  logic         prune,         // apply keep mask
  input  logic [3:0]   keep,          // states whose paths survive pruning
  output logic [W-1:0] pm   [4],      // state metric memory
  output logic [3:0]   live,          // path of state is live
  output logic [3:0]   dec_cur,       // decisions of the last step
  output logic [3:0]   dec_prev       // decisions of the step before
);

  logic [W-1:0] src_pm [4];
  logic [3:0]   src_live;
  logic [W-1:0] pm_n   [4];
  logic [3:0]   live_n;
  logic [3:0]   dec_n;

  for (genvar n = 0; n < 4; n++) begin : g_acs
    localparam state_t P0 = pred_state(state_t'(n), 1'b0);
    localparam state_t P1 = pred_state(state_t'(n), 1'b1);
    // The input bit on any branch into state n is n's FF1 bit.
    localparam sym_t   C0 = branch_sym(P0, n[0]);
    localparam sym_t   C1 = branch_sym(P1, n[0]);
    acs_unit #(.W(W)) u_acs (
      .pm0 (src_pm[P0]),   .pm1 (src_pm[P1]),
      .v0  (src_live[P0]), .v1  (src_live[P1]),
      .bm0 (bm[C0]),   .bm1 (bm[C1]),
      .pm  (pm_n[n]),  .valid (live_n[n]), .dec (dec_n[n])
    );
  end

  // Source of the ACS step: the memory, or the start state of a block.
  always_comb begin
    for (int s = 0; s < 4; s++) src_pm[s] = init ? '0 : pm[s];
    src_live = init ? 4'b0001 : live;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) pm[s] <= '0;
      live     <= 4'b0001;
      dec_cur  <= '0;
      dec_prev <= '0;
    end else if (step) begin
      pm       <= pm_n;
      live     <= live_n;
      dec_cur  <= dec_n;
      dec_prev <= dec_cur;
    end else if (init) begin
      for (int s = 0; s < 4; s++) pm[s] <= '0;
      live     <= 4'b0001;
      dec_cur  <= '0;
      dec_prev <= '0;
    end else if (prune) begin
      live     <= live & keep;
    end
  end

endmodule
