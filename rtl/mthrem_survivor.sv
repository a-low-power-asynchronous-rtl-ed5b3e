// mthrem_survivor: minimum-transition hybrid register exchange survivor memory.
//
// Plain register exchange keeps one register of decoded bits per state and
// copies all of them on every trellis step. The hybrid scheme copies only
// every m = 2 steps: it first traces back two steps through the decision bits
// to find each state's ancestor, then writes ancestor register followed by
// the two input bits that lead into the state (which are simply the state's
// own two bits, oldest first). The minimum-transition variant additionally
// keeps registers for only half the states, NSTATES/2 = 2: only paths whose
// metric does not exceed the correcting capability THRESH = 2 are worth
// storing. At every update the best live state is always kept (so decoding
// goes on even when more than THRESH errors occurred); the second register
// goes to the best state's sibling, the state that differs from it only in
// the newest input bit, if that path is live and its metric is <= THRESH.
// All other paths are dropped, and `keep` tells the path metric unit to kill
// them.
//
// Slot 0 always holds the best path; after the last update of a block it
// holds the decoded block, first decoded bit in the MSB.
//
// The two-step update, the two registers, the threshold and the choice of
// the sibling as second path follow the published method (on the published
// example this rule reproduces the stored register pairs at every update).
// Ties for the best path going to the lower state number, and always keeping
// the best path, are this design's choices.
//
// Timing: `update` (one cycle, after every second trellis step) reads the
// metric memory and the last two decision vectors and writes the slots on
// the clock edge. `keep` is combinational and valid while `update` is high.
// `init` empties the slots and puts the empty path of S0 in slot 0.
module mthrem_survivor
  import vit_pkg::state_t, vit_pkg::pred_state;
#(
  parameter int unsigned BLOCK_LEN = vit_pkg::BLOCK_LEN,
  parameter int unsigned W         = vit_pkg::PM_W,
  parameter int unsigned THR       = vit_pkg::THRESH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 update,
  input  logic [W-1:0]         pm [4],
  input  logic [3:0]           live,
  input  logic [3:0]           dec_cur,
  input  logic [3:0]           dec_prev,
  output logic [3:0]           keep,         // states kept by this update
  output logic [BLOCK_LEN-1:0] best_data,    // register of the best path
  output state_t               best_state,   // state of the best path
  output logic [W-1:0]         best_pm,      // metric of the best path
  output logic                 drop_thresh,  // a live path was dropped: metric > THR
  output logic                 drop_cap      // a path <= THR was dropped: no register for it
);

  localparam int unsigned NSLOT = 2;

  initial assert (BLOCK_LEN % 2 == 0) else $fatal(1, "BLOCK_LEN must be even");

  logic [BLOCK_LEN-1:0] slot_data  [NSLOT];
  state_t               slot_state [NSLOT];
  logic                 slot_v     [NSLOT];

  // Ranking of the live states.
  logic   have1, have2;
  state_t s1, s2;
  logic [W-1:0] m1, m2;

  always_comb begin
    have1 = 1'b0; s1 = '0; m1 = '0;
    for (int s = 0; s < 4; s++) begin
      if (live[s] && (!have1 || pm[s] < m1)) begin
        have1 = 1'b1; s1 = state_t'(s); m1 = pm[s];
      end
    end
    s2    = s1 ^ state_t'(1);
    m2    = pm[s2];
    have2 = have1 && live[s2] && (m2 <= W'(THR));
    keep = '0;
    if (have1) keep[s1] = 1'b1;
    if (have2) keep[s2] = 1'b1;
    drop_thresh = 1'b0;
    drop_cap    = 1'b0;
    for (int s = 0; s < 4; s++) begin
      if (live[s] && !keep[s]) begin
        if (pm[s] > W'(THR)) drop_thresh = 1'b1;
        else                 drop_cap    = 1'b1;
      end
    end
  end

  // Two-step traceback: ancestor of state n two steps back.
  function automatic state_t ancestor(state_t n, logic [3:0] dc, logic [3:0] dp);
    state_t p;
    p = pred_state(n, dc[n]);
    return pred_state(p, dp[p]);
  endfunction

  // New register contents for a kept state.
  function automatic logic [BLOCK_LEN-1:0] extend(state_t n, logic [BLOCK_LEN-1:0] anc);
    return {anc[BLOCK_LEN-3:0], n[1], n[0]};
  endfunction

  logic [BLOCK_LEN-1:0] anc_data [NSLOT];
  logic                 anc_hit  [NSLOT];
  state_t               new_st   [NSLOT];
  logic                 new_v    [NSLOT];

  always_comb begin
    new_st[0] = s1; new_v[0] = have1;
    new_st[1] = s2; new_v[1] = have2;
    for (int k = 0; k < NSLOT; k++) begin
      state_t a;
      a           = ancestor(new_st[k], dec_cur, dec_prev);
      anc_hit[k]  = 1'b0;
      anc_data[k] = '0;
      for (int i = 0; i < NSLOT; i++) begin
        if (slot_v[i] && slot_state[i] == a) begin
          anc_hit[k]  = 1'b1;
          anc_data[k] = slot_data[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) begin
        slot_data[i]  <= '0;
        slot_state[i] <= '0;
        slot_v[i]     <= (i == 0);
      end
    end else if (init) begin
      for (int i = 0; i < NSLOT; i++) begin
        slot_data[i]  <= '0;
        slot_state[i] <= '0;
        slot_v[i]     <= (i == 0);
      end
    end else if (update) begin
      for (int k = 0; k < NSLOT; k++) begin
        slot_v[k] <= new_v[k];
        // A slot whose path did not change is not rewritten (fewer transitions).
        if (new_v[k]) begin
          slot_state[k] <= new_st[k];
          slot_data[k]  <= extend(new_st[k], anc_data[k]);
        end
      end
    end
  end

  // Every kept path descends from a stored one: only stored paths stay live.
  a_anc_best: assert property (@(posedge clk) disable iff (!rst_n)
    (update && !init && new_v[0]) |-> anc_hit[0])
    else $error("mthrem: best path has no stored ancestor");
  a_anc_second: assert property (@(posedge clk) disable iff (!rst_n)
    (update && !init && new_v[1]) |-> anc_hit[1])
    else $error("mthrem: second path has no stored ancestor");

  assign best_data  = slot_data[0];
  assign best_state = slot_state[0];
  assign best_pm    = pm[slot_state[0]];

endmodule
