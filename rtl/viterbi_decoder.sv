// viterbi_decoder: hard-decision Viterbi decoder for the K=3, rate-1/2 code
// with minimum-transition hybrid register exchange (MTHREM) survivor memory.
//
// Data path: branch_metric_unit -> path_metric_unit (four ACS units and the
// state metric memory) -> mthrem_survivor -> output_unit. The decoder works
// in blocks of BLOCK_LEN received symbols, each starting from state S0 (the
// encoder is restarted per block). Work is split over the two local clock
// phases:
//   en_acs: if a symbol is present (rx_valid) one trellis step is taken;
//   en_sm : after every second step the survivor memory traces back two
//           steps, copies the (at most two) surviving registers and drops
//           all other paths from the metric memory.
// After the update that follows step BLOCK_LEN the best register holds the
// decoded block; in the next cycle it is loaded into the output unit and the
// trellis restarts (a symbol of the next block may arrive in that same
// cycle). The decoded bits then leave serially, one per en_sm, over the
// ready/valid port that feeds the LEDR sender.
//
// The unit split follows the published block diagram; the phase assignment,
// block framing and serial port are this design's choices.
//
// Timing with en_acs and en_sm alternating every cycle: the last symbol of a
// block is stepped in its local period, the survivor update follows one
// global cycle later and `pout` is valid one cycle after that, i.e. in the
// local period following the last symbol.
module viterbi_decoder
  import vit_pkg::bm_t, vit_pkg::state_t, vit_pkg::sym_t;
#(
  parameter int unsigned BLOCK_LEN = vit_pkg::BLOCK_LEN,
  parameter int unsigned W         = vit_pkg::PM_W,
  parameter int unsigned THR       = vit_pkg::THRESH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_acs,       // local phase for BMU/ACS
  input  logic                 en_sm,        // local phase for survivor memory and output
  input  sym_t                 rx,           // received symbol {Out1, Out0}
  input  logic                 rx_valid,     // rx holds a new symbol
  input  logic                 ser_ready,    // serial link can take a bit
  output logic                 ser_data,
  output logic                 ser_valid,
  output logic [BLOCK_LEN-1:0] pout,         // decoded block, first bit in MSB
  output logic                 pout_valid,
  output logic                 block_done,   // pulses when pout is loaded
  output logic [W-1:0]         pm [4],       // state metric memory (m0..m3)
  output logic [3:0]           live,         // live paths
  output logic [$clog2(BLOCK_LEN+1)-1:0] step_cnt,
  output logic                 sm_update,    // survivor update this cycle
  output logic                 drop_thresh,  // update dropped a path above THR
  output logic                 drop_cap,     // update dropped a path for lack of registers
  output logic                 stall,        // serial bit could not be sent
  output logic                 overflow      // a block overwrote unsent bits
);

  localparam int unsigned CW = $clog2(BLOCK_LEN + 1);

  bm_t                  bm [4];
  logic [3:0]           dec_cur, dec_prev, keep;
  logic [BLOCK_LEN-1:0] best_data;
  state_t               best_state;
  logic [W-1:0]         best_pm;
  logic                 step, upd_pend, blk_end, ser_busy;

  assign step       = en_acs && rx_valid;
  assign sm_update  = en_sm && upd_pend;
  assign block_done = blk_end;

  branch_metric_unit u_bmu (.rx(rx), .bm(bm));

  path_metric_unit #(.W(W)) u_pmu (
    .clk, .rst_n,
    .init (blk_end), .step, .bm,
    .prune (sm_update), .keep,
    .pm, .live, .dec_cur, .dec_prev
  );

  mthrem_survivor #(.BLOCK_LEN(BLOCK_LEN), .W(W), .THR(THR)) u_sm (
    .clk, .rst_n,
    .init (blk_end), .update (sm_update),
    .pm, .live, .dec_cur, .dec_prev,
    .keep, .best_data, .best_state, .best_pm,
    .drop_thresh, .drop_cap
  );

  output_unit #(.BLOCK_LEN(BLOCK_LEN)) u_out (
    .clk, .rst_n,
    .load (blk_end), .din (best_data),
    .shift_en (en_sm), .ready (ser_ready),
    .pout, .pout_valid, .ser_data, .ser_valid,
    .busy (ser_busy), .stall, .overflow
  );

  // Step counter and sequencing of survivor updates and block ends.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt <= '0;
      upd_pend <= 1'b0;
      blk_end  <= 1'b0;
    end else begin
      blk_end <= sm_update && (step_cnt == CW'(BLOCK_LEN));
      if (step) begin
        logic [CW-1:0] n;
        n        = (blk_end ? CW'(0) : step_cnt) + 1'b1;
        step_cnt <= n;
        upd_pend <= !n[0];
      end else begin
        if (blk_end)   step_cnt <= '0;
        if (sm_update) upd_pend <= 1'b0;
      end
    end
  end

  // A new symbol must not arrive while an update is still owed.
  // The output unit keeps sending while busy: a busy unit with a ready link
  // must not stall.
  a_busy_sends: assert property (@(posedge clk) disable iff (!rst_n)
    (en_sm && ser_busy && ser_ready && !blk_end) |-> ser_valid)
    else $error("viterbi_decoder: pending bit not sent");

  a_no_early_symbol: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (!upd_pend || sm_update))
    else $error("viterbi_decoder: symbol arrived before the survivor update");

endmodule
