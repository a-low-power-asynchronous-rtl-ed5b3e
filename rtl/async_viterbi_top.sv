// async_viterbi_top: convolutional encoder, noisy channel and Viterbi decoder
// with an LEDR output link, as one system.
//
// A 5 MHz global clock is divided by e_clock_gen into two 2.5 MHz local
// phases. On local phase 1 the encoder takes one data bit (`inp`, when
// `in_valid`) and produces a two-bit code symbol. The channel flips the bits
// of the symbol selected by `ctrl` (ctrl = 01 flips Out0, 10 flips Out1,
// 11 both), which is how transmission errors are injected. On local phase 2
// the decoder takes the received symbol through one trellis step; survivor
// memory updates and the serial output run on phase 1. Each decoded block of
// BLOCK_LEN bits appears on `pout` and leaves bit by bit through an LEDR
// (two-phase, level-encoded dual-rail) link to the receiver, whose output is
// `sout`. `sink_hold` lets the receiving side refuse tokens, which stalls the
// link.
//
// Structure, clock ratio, block length and the error-injection input follow
// the published system; the valid/hold signals are this design's additions.
//
// Timing: the decoded block is on `pout` in the 13th local period counted
// from the one in which the block's first bit entered (12 periods of input
// plus one for the last survivor update); its first bit reaches `sout` three
// global cycles after pout changes, and one bit follows per local period.
module async_viterbi_top
  import vit_pkg::sym_t, vit_pkg::state_t;
#(
  parameter int unsigned BLOCK_LEN = vit_pkg::BLOCK_LEN,
  parameter int unsigned W         = vit_pkg::PM_W,
  parameter int unsigned THR       = vit_pkg::THRESH
) (
  input  logic                 clk,        // global clock
  input  logic                 rst_n,
  input  logic                 inp,        // data bit to encode
  input  logic                 in_valid,   // inp is taken on local phase 1
  input  logic [1:0]           ctrl,       // channel error mask {Out1, Out0}
  input  logic                 sink_hold,  // receiver not ready
  output logic                 s_async1,   // local clock 1
  output logic                 s_async2,   // local clock 2
  output sym_t                 enc,        // transmitted symbol
  output sym_t                 rx,         // received symbol
  output logic [W-1:0]         pm [4],     // path metrics m0..m3
  output logic [$clog2(BLOCK_LEN+1)-1:0] count,
  output logic [BLOCK_LEN-1:0] pout,       // decoded block, first bit in MSB
  output logic                 pout_valid,
  output logic                 block_done,
  output logic                 ledr_v,     // LEDR value rail
  output logic                 ledr_r,     // LEDR repeat rail
  output logic                 ledr_ack,   // LEDR acknowledge
  output logic                 sout,       // serial decoded data
  output logic                 sout_valid, // sout took a new bit
  output logic                 sm_update,
  output logic                 drop_thresh,
  output logic                 drop_cap,
  output logic                 stall,
  output logic                 overflow
);

  logic   en1, en2, rx_valid;
  logic   ser_data, ser_valid, ser_ready;
  logic [3:0] live;
  state_t enc_state;
  logic   enc_first;

  e_clock_gen u_clk (
    .clk, .rst_n, .s_async1, .s_async2, .en1, .en2
  );

  conv_encoder #(.BLOCK_LEN(BLOCK_LEN)) u_enc (
    .clk, .rst_n, .en (en1 && in_valid), .din (inp),
    .sym (enc), .state (enc_state), .first (enc_first)
  );

  // The encoder output register holds a new symbol for the following cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_valid <= 1'b0;
    else        rx_valid <= en1 && in_valid;
  end

  assign rx = enc ^ ctrl;

  viterbi_decoder #(.BLOCK_LEN(BLOCK_LEN), .W(W), .THR(THR)) u_dec (
    .clk, .rst_n,
    .en_acs (en2), .en_sm (en1),
    .rx, .rx_valid,
    .ser_ready, .ser_data, .ser_valid,
    .pout, .pout_valid, .block_done,
    .pm, .live, .step_cnt (count),
    .sm_update, .drop_thresh, .drop_cap, .stall, .overflow
  );

  // Encoder and decoder frame their blocks in step: the first symbol of an
  // encoder block reaches the decoder when it starts a block, and at least
  // one path is always live.
  a_frame: assert property (@(posedge clk) disable iff (!rst_n)
    (en2 && rx_valid && enc_first) |-> (count == '0 || block_done))
    else $error("async_viterbi_top: encoder and decoder blocks out of step");
  a_live: assert property (@(posedge clk) disable iff (!rst_n) live != '0)
    else $error("async_viterbi_top: no live path");
  a_enc_state: assert property (@(posedge clk) disable iff (!rst_n)
    (en1 && in_valid) |=> enc_state[0] == $past(inp))
    else $error("async_viterbi_top: encoder did not shift the input in");

  ledr_tx u_ltx (
    .clk, .rst_n, .valid (ser_valid), .data (ser_data), .ack (ledr_ack),
    .ready (ser_ready), .v (ledr_v), .r (ledr_r)
  );

  ledr_rx u_lrx (
    .clk, .rst_n, .v (ledr_v), .r (ledr_r), .hold (sink_hold),
    .data (sout), .valid (sout_valid), .ack (ledr_ack)
  );

endmodule
