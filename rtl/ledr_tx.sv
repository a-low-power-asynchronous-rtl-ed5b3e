// ledr_tx: level-encoded dual-rail (LEDR) sender, two-phase handshake.
//
// One bit is carried on two wires, V and R. V always carries the bit value;
// R is chosen so that the parity V ^ R gives the phase of the token:
//   phase 0: data 0 = (0,0), data 1 = (1,1)
//   phase 1: data 0 = (0,1), data 1 = (1,0)
// Successive tokens alternate phase, so every new token changes exactly one
// wire and no spacer (return-to-zero) is needed. The receiver acknowledges a
// token by making its `ack` level equal to the token's phase; the sender may
// send again when ack equals the phase of the wires (`ready`).
// The code table follows the published LEDR encoding. The reset state
// (wires (0,0), i.e. phase 0 idle, so the first token is sent in phase 1)
// and the level-type acknowledge are this design's choices.
//
// Timing: a token is sent on the clock edge ending a cycle with
// valid && ready; ready drops until the acknowledge returns.
module ledr_tx (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,  // send `data` (only when ready)
  input  logic data,
  input  logic ack,    // phase of the last token the receiver accepted
  output logic ready,
  output logic v,      // value rail
  output logic r       // repeat rail
);

  logic ph;  // phase of the token on the wires

  assign ready = (ack == ph);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v  <= 1'b0;
      r  <= 1'b0;
      ph <= 1'b0;
    end else if (valid && ready) begin
      v  <= data;
      r  <= data ^ ~ph;
      ph <= ~ph;
    end
  end

  a_send_ready: assert property (@(posedge clk) disable iff (!rst_n) valid |-> ready)
    else $error("ledr_tx: send while not ready");

  // Each token changes exactly one rail.
  a_one_rail: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && ready) |=> $countones({v, r} ^ {$past(v), $past(r)}) == 1)
    else $error("ledr_tx: token changed both rails");

endmodule
