// ledr_rx: level-encoded dual-rail (LEDR) receiver, two-phase handshake.
//
// The phase of the incoming token is the parity V ^ R of the two wires. When
// it differs from the phase last acknowledged, a new token has arrived: its
// value is V. The receiver takes it (`valid` pulses for one cycle, `data`
// holds the bit until the next token) and answers by setting `ack` to the new
// phase. While `hold` is high no token is taken and the sender waits.
// Decoding follows the published LEDR code table; the sampling on a clock,
// the hold input and the reset values (ack = 0, matching the sender's idle
// phase 0) are this design's choices.
//
// Timing: a token present on the wires at a clock edge (and hold low) is
// taken on that edge: data, valid and ack change together.
module ledr_rx (
  input  logic clk,
  input  logic rst_n,
  input  logic v,
  input  logic r,
  input  logic hold,   // receiver busy: do not take a token
  output logic data,   // value of the last token
  output logic valid,  // a token was taken on the last edge
  output logic ack     // phase of the last token taken
);

  logic ph_in;

  assign ph_in = v ^ r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data  <= 1'b0;
      valid <= 1'b0;
      ack   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (ph_in != ack && !hold) begin
        data  <= v;
        valid <= 1'b1;
        ack   <= ph_in;
      end
    end
  end

endmodule
