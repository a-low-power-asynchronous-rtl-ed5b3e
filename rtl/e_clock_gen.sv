// e_clock_gen: local clock generator.
//
// Divides the global clock (5 MHz in the published design) by two into two
// complementary local phase signals of half the frequency (2.5 MHz),
// s_async1 and s_async2. The units of the decoder work on alternate phases:
// one phase carries the encoder and the survivor memory, the other the
// branch-metric and add-compare-select step. In this synchronous
// implementation the local clocks are realised as clock enables on the one
// global clock (en1/en2, each high for one global cycle out of two), which is
// this design's choice; the division ratio and the two phases follow the
// published design.
//
// Timing: after reset s_async1 = 0 and en1 is high in the first cycle, then
// the phases alternate every global cycle.
module e_clock_gen (
  input  logic clk,
  input  logic rst_n,
  output logic s_async1,  // local clock 1 (global / 2)
  output logic s_async2,  // local clock 2, complement of s_async1
  output logic en1,       // one global cycle per local period, phase 1
  output logic en2        // one global cycle per local period, phase 2
);

  logic ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;
  end

  assign s_async1 = ph;
  assign s_async2 = ~ph;
  assign en1      = ~ph;
  assign en2      = ph;

endmodule
