// conv_encoder: constraint-length-3, rate-1/2 convolutional encoder.
//
// Two flip-flops, FF1 and FF0, hold the last two input bits. For every input
// bit u the encoder emits the two-bit symbol {Out1, Out0} with
//   Out0 = u ^ FF1 ^ FF0,  Out1 = u ^ FF0,
// then shifts u into FF1 and FF1 into FF0. Equations and structure follow the
// published encoder; the frame handling is this design's own: the encoder
// works in blocks of BLOCK_LEN bits and starts each block from state S0, so
// the decoder can also start every block from S0.
//
// Timing: when `en` is high on a rising clock edge, `din` is consumed and the
// symbol for it appears on `sym` after that edge (registered output).
// `first` is high on the cycle a block's first symbol is presented on `sym`.
module conv_encoder
  import vit_pkg::sym_t, vit_pkg::state_t, vit_pkg::branch_sym;
#(
  parameter int unsigned BLOCK_LEN = vit_pkg::BLOCK_LEN
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,     // consume one input bit
  input  logic   din,    // input bit u
  output sym_t   sym,    // {Out1, Out0} of the last consumed bit
  output state_t state,  // {FF0, FF1} after the last consumed bit
  output logic   first   // sym belongs to the first bit of a block
);

  localparam int unsigned CW = $clog2(BLOCK_LEN);

  logic          ff1, ff0;
  logic [CW-1:0] bit_cnt;
  state_t        cur;

  // At the first bit of a block the encoder behaves as if it were in S0.
  always_comb cur = (bit_cnt == '0) ? state_t'(2'b00) : state_t'({ff0, ff1});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1     <= 1'b0;
      ff0     <= 1'b0;
      sym     <= '0;
      first   <= 1'b0;
      bit_cnt <= '0;
    end else if (en) begin
      sym     <= branch_sym(cur, din);
      first   <= (bit_cnt == '0);
      ff1     <= din;
      ff0     <= cur[0];
      bit_cnt <= (bit_cnt == CW'(BLOCK_LEN - 1)) ? '0 : bit_cnt + 1'b1;
    end
  end

  assign state = {ff0, ff1};

endmodule
