// output_unit: parallel and serial output of a decoded block.
//
// On `load` the decoded block is stored in the parallel output register
// `pout` (held until the next block) and in a shift register. On each
// `shift_en` (one per local clock period) the next bit, first decoded bit
// first, is offered to the serial link if the link is `ready`; `ser_valid`
// marks the cycle in which the bit on `ser_data` is taken. A shift_en with a
// bit pending and the link not ready is a stall (`stall` pulses) and the bit
// is offered again at the next shift_en. A load while bits of the previous
// block are still pending is an overflow: `overflow` pulses and the old bits
// are lost. Serial output of the decoded block follows the published design;
// the ready/stall/overflow rules are this design's choice.
module output_unit #(
  parameter int unsigned BLOCK_LEN = vit_pkg::BLOCK_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [BLOCK_LEN-1:0] din,
  input  logic                 shift_en,
  input  logic                 ready,
  output logic [BLOCK_LEN-1:0] pout,
  output logic                 pout_valid,  // pout holds a decoded block
  output logic                 ser_data,
  output logic                 ser_valid,
  output logic                 busy,        // serial bits pending
  output logic                 stall,
  output logic                 overflow
);

  localparam int unsigned CW = $clog2(BLOCK_LEN + 1);

  logic [BLOCK_LEN-1:0] shreg;
  logic [CW-1:0]        left;

  assign busy      = (left != '0);
  assign ser_data  = shreg[BLOCK_LEN-1];
  assign ser_valid = shift_en && busy && ready && !load;
  assign stall     = shift_en && busy && !ready && !load;
  assign overflow  = load && busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pout       <= '0;
      pout_valid <= 1'b0;
      shreg      <= '0;
      left       <= '0;
    end else if (load) begin
      pout       <= din;
      pout_valid <= 1'b1;
      shreg      <= din;
      left       <= CW'(BLOCK_LEN);
    end else if (ser_valid) begin
      shreg      <= {shreg[BLOCK_LEN-2:0], 1'b0};
      left       <= left - 1'b1;
    end
  end

endmodule
