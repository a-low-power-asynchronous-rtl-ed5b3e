// acs_unit: add-compare-select for one trellis state.
//
// Each state has two predecessors (j = 0, 1). The unit adds each
// predecessor's path metric to the branch metric of the branch into this
// state, compares the two sums and selects the smaller as the new path
// metric; `dec` records which predecessor won. Sums saturate at the largest
// PM_W-bit value. A predecessor whose path has been discarded (valid = 0) is
// never selected over a live one; the new metric is live if either
// predecessor is. On a tie predecessor 0 wins. Saturation, the valid bits and
// the tie rule are this design's choices. Purely combinational.
module acs_unit
  import vit_pkg::bm_t;
#(
  parameter int unsigned W = vit_pkg::PM_W
) (
  input  logic [W-1:0] pm0, pm1,  // predecessor path metrics
  input  logic         v0, v1,    // predecessor paths live
  input  bm_t          bm0, bm1,  // branch metrics into this state
  output logic [W-1:0] pm,        // new path metric
  output logic         valid,     // new path live
  output logic         dec        // winning predecessor
);

  localparam logic [W:0] MAXV = {1'b0, {W{1'b1}}};

  logic [W:0]   s0, s1;
  logic [W-1:0] a0, a1;

  always_comb begin
    s0 = {1'b0, pm0} + (W+1)'(bm0);
    s1 = {1'b0, pm1} + (W+1)'(bm1);
    a0 = (s0 > MAXV) ? W'(MAXV) : s0[W-1:0];
    a1 = (s1 > MAXV) ? W'(MAXV) : s1[W-1:0];
    if (v0 && v1) dec = (a1 < a0);
    else          dec = v1;
    pm    = dec ? a1 : a0;
    valid = v0 | v1;
  end

endmodule
