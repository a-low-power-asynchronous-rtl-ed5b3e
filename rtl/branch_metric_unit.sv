// branch_metric_unit: Hamming-distance branch metrics.
//
// For a received two-bit symbol the unit gives, for each of the four possible
// expected symbols c = 00, 01, 10, 11, the number of differing bits (0..2),
// i.e. bm[c] = popcount(rx ^ c). Hard decisions and the Hamming metric follow
// the published description ("compares the received bits and the expected
// bits and generates the differ bits"). Purely combinational.
module branch_metric_unit
  import vit_pkg::sym_t, vit_pkg::bm_t;
(
  input  sym_t rx,       // received {Out1, Out0}
  output bm_t  bm [4]    // bm[c]: distance from rx to symbol c
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      sym_t d;
      d     = rx ^ sym_t'(c);
      bm[c] = bm_t'(d[0]) + bm_t'(d[1]);
    end
  end

endmodule
