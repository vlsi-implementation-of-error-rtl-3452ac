// bmu -- hard-decision branch metric unit.
//
// The received symbol y is XORed with each of the four possible branch words
// 00, 01, 10 and 11 and the ones are counted, giving the Hamming distance
// bm[w] (0..2) for branch word w, as the document describes.  For the
// precomputation T-algorithm the unit also delivers the minimum of each
// branch-metric group (BMG).  With generators [7,5] the two branches that
// leave any state carry complementary words, so the trellis uses two groups:
// group 0 = {00, 11} (leaving states 0 and 1) and group 1 = {01, 10}
// (leaving states 2 and 3).  bm_min is the minimum over all four words.
// Purely combinational.
module bmu
  import vd_pkg::*;
(
  input  sym_t y,              // received hard-decision symbol {c1, c0}
  output bm_t  bm     [4],     // bm[w] = popcount(y ^ w)
  output bm_t  bmg_min[2],     // minimum of each branch-metric group
  output bm_t  bm_min          // minimum over all branch words
);

  always_comb begin
    for (int w = 0; w < 4; w++) begin
      logic [1:0] d;
      d     = y ^ 2'(w);
      bm[w] = bm_t'(d[1]) + bm_t'(d[0]);
    end
    bmg_min[0] = (bm[0] < bm[3]) ? bm[0] : bm[3];
    bmg_min[1] = (bm[1] < bm[2]) ? bm[1] : bm[2];
    bm_min     = (bmg_min[0] < bmg_min[1]) ? bmg_min[0] : bmg_min[1];
  end

endmodule
