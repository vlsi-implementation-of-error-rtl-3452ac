// acsu -- add-compare-select unit for the 4-state [7,5] trellis.
//
// For every next state r = {u, s1} the two predecessors are {s1, 0} and
// {s1, 1}.  Each candidate is the predecessor's path metric plus the branch
// metric of the branch word it would have emitted; the smaller candidate
// becomes the new path metric and the decision bit dec[r] records which
// predecessor won (1 = {s1, 1}).  This is the butterfly recursion
//   PM_r(n) = min(PM_p0(n-1) + bm(p0->r), PM_p1(n-1) + bm(p1->r))
// of the document.
//
// T-algorithm support (this design's own formulation of the purge): a
// predecessor whose valid bit is clear has been purged and takes no part in
// the compare.  If only one predecessor is alive it wins; if none is alive
// cand_valid[r] is cleared and pm_new[r] is don't-care.  Ties go to
// predecessor {s1, 0}.  Path metrics are PM_W-bit modulo numbers compared by
// the sign of their difference.  Purely combinational; the path-metric
// registers live in the decoder.
module acsu
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = 8
)(
  input  logic [PM_W-1:0] pm_in     [NUM_STATES],  // PM(n-1)
  input  logic            valid_in  [NUM_STATES],  // state survived at n-1
  input  bm_t             bm        [4],           // branch metric per word
  output logic [PM_W-1:0] pm_new    [NUM_STATES],  // PM(n) before purging
  output logic            cand_valid[NUM_STATES],  // reached from a live state
  output logic            dec       [NUM_STATES]   // survivor decision bit
);

  function automatic logic lt(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] diff;
    diff = a - b;
    return diff[PM_W-1];
  endfunction

  always_comb begin
    for (int r = 0; r < NUM_STATES; r++) begin
      state_t          rs, p0, p1;
      logic            u;
      logic [PM_W-1:0] c0, c1;
      logic            take1;
      rs = state_t'(r);
      u  = rs[MEM-1];                    // input bit that leads into r
      p0 = prev_state(rs, 1'b0);
      p1 = prev_state(rs, 1'b1);
      c0 = pm_in[p0] + PM_W'(bm[branch_word(p0, u)]);
      c1 = pm_in[p1] + PM_W'(bm[branch_word(p1, u)]);
      if (valid_in[p0] && valid_in[p1]) take1 = lt(c1, c0);
      else                              take1 = valid_in[p1];
      dec[r]        = take1;
      pm_new[r]     = take1 ? c1 : c0;
      cand_valid[r] = valid_in[p0] | valid_in[p1];
    end
  end

endmodule
