// tgu -- threshold generator unit of the two-step precomputation T-algorithm.
//
// The T-algorithm keeps only the states whose new path metric is within T
// of the best one, PM_opt.  Finding PM_opt from the ACS outputs would put a
// 4-way minimum in series with the ACS loop; instead PM_opt is precomputed
// from older path metrics and from the branch-metric group (BMG) minima
// delivered by the BMU, as the document proposes.
//
// Step 1 (in the cycle of symbol n-1, registered): the states are split into
// two clusters by the BMG their outgoing branches use (states 0,1 use group
// {00,11}; states 2,3 use group {01,10}).  The precomputed minimum is
//   X(n-1) = min over clusters c of ( min live PM_c(n-2) + bmg_min_c(n-1) ).
// Because both words of a group leave every state of its cluster, X(n-1)
// equals the smallest ACS output of step n-1.
// Step 2 (in the cycle of symbol n, combinational from the register):
//   threshold(n) = X(n-1) + bm_min(n) + T,
// a lower bound of PM_opt(n) + T that needs no ACS output of step n.
// For hard decisions bm_min is always 0 and the best metric grows by at
// most 1 per step, so with T >= 1 the best state is never purged.
//
// Interface: pm_q/valid_q are the decoder's path-metric registers, i.e.
// PM(n-1) while symbol n is on the BMU.  x_q advances when advance is high
// (one trellis step).  X is reset to 0, the metric of the all-zero start
// state.  The cluster formulation and the reset value are this design's
// reading of the document's block diagram.
module tgu
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = 8
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,                 // a trellis step is taken
  input  logic [PM_W-1:0] pm_q     [NUM_STATES],   // PM(n-1)
  input  logic            valid_q  [NUM_STATES],   // survivors at n-1
  input  bm_t             bmg_min  [2],            // BMG minima of symbol n
  input  bm_t             bm_min,                  // overall minimum, symbol n
  input  logic [PM_W-1:0] t_thresh,                // T
  output logic [PM_W-1:0] threshold                // PM_opt(n) + T
);

  function automatic logic lt(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] diff;
    diff = a - b;
    return diff[PM_W-1];
  endfunction

  logic [PM_W-1:0] x_q, x_d;

  // Step 1: cluster minima plus group minima of the current symbol.
  always_comb begin
    logic [PM_W-1:0] cmin [2];
    logic            clive[2];
    logic [PM_W-1:0] cand [2];
    for (int c = 0; c < 2; c++) begin
      cmin[c]  = '0;
      clive[c] = 1'b0;
    end
    for (int s = 0; s < NUM_STATES; s++) begin
      logic c;
      c = ^branch_word(state_t'(s), 1'b0);   // BMG used by state s
      if (valid_q[s] && (!clive[c] || lt(pm_q[s], cmin[c]))) begin
        cmin[c]  = pm_q[s];
        clive[c] = 1'b1;
      end
    end
    for (int c = 0; c < 2; c++) cand[c] = cmin[c] + PM_W'(bmg_min[c]);
    if (clive[0] && clive[1]) x_d = lt(cand[1], cand[0]) ? cand[1] : cand[0];
    else if (clive[1])        x_d = cand[1];
    else if (clive[0])        x_d = cand[0];
    else                      x_d = x_q;               // no live state
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       x_q <= '0;
    else if (advance) x_q <= x_d;
  end

  // Step 2: threshold for the current step from the registered value.
  assign threshold = x_q + PM_W'(bm_min) + t_thresh;

endmodule
