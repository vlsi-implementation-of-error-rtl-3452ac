// purge_unit -- purge unit (PU) of the T-algorithm.
//
// Compares each new path metric from the ACSU with the threshold
// PM_opt + T from the threshold generator.  A state survives when it was
// reached from a live state and its metric is not above the threshold;
// every other state is purged, i.e. its valid bit is cleared so that the
// next ACS step and the survivor trace-back ignore it.  purged[r] flags a
// state that was reachable but fell above the threshold.  Metrics are
// PM_W-bit modulo numbers compared by the sign of their difference.
// Purely combinational.  The comparison follows the document; marking
// purged states with a valid bit is this design's choice.
module purge_unit
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = 8
)(
  input  logic [PM_W-1:0] pm_new    [NUM_STATES],
  input  logic            cand_valid[NUM_STATES],
  input  logic [PM_W-1:0] threshold,
  output logic            valid_new [NUM_STATES],
  output logic            purged    [NUM_STATES]
);

  always_comb begin
    for (int r = 0; r < NUM_STATES; r++) begin
      logic [PM_W-1:0] diff;
      logic            above;
      diff         = threshold - pm_new[r];
      above        = diff[PM_W-1];               // pm_new > threshold
      valid_new[r] = cand_valid[r] & ~above;
      purged[r]    = cand_valid[r] &  above;
    end
  end

endmodule
