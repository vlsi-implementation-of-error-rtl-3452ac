// viterbi_decoder -- 4-state hard-decision Viterbi decoder for the K=3,
// [7,5] rate-1/2 code, using the T-algorithm with two-step precomputation.
//
// Data flow per received symbol (one trellis step per clock at most):
//   BMU   Hamming branch metrics of the symbol and the minimum of each
//         branch-metric group;
//   ACSU  add-compare-select of the four states from the path-metric
//         registers, skipping purged states;
//   TGU   precomputed threshold PM_opt + T, built from the previous path
//         metrics and the BMG minima, off the ACS loop;
//   PU    clears the valid bit of every state whose new metric is above the
//         threshold (T-algorithm purge);
//   SMU   stores the decision bits and traces back at the end of every
//         FRAME_LEN-symbol codeword, starting from the best surviving state.
// This is the structure of the document's decoder with two-step
// precomputation T-algorithm.  The decoder starts in state 0 (the encoder's
// reset state) with only that state alive.
//
// Interface: sym/sym_valid take one received symbol {c1, c0} per clock when
// sym_valid is high.  t_thresh is T; it must be at least 1 (so the best
// path can never be purged) and below 2**(PM_W-2) (so the modulo metrics of
// live states stay comparable).  Decoded bits come out on dec_bit/dec_valid,
// one frame at a time, in transmission order; for a frame whose last symbol
// is taken in cycle c they appear in cycles c+FRAME_LEN+2 .. c+2*FRAME_LEN+1.
// state_valid shows the survivors after the last step and purge_pulse is
// high for one clock after a step that purged at least one state.  Widths,
// frame length and these status outputs are this design's choices.
module viterbi_decoder
  import vd_pkg::*;
#(
  parameter int unsigned PM_W      = 8,
  parameter int unsigned FRAME_LEN = 32
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sym_valid,
  input  sym_t                  sym,
  input  logic [PM_W-1:0]       t_thresh,
  output logic                  dec_valid,
  output logic                  dec_bit,
  output logic [NUM_STATES-1:0] state_valid,
  output logic                  purge_pulse,
  output logic                  tb_active
);

  bm_t             bm [4];
  bm_t             bmg_min [2];
  bm_t             bm_min;
  logic [PM_W-1:0] pm_q      [NUM_STATES];
  logic            valid_q   [NUM_STATES];
  logic [PM_W-1:0] pm_new    [NUM_STATES];
  logic            cand_valid[NUM_STATES];
  logic            dec       [NUM_STATES];
  logic            valid_new [NUM_STATES];
  logic            purged    [NUM_STATES];
  logic [PM_W-1:0] threshold;
  state_t          best_state;

  bmu u_bmu (
    .y       (sym),
    .bm      (bm),
    .bmg_min (bmg_min),
    .bm_min  (bm_min)
  );

  acsu #(.PM_W(PM_W)) u_acsu (
    .pm_in      (pm_q),
    .valid_in   (valid_q),
    .bm         (bm),
    .pm_new     (pm_new),
    .cand_valid (cand_valid),
    .dec        (dec)
  );

  tgu #(.PM_W(PM_W)) u_tgu (
    .clk       (clk),
    .rst_n     (rst_n),
    .advance   (sym_valid),
    .pm_q      (pm_q),
    .valid_q   (valid_q),
    .bmg_min   (bmg_min),
    .bm_min    (bm_min),
    .t_thresh  (t_thresh),
    .threshold (threshold)
  );

  purge_unit #(.PM_W(PM_W)) u_pu (
    .pm_new     (pm_new),
    .cand_valid (cand_valid),
    .threshold  (threshold),
    .valid_new  (valid_new),
    .purged     (purged)
  );

  // Path-metric and survivor registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STATES; s++) begin
        pm_q[s]    <= '0;
        valid_q[s] <= (s == 0);
      end
      purge_pulse <= 1'b0;
    end else begin
      purge_pulse <= 1'b0;
      if (sym_valid) begin
        for (int s = 0; s < NUM_STATES; s++) begin
          pm_q[s]    <= pm_new[s];
          valid_q[s] <= valid_new[s];
          if (purged[s]) purge_pulse <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int s = 0; s < NUM_STATES; s++) state_valid[s] = valid_q[s];

  // Best surviving state after the last step; read by the SMU only at the
  // end of a frame, so this compare tree is outside the ACS loop.
  always_comb begin
    logic [PM_W-1:0] best_pm;
    logic            found;
    logic [PM_W-1:0] diff;
    best_state = '0;
    best_pm    = '0;
    found      = 1'b0;
    for (int s = 0; s < NUM_STATES; s++) begin
      diff = pm_q[s] - best_pm;
      if (valid_q[s] && (!found || diff[PM_W-1])) begin
        best_state = state_t'(s);
        best_pm    = pm_q[s];
        found      = 1'b1;
      end
    end
  end

  smu #(.FRAME_LEN(FRAME_LEN)) u_smu (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec_valid  (sym_valid),
    .dec        (dec),
    .best_state (best_state),
    .tb_active  (tb_active),
    .out_valid  (dec_valid),
    .out_bit    (dec_bit)
  );

  // T-algorithm rules: T >= 1 keeps the best path; at least one state lives.
  a_t_range: assert property (@(posedge clk) disable iff (!rst_n)
      sym_valid |-> (t_thresh != '0) && (t_thresh < PM_W'(1 << (PM_W - 2))));
  a_survivor: assert property (@(posedge clk) disable iff (!rst_n)
      state_valid != '0);

endmodule
