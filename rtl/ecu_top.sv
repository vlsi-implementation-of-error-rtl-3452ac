// ecu_top -- error correction unit: convolutional encoder and Viterbi
// decoder of the K=3, [7,5] rate-1/2 code.
//
// The transmit side encodes a bit stream into 2-bit symbols (conv_encoder);
// the receive side decodes hard-decision symbols from the channel with the
// two-step precomputation T-algorithm Viterbi decoder (viterbi_decoder).
// The channel lies outside this module: tx_sym is brought out and rx_sym is
// an input, so a testbench or a modulator/demodulator sits in between.  The
// two halves share only the clock and reset.  This pairing of the two
// blocks follows the document's encoder/decoder system; the split of ports
// is this design's choice.
//
// Timing: tx_sym follows tx_bit by one clock.  Decoded bits leave a frame
// at a time, FRAME_LEN+2 clocks after the frame's last received symbol.
module ecu_top
  import vd_pkg::*;
#(
  parameter int unsigned PM_W      = 8,
  parameter int unsigned FRAME_LEN = 32
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // transmit side
  input  logic                  tx_valid,
  input  logic                  tx_bit,
  output logic                  tx_sym_valid,
  output sym_t                  tx_sym,
  // receive side
  input  logic                  rx_valid,
  input  sym_t                  rx_sym,
  input  logic [PM_W-1:0]       t_thresh,
  output logic                  rx_dec_valid,
  output logic                  rx_dec_bit,
  output logic [NUM_STATES-1:0] rx_state_valid,
  output logic                  rx_purge_pulse,
  output logic                  rx_tb_active
);

  conv_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tx_valid),
    .in_bit    (tx_bit),
    .sym_valid (tx_sym_valid),
    .sym_out   (tx_sym)
  );

  viterbi_decoder #(.PM_W(PM_W), .FRAME_LEN(FRAME_LEN)) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .sym_valid   (rx_valid),
    .sym         (rx_sym),
    .t_thresh    (t_thresh),
    .dec_valid   (rx_dec_valid),
    .dec_bit     (rx_dec_bit),
    .state_valid (rx_state_valid),
    .purge_pulse (rx_purge_pulse),
    .tb_active   (rx_tb_active)
  );

endmodule
