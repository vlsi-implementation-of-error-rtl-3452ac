// tb_ecu_top -- end-to-end testbench of the error correction unit at its
// default parameters (8-bit path metrics, 32-symbol frames).
// Random information bits enter the encoder; its symbols pass through a
// channel model here that flips isolated bits (at most one error in any 13
// consecutive symbols, none in the last 8 symbols of a frame) and feed the
// decoder.  Every decoded bit must equal the transmitted one.  Each frame's
// first decoded bit must appear FRAME_LEN+2 clocks after its last received
// symbol.  Phases change T (20, 3, 1) and add input gaps.  The testbench
// counts how often each mechanism of the design happened and fails if one
// never did: a corrected channel error, a purge by the T-algorithm, a
// trace-back run, a trace-back overlapping the reception of the next frame
// (both survivor-memory banks in use), and an idle input cycle.
module tb_ecu_top;
  import vd_pkg::*;

  localparam int unsigned FRAME_LEN = 32;   // ecu_top default
  localparam int          FR_PER_PH = 10;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       tx_valid = 1'b0, tx_bit = 1'b0;
  logic       tx_sym_valid;
  sym_t       tx_sym;
  logic       rx_valid;
  sym_t       rx_sym;
  logic [7:0] t_thresh = 8'd20;
  logic       rx_dec_valid, rx_dec_bit;
  logic [3:0] rx_state_valid;
  logic       rx_purge_pulse, rx_tb_active;

  int checks = 0, failures = 0, cycle = 0;
  int n_err = 0, n_purge = 0, n_tb = 0, n_overlap = 0, n_gap = 0;

  ecu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Channel: flips the bits chosen for each symbol as it leaves the encoder.
  sym_t err_q[$];
  sym_t err_mask = '0;
  assign rx_valid = tx_sym_valid;
  assign rx_sym   = tx_sym ^ err_mask;

  // Mechanism counters.
  logic tb_active_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    tb_active_d <= rx_tb_active;
    if (rx_tb_active && !tb_active_d) n_tb++;
    if (rx_purge_pulse)               n_purge++;
    if (rx_tb_active && rx_valid)     n_overlap++;
    if (!rx_valid && n_tb > 0 && rx_tb_active) n_gap++;
  end

  // Output checker.
  bit tx_bits[$];
  int last_rx_cycle[$];
  int nout = 0, nrx = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      nrx++;
      if (nrx % FRAME_LEN == 0) last_rx_cycle.push_back(cycle);
    end
    if (rx_dec_valid) begin
      bit e;
      if (nout % FRAME_LEN == 0) begin
        int c;
        c = last_rx_cycle.pop_front();
        checks++;
        if (cycle != c + FRAME_LEN + 2) begin
          failures++;
          $display("frame %0d: first bit at %0d, expected %0d", nout / FRAME_LEN, cycle,
                   c + FRAME_LEN + 2);
        end
      end
      e = tx_bits.pop_front();
      checks++;
      if (rx_dec_bit !== e) begin
        failures++;
        $display("bit %0d: decoded %0b, transmitted %0b", nout, rx_dec_bit, e);
      end
      nout++;
    end
  end

  task automatic send_frame(input int T, input bit gaps);
    int since_err;
    since_err = 100;
    for (int t = 0; t < FRAME_LEN; t++) begin
      sym_t e;
      @(negedge clk);
      if (tx_sym_valid) err_mask = err_q.pop_front(); else err_mask = '0;
      while (gaps && $urandom_range(0, 3) == 0) begin
        tx_valid = 1'b0;
        @(negedge clk);
        if (tx_sym_valid) err_mask = err_q.pop_front(); else err_mask = '0;
      end
      tx_valid = 1'b1;
      tx_bit   = 1'($urandom);
      t_thresh = 8'(T);
      tx_bits.push_back(tx_bit);
      e = '0;
      if (since_err > 12 && t > 2 && t < FRAME_LEN - 8 && $urandom_range(0, 4) == 0) begin
        e = sym_t'(1 << $urandom_range(0, 1));
        since_err = 0;
        n_err++;
      end
      since_err++;
      err_q.push_back(e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FR_PER_PH; f++) send_frame(20, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(3, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(1, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(3, 1);
    @(negedge clk);
    tx_valid = 1'b0;
    if (tx_sym_valid) err_mask = err_q.pop_front();
    @(negedge clk);
    err_mask = '0;
    repeat (3 * FRAME_LEN) @(posedge clk);
    checks++;
    if (nout != 4 * FR_PER_PH * FRAME_LEN) begin
      failures++;
      $display("%0d bits decoded, expected %0d", nout, 4 * FR_PER_PH * FRAME_LEN);
    end
    $display("corrected channel errors %0d, purge steps %0d, trace-backs %0d, overlapped cycles %0d, gaps %0d",
             n_err, n_purge, n_tb, n_overlap, n_gap);
    checks += 5;
    if (n_err == 0)     begin failures++; $display("no channel error was corrected"); end
    if (n_purge == 0)   begin failures++; $display("no state was purged"); end
    if (n_tb == 0)      begin failures++; $display("no trace-back ran"); end
    if (n_overlap == 0) begin failures++; $display("trace-back never overlapped reception"); end
    if (n_gap == 0)     begin failures++; $display("no input gap occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
