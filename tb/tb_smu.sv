// tb_smu -- self-checking testbench for smu.
// A random information-bit path is laid through the trellis; at every step
// the decision bit of the state on the path points to its true predecessor
// and all other decision bits are random.  best_state follows the path, so
// the trace-back must return exactly the information bits, in order.  Six
// frames are sent: four back to back (one step per clock, so the two
// memory banks alternate under full load) and two with random gaps.  The
// latency is checked too: the first bit of a frame must appear
// FRAME_LEN+2 clocks after the frame's last decision was written.
module tb_smu;
  import vd_pkg::*;

  localparam int unsigned FRAME_LEN = 32;
  localparam int          NFRAMES   = 6;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   dec_valid = 1'b0;
  logic   dec [NUM_STATES];
  state_t best_state = '0;
  logic   tb_active, out_valid, out_bit;
  int     checks = 0, failures = 0;
  int     cycle = 0;

  bit     exp_bits[$];
  int     last_write_cycle[$];
  int     nout = 0;

  smu #(.FRAME_LEN(FRAME_LEN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit e;
      if (nout % FRAME_LEN == 0) begin
        int c;
        c = last_write_cycle.pop_front();
        checks++;
        if (cycle != c + FRAME_LEN + 2) begin
          failures++;
          $display("frame %0d: first bit at cycle %0d, expected %0d", nout / FRAME_LEN, cycle,
                   c + FRAME_LEN + 2);
        end
      end
      e = exp_bits.pop_front();
      checks++;
      if (out_bit !== e) begin
        failures++;
        $display("bit %0d: got %0b expected %0b", nout, out_bit, e);
      end
      nout++;
    end
  end

  initial begin
    state_t st;
    st = '0;
    for (int s = 0; s < NUM_STATES; s++) dec[s] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int t = 0; t < FRAME_LEN; t++) begin
        logic   u;
        state_t nx;
        @(negedge clk);
        while (f >= 4 && $urandom_range(0, 2) == 0) begin
          dec_valid  = 1'b0;
          best_state = st;
          @(negedge clk);
        end
        u  = 1'($urandom);
        nx = {u, st[1]};
        for (int s = 0; s < NUM_STATES; s++) dec[s] = 1'($urandom);
        dec[nx]    = st[0];
        dec_valid  = 1'b1;
        best_state = st;
        exp_bits.push_back(u);
        if (t == FRAME_LEN - 1) last_write_cycle.push_back(cycle);
        st = nx;
      end
    end
    @(negedge clk);
    dec_valid  = 1'b0;
    best_state = st;
    repeat (3 * FRAME_LEN) @(posedge clk);
    checks++;
    if (nout != NFRAMES * FRAME_LEN) begin
      failures++;
      $display("only %0d bits came out", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
