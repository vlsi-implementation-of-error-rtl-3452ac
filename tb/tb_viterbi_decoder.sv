// tb_viterbi_decoder -- self-checking testbench for viterbi_decoder.
// Random information bits are encoded here with the [7,5] code and passed
// through a binary symmetric channel.  A behavioural model in this file
// runs the same decoding rule with unbounded integers: Hamming branch
// metrics, ACS over live states (ties to the predecessor with low bit 0),
// threshold = previous precomputed minimum + minimum branch metric + T,
// purge of states above it, and a trace-back per frame from the first live
// state with the smallest metric.  Checked: the survivor set after every
// step, every decoded bit against the model, the decoded bits against the
// transmitted bits when the channel errors are sparse, and the latency of
// every frame (FRAME_LEN+2 clocks after its last symbol).
// Phases: error-free, sparse errors, dense errors with small T (T = 1 and
// 2, where states are purged), and sparse errors with random input gaps.
module tb_viterbi_decoder;
  import vd_pkg::*;

  localparam int unsigned PM_W      = 8;
  localparam int unsigned FRAME_LEN = 32;
  localparam int          FR_PER_PH = 12;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  sym_valid = 1'b0;
  sym_t                  sym = '0;
  logic [PM_W-1:0]       t_thresh = PM_W'(20);
  logic                  dec_valid, dec_bit;
  logic [NUM_STATES-1:0] state_valid;
  logic                  purge_pulse, tb_active;

  int checks = 0, failures = 0, cycle = 0;
  int n_purge = 0, n_sparse_fixed = 0;

  viterbi_decoder #(.PM_W(PM_W), .FRAME_LEN(FRAME_LEN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && purge_pulse) n_purge++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural model ----------------
  int m_pm [4];
  bit m_live [4];
  int m_x;
  bit m_dec [FRAME_LEN][4];
  int m_t;
  bit exp_bits[$];     // model's decoded bits
  bit tx_bits[$];      // transmitted information bits
  bit must_match[$];   // frame was sent with sparse errors only
  int last_sym_cycle[$];

  function automatic int popc(input int v);
    return ((v >> 1) & 1) + (v & 1);
  endfunction

  task automatic model_reset();
    for (int s = 0; s < 4; s++) begin m_pm[s] = 0; m_live[s] = (s == 0); end
    m_x = 0;  m_t = 0;
  endtask

  task automatic model_step(input int y, input int T);
    int bm [4];
    int bmg [2];
    int bmin, thr, xnew, best [4], bd [4];
    bit reach [4];
    for (int w = 0; w < 4; w++) bm[w] = popc(y ^ w);
    bmg[0] = (bm[0] < bm[3]) ? bm[0] : bm[3];
    bmg[1] = (bm[1] < bm[2]) ? bm[1] : bm[2];
    bmin   = (bmg[0] < bmg[1]) ? bmg[0] : bmg[1];
    thr    = m_x + bmin + T;
    xnew   = -1;
    for (int r = 0; r < 4; r++) begin reach[r] = 0; best[r] = 0; bd[r] = 0; end
    for (int p = 0; p < 4; p++) begin
      int a, b;
      if (!m_live[p]) continue;
      a = p >> 1;  b = p & 1;
      if (xnew < 0 || m_pm[p] + bmg[a] < xnew) xnew = m_pm[p] + bmg[a];
      for (int u = 0; u < 2; u++) begin
        int w, nx, c;
        w  = ((u ^ a ^ b) << 1) | (u ^ b);
        nx = (u << 1) | a;
        c  = m_pm[p] + bm[w];
        if (!reach[nx] || c < best[nx]) begin best[nx] = c; bd[nx] = b; reach[nx] = 1; end
      end
    end
    for (int r = 0; r < 4; r++) begin
      m_live[r]     = reach[r] && (best[r] <= thr);
      m_pm[r]       = best[r];
      m_dec[m_t][r] = bd[r];
    end
    m_x = xnew;
    m_t++;
    if (m_t == FRAME_LEN) begin
      int st, bp;
      bit bits [FRAME_LEN];
      st = -1;  bp = 0;
      for (int s = 0; s < 4; s++)
        if (m_live[s] && (st < 0 || m_pm[s] < bp)) begin st = s; bp = m_pm[s]; end
      for (int t = FRAME_LEN - 1; t >= 0; t--) begin
        bits[t] = st >> 1;
        st      = ((st & 1) << 1) | m_dec[t][st];
      end
      for (int t = 0; t < FRAME_LEN; t++) exp_bits.push_back(bits[t]);
      m_t = 0;
    end
  endtask

  // ---------------- output checker ----------------
  int nout = 0;
  bit cur_must;
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      bit e, tx;
      if (nout % FRAME_LEN == 0) begin
        int c;
        c        = last_sym_cycle.pop_front();
        cur_must = must_match.pop_front();
        checks++;
        if (cycle != c + FRAME_LEN + 2) begin
          failures++;
          $display("frame %0d: first bit at %0d, expected %0d", nout / FRAME_LEN, cycle,
                   c + FRAME_LEN + 2);
        end
      end
      e  = exp_bits.pop_front();
      tx = tx_bits.pop_front();
      checks++;
      if (dec_bit !== e) begin
        failures++;
        $display("bit %0d: decoder %0b model %0b", nout, dec_bit, e);
      end
      if (cur_must) begin
        checks++;
        if (dec_bit !== tx) begin
          failures++;
          $display("bit %0d: decoder %0b transmitted %0b (sparse errors)", nout, dec_bit, tx);
        end
      end
      nout++;
    end
  end

  // ---------------- stimulus ----------------
  int enc_st = 0;
  int n_err  = 0;

  // mode 0: no errors, 1: sparse errors, 2: about 6% symbol errors
  task automatic send_frame(input int mode, input int T, input bit gaps);
    int since_err;
    since_err = 100;
    must_match.push_back(mode < 2);
    for (int t = 0; t < FRAME_LEN; t++) begin
      int u, a, b, y;
      @(negedge clk);
      while (gaps && $urandom_range(0, 3) == 0) begin
        sym_valid = 1'b0;
        @(negedge clk);
      end
      u = $urandom_range(0, 1);
      a = enc_st >> 1;  b = enc_st & 1;
      y = ((u ^ a ^ b) << 1) | (u ^ b);
      enc_st = (u << 1) | a;
      tx_bits.push_back(u);
      if (mode == 1 && since_err > 12 && t > 2 && t < FRAME_LEN - 8 && $urandom_range(0, 5) == 0) begin
        y ^= (1 << $urandom_range(0, 1));
        since_err = 0;
        n_err++;
      end else if (mode == 2 && $urandom_range(0, 15) == 0) begin
        y ^= $urandom_range(1, 3);
        n_err++;
      end
      since_err++;
      sym       = sym_t'(y);
      t_thresh  = PM_W'(T);
      sym_valid = 1'b1;
      model_step(y, T);
      if (t == FRAME_LEN - 1) last_sym_cycle.push_back(cycle);
      // survivor set after the step
      @(posedge clk);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (state_valid[s] != m_live[s]) begin
          failures++;
          $display("cycle %0d: state %0d valid %0b, model %0b", cycle, s, state_valid[s], m_live[s]);
        end
      end
    end
  endtask

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FR_PER_PH; f++) send_frame(0, 20, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(1, 20, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(2, 1, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(2, 2, 0);
    for (int f = 0; f < FR_PER_PH; f++) send_frame(1, 3, 1);
    @(negedge clk);
    sym_valid = 1'b0;
    repeat (3 * FRAME_LEN) @(posedge clk);
    checks++;
    if (nout != 5 * FR_PER_PH * FRAME_LEN) begin
      failures++;
      $display("%0d bits decoded, expected %0d", nout, 5 * FR_PER_PH * FRAME_LEN);
    end
    checks++;
    if (n_purge == 0) begin
      failures++;
      $display("no state was ever purged");
    end
    $display("channel errors %0d, purge steps %0d", n_err, n_purge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
