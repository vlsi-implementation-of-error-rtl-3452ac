// tb_tgu -- self-checking testbench for tgu.
// Random survivor sets, path metrics and branch-metric group minima are
// applied step by step.  The expected threshold of step n is
//   min over live states s of (PM_s(n-2) + bmg_min_{s>>1}(n-1)) + bm_min(n) + T,
// computed here from the values applied one step earlier (0 after reset).
// Steps without advance must leave the precomputed value unchanged.  Live
// metrics stay within 120 of each other, inside the modulo compare range.
module tb_tgu;
  import vd_pkg::*;

  localparam int unsigned PM_W = 8;

  logic            clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  logic [PM_W-1:0] pm_q     [NUM_STATES];
  logic            valid_q  [NUM_STATES];
  bm_t             bmg_min  [2];
  bm_t             bm_min;
  logic [PM_W-1:0] t_thresh;
  logic [PM_W-1:0] threshold;
  int              checks = 0, failures = 0;

  tgu #(.PM_W(PM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x_exp;
    for (int s = 0; s < 4; s++) begin pm_q[s] = '0; valid_q[s] = 1'b0; end
    bmg_min[0] = '0; bmg_min[1] = '0; bm_min = '0; t_thresh = 8'd3;
    x_exp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int best;
      @(negedge clk);
      advance  = ($urandom_range(0, 4) != 0);
      t_thresh = PM_W'($urandom_range(1, 30));
      for (int s = 0; s < 4; s++) begin
        pm_q[s]    = PM_W'($urandom_range(0, 120));
        valid_q[s] = 1'($urandom);
      end
      if (it % 7 == 0) valid_q[$urandom_range(0, 3)] = 1'b1;
      bmg_min[0] = bm_t'($urandom_range(0, 2));
      bmg_min[1] = bm_t'($urandom_range(0, 2));
      bm_min     = bm_t'($urandom_range(0, 2));
      #1;
      checks++;
      if (int'(threshold) != ((x_exp + int'(bm_min) + int'(t_thresh)) & 255)) begin
        failures++;
        $display("it %0d: threshold %0d expected %0d", it, threshold,
                 (x_exp + int'(bm_min) + int'(t_thresh)) & 255);
      end
      best = -1;
      for (int s = 0; s < 4; s++)
        if (valid_q[s]) begin
          int c;
          c = int'(pm_q[s]) + int'(bmg_min[s >> 1]);
          if (best < 0 || c < best) best = c;
        end
      if (advance && best >= 0) x_exp = best;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
