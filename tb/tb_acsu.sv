// tb_acsu -- self-checking testbench for acsu.
// Random path metrics, random survivor masks and random received symbols.
// The expected result is worked out here from an explicit transition table
// of the [7,5] code (from state {a,b} with input u the word is
// {u^a^b, u^b} and the next state {u,a}): for every next state the best
// live incoming candidate, ties to the predecessor with b = 0.
module tb_acsu;
  import vd_pkg::*;

  localparam int unsigned PM_W = 8;

  logic [PM_W-1:0] pm_in     [NUM_STATES];
  logic            valid_in  [NUM_STATES];
  bm_t             bm        [4];
  logic [PM_W-1:0] pm_new    [NUM_STATES];
  logic            cand_valid[NUM_STATES];
  logic            dec       [NUM_STATES];
  int              checks = 0, failures = 0;

  acsu #(.PM_W(PM_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int y;
      int best [4];
      int bdec [4];
      bit live [4];
      y = $urandom_range(0, 3);
      for (int s = 0; s < 4; s++) begin
        pm_in[s]    = PM_W'($urandom_range(0, (it % 3 == 0) ? 3 : 60));
        valid_in[s] = (it < 500) ? 1'b1 : 1'($urandom);
      end
      for (int w = 0; w < 4; w++) bm[w] = bm_t'($countones(2'(y ^ w)));
      for (int r = 0; r < 4; r++) begin best[r] = -1; bdec[r] = 0; live[r] = 0; end
      for (int p = 0; p < 4; p++) begin
        int a, b;
        a = (p >> 1) & 1;  b = p & 1;
        for (int u = 0; u < 2; u++) begin
          int w, nx, c;
          w  = ((u ^ a ^ b) << 1) | (u ^ b);
          nx = (u << 1) | a;
          c  = int'(pm_in[p]) + $countones(2'(y ^ w));
          if (valid_in[p] && (!live[nx] || c < best[nx])) begin
            best[nx] = c;  bdec[nx] = b;  live[nx] = 1;
          end
        end
      end
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (cand_valid[r] != live[r]) begin
          failures++;
          $display("it %0d r %0d: cand_valid %0b expected %0b", it, r, cand_valid[r], live[r]);
        end
        if (live[r]) begin
          checks += 2;
          if (int'(pm_new[r]) != best[r] || int'(dec[r]) != bdec[r]) begin
            failures++;
            $display("it %0d r %0d: pm %0d dec %0b expected pm %0d dec %0d",
                     it, r, pm_new[r], dec[r], best[r], bdec[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
