// tb_purge_unit -- self-checking testbench for purge_unit.
// Random metrics around a random threshold (including metrics that have
// wrapped past the top of the modulo range) and random reachability; a
// state must survive exactly when reachable and not above the threshold.
module tb_purge_unit;
  import vd_pkg::*;

  localparam int unsigned PM_W = 8;

  logic [PM_W-1:0] pm_new    [NUM_STATES];
  logic            cand_valid[NUM_STATES];
  logic [PM_W-1:0] threshold;
  logic            valid_new [NUM_STATES];
  logic            purged    [NUM_STATES];
  int              checks = 0, failures = 0;

  purge_unit #(.PM_W(PM_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int base, off [4];
      base      = $urandom_range(0, 255);
      threshold = PM_W'(base);
      for (int s = 0; s < 4; s++) begin
        off[s]        = $urandom_range(0, 20) - 10;   // metric - threshold
        pm_new[s]     = PM_W'(base + off[s]);
        cand_valid[s] = ($urandom_range(0, 4) != 0);
      end
      #1;
      for (int s = 0; s < 4; s++) begin
        bit keep, purge;
        keep  = cand_valid[s] && (off[s] <= 0);
        purge = cand_valid[s] && (off[s] > 0);
        checks += 2;
        if (valid_new[s] != keep || purged[s] != purge) begin
          failures++;
          $display("it %0d s %0d: thr %0d pm %0d reach %0b -> valid %0b purged %0b",
                   it, s, threshold, pm_new[s], cand_valid[s], valid_new[s], purged[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
