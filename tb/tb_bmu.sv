// tb_bmu -- self-checking testbench for bmu.
// Applies all four received symbols and checks the four Hamming distances,
// the two branch-metric group minima ({00,11} and {01,10}) and the overall
// minimum against values counted here bit by bit.
module tb_bmu;
  import vd_pkg::*;

  sym_t y;
  bm_t  bm [4];
  bm_t  bmg_min [2];
  bm_t  bm_min;
  int   checks = 0, failures = 0;

  bmu dut (.*);

  function automatic int hd(input int a, input int b);
    int n = 0;
    for (int i = 0; i < 2; i++) if (((a >> i) & 1) != ((b >> i) & 1)) n++;
    return n;
  endfunction

  function automatic int min2(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("y=%b %s: got %0d expected %0d", y, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      y = sym_t'(v);
      #1;
      for (int w = 0; w < 4; w++) chk($sformatf("bm[%0d]", w), int'(bm[w]), hd(v, w));
      chk("bmg_min[0]", int'(bmg_min[0]), min2(hd(v, 0), hd(v, 3)));
      chk("bmg_min[1]", int'(bmg_min[1]), min2(hd(v, 1), hd(v, 2)));
      chk("bm_min", int'(bm_min), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
