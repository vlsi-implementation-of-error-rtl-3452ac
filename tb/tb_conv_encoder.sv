// tb_conv_encoder -- self-checking testbench for conv_encoder.
// Feeds random bits, with random idle cycles, and compares every symbol with
// c1 = u ^ u1 ^ u2, c0 = u ^ u2 computed here from its own copy of the last
// two input bits.  Also checks the one-clock latency of sym_valid.
module tb_conv_encoder;
  import vd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic sym_valid;
  sym_t sym_out;
  int   checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic u1, u2, exp_v;
    sym_t exp_s;
    u1 = 1'b0; u2 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = 1'($urandom);
      exp_v    = in_valid;
      exp_s    = {in_bit ^ u1 ^ u2, in_bit ^ u2};
      if (in_valid) begin u2 = u1; u1 = in_bit; end
      @(negedge clk);   // result registered at the edge in between
      checks++;
      if (sym_valid !== exp_v) begin
        failures++;
        $display("step %0d: sym_valid=%0b expected %0b", i, sym_valid, exp_v);
      end
      if (exp_v) begin
        checks++;
        if (sym_out !== exp_s) begin
          failures++;
          $display("step %0d: sym=%b expected %b", i, sym_out, exp_s);
        end
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
