// smu -- survivor memory unit, trace-back type.
//
// The decision bits of all four states are written, one word per trellis
// step, into a decision memory organised as two banks of FRAME_LEN words.
// The trace-back logic is idle while a codeword (frame) is being written and
// is started only at its end, as the document describes: beginning from the
// state with the best path metric at the end of the frame (best_state,
// taken in the cycle after the last write), it reads the memory backwards,
// one word per clock.  At step t the current state r gives the decoded bit
// u[t] = r[MSB] and its decision bit d selects the predecessor {r[0], d}.
// The bits found (in reverse order) are collected in a buffer and then
// shifted out in transmission order, one per clock.  While one bank is traced
// back the ACSU fills the other, so symbols may arrive every clock.
//
// Timing: for a frame whose last decision is written in cycle c, trace-back
// runs in cycles c+1 .. c+FRAME_LEN and the decoded bits leave on
// out_bit/out_valid in cycles c+FRAME_LEN+2 .. c+2*FRAME_LEN+1.  FRAME_LEN
// must be at least 2.  Frames are
// closed strictly every FRAME_LEN steps; no tail bits are assumed and there
// is no overlap between frames.  The frame length, the two-bank memory and
// the start from the best state are this design's choices.
module smu
  import vd_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 32
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   dec_valid,                // a trellis step was taken
  input  logic   dec [NUM_STATES],         // its decision bits
  input  state_t best_state,               // best survivor after that step
  output logic   tb_active,                // trace-back running
  output logic   out_valid,
  output logic   out_bit
);

  localparam int unsigned AW = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1;

  logic [NUM_STATES-1:0] mem [2][FRAME_LEN];

  logic                  wr_bank;
  logic [AW-1:0]         wr_ptr;
  logic                  frame_done;       // last word of a frame written
  logic                  tb_bank;
  logic [AW-1:0]         tb_ptr;
  state_t                tb_state;
  logic [FRAME_LEN-1:0]  tb_buf;
  logic [FRAME_LEN-1:0]  out_buf;
  logic [AW:0]           out_cnt;

  // Decision memory write side.
  always_ff @(posedge clk) begin
    if (dec_valid)
      for (int s = 0; s < NUM_STATES; s++) mem[wr_bank][wr_ptr][s] <= dec[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank    <= 1'b0;
      wr_ptr     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (dec_valid) begin
        if (wr_ptr == AW'(FRAME_LEN - 1)) begin
          wr_ptr     <= '0;
          wr_bank    <= ~wr_bank;
          frame_done <= 1'b1;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
    end
  end

  // Trace-back side.  The first step is taken in the cycle frame_done is
  // high, straight from best_state, so a trace-back lasts FRAME_LEN clocks.
  logic                 tb_step;
  logic                 cur_bank;
  logic [AW-1:0]        cur_ptr;
  state_t               cur_state;
  logic                 cur_dec;
  logic [FRAME_LEN-1:0] tb_buf_next;
  always_comb begin
    tb_step   = frame_done | tb_active;
    cur_bank  = frame_done ? ~wr_bank          : tb_bank;
    cur_ptr   = frame_done ? AW'(FRAME_LEN - 1) : tb_ptr;
    cur_state = frame_done ? best_state        : tb_state;
    cur_dec   = mem[cur_bank][cur_ptr][cur_state];
    tb_buf_next          = tb_buf;
    tb_buf_next[cur_ptr] = cur_state[MEM-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tb_active <= 1'b0;
      tb_bank   <= 1'b0;
      tb_ptr    <= '0;
      tb_state  <= '0;
      tb_buf    <= '0;
      out_buf   <= '0;
      out_cnt   <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      // Output shifter: one decoded bit per clock.
      out_valid <= (out_cnt != 0);
      if (out_cnt != 0) begin
        out_bit <= out_buf[0];
        out_buf <= out_buf >> 1;
        out_cnt <= out_cnt - 1'b1;
      end
      if (tb_step) begin
        tb_bank  <= cur_bank;
        tb_buf   <= tb_buf_next;
        tb_state <= prev_state(cur_state, cur_dec);
        if (cur_ptr == '0) begin
          tb_active <= 1'b0;
          out_buf   <= tb_buf_next;
          out_cnt   <= (AW+1)'(FRAME_LEN);
        end else begin
          tb_active <= 1'b1;
          tb_ptr    <= cur_ptr - 1'b1;
        end
      end
    end
  end

  // A new frame must not end while the previous one is still traced back.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 frame_done |-> !tb_active);

endmodule
