// conv_encoder -- rate-1/2, K=3 convolutional encoder, generators [7,5] octal.
//
// Two delay elements hold the previous two input bits.  For every accepted
// input bit u the encoder emits the 2-bit symbol {c1, c0}, with
//   c1 = u ^ u[n-1] ^ u[n-2]   (generator 7 = 111)
//   c0 = u ^ u[n-2]            (generator 5 = 101)
// as the document specifies.  The symbol is registered: it appears on
// sym_out with sym_valid one clock after in_valid/in_bit are sampled.
// An asynchronous active-low reset clears the delay
// elements to the all-zero state, which the decoder assumes as its start
// state (reset style and output register are this design's choices).
module conv_encoder
  import vd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,   // in_bit is sampled when high
  input  logic   in_bit,
  output logic   sym_valid,  // sym_out holds a new code symbol
  output sym_t   sym_out     // {c1, c0}
);

  state_t st_q;   // {u[n-1], u[n-2]}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= '0;
      sym_valid <= 1'b0;
      sym_out   <= '0;
    end else begin
      sym_valid <= in_valid;
      if (in_valid) begin
        sym_out <= branch_word(st_q, in_bit);
        st_q    <= next_state(st_q, in_bit);
      end
    end
  end

endmodule
