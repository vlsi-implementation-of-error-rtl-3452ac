// vd_pkg -- constants, types and trellis helpers shared by the encoder and
// the Viterbi decoder.
//
// The code is the rate-1/2, constraint-length-3 convolutional code with
// generator polynomials [7,5] (octal), i.e. 111 and 101 in binary, giving a
// 4-state trellis.  A state is the pair {u[n-1], u[n-2]} of the two previous
// input bits, held as a 2-bit number with u[n-1] as its MSB.  The coded
// symbol is {c1, c0}: c1 is the output of the 7 (111) arm and sits in the MSB,
// c0 is the output of the 5 (101) arm.  The code, its generators and its
// state count follow the document; the bit ordering of states and symbols is
// this design's own choice.
//
// Path metrics use modulo (wrap-around) arithmetic: two metrics are compared
// through the sign of their difference, so no normalisation hardware is
// needed as long as live metrics stay within half the metric range of each
// other.  This is this design's own choice.
package vd_pkg;

  localparam int unsigned K          = 3;             // constraint length
  localparam int unsigned MEM        = K - 1;         // delay elements
  localparam int unsigned NUM_STATES = 1 << MEM;      // 4 trellis states
  localparam logic [K-1:0] GEN_C1    = 3'b111;        // 7 octal
  localparam logic [K-1:0] GEN_C0    = 3'b101;        // 5 octal

  typedef logic [MEM-1:0] state_t;
  typedef logic [1:0]     sym_t;     // {c1, c0}
  typedef logic [1:0]     bm_t;      // Hamming distance 0..2

  // Encoder output for input bit u leaving state s = {u[n-1], u[n-2]}.
  function automatic sym_t branch_word(input state_t s, input logic u);
    logic [K-1:0] reg_bits;
    reg_bits = {u, s};               // {u[n], u[n-1], u[n-2]}
    return {^(reg_bits & GEN_C1), ^(reg_bits & GEN_C0)};
  endfunction

  // Next state reached from s with input u.
  function automatic state_t next_state(input state_t s, input logic u);
    return state_t'({u, s} >> 1);
  endfunction

  // Predecessor of state r selected by decision bit d (d is the dropped u[n-2]).
  function automatic state_t prev_state(input state_t r, input logic d);
    return state_t'({r, d});
  endfunction

endpackage
