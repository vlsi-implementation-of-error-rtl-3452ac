# Low-power Viterbi error correction with a precomputed T-algorithm threshold

A Viterbi decoder normally updates every trellis state at every step, even
states whose path metric is so poor that they can never lie on the decoded
path.  The T-algorithm saves that work: after each step it keeps only the
states whose path metric is within a threshold `T` of the best metric,
`PM_opt`, and purges the rest. The cost is finding `PM_opt`. A 4-way minimum
placed after the add-compare-select (ACS) loop lengthens the critical path.
This design removes that minimum from the loop. It precomputes `PM_opt`
from metrics two steps old and from branch-metric group minima, so the
threshold is ready when the new path metrics come out of the ACS.

The RTL implements the error correction unit for the rate-1/2,
constraint-length-3 convolutional code with generators [7,5] (octal):

* a convolutional encoder on the transmit side;
* a 4-state hard-decision Viterbi decoder on the receive side. It has a
  branch metric unit, an ACS unit, a threshold generator, a purge unit and a
  trace-back survivor memory.

## The code and its trellis

The encoder keeps the last two input bits. For each input bit `u` it sends
a 2-bit symbol `{c1, c0}`:

    c1 = u ^ u[n-1] ^ u[n-2]     (generator 7 = 111)
    c0 = u ^ u[n-2]              (generator 5 = 101)

A state is `{u[n-1], u[n-2]}`, a number from 0 to 3. From state `{a, b}`,
input `u` leads to state `{u, a}`. So the two predecessors of state
`{u, a}` are `{a, 0}` and `{a, 1}`. A decision bit per state records which
of the two won, and the trace-back uses that bit to step backwards:
predecessor = `{r[0], d}`.

Both generators tap the current input, so the two branches that leave a
state carry complementary words. States 0 and 1 emit words 00 and 11, and
states 2 and 3 emit 01 and 10. These are the two *branch-metric groups*
(BMGs) that the precomputation is built on.

`rtl/vd_pkg.sv` holds the constants and the three trellis functions
(`branch_word`, `next_state`, `prev_state`) that the other files use.

## Decoder data path

One received symbol is taken per clock when `sym_valid` is high:

    sym ──► BMU ──bm[4]──► ACSU ──pm_new, cand_valid──► PU ──valid_new──► PM / valid registers
             │                ▲                          ▲                       │
             │ bmg_min, bm_min│ pm_q, valid_q            │ threshold             │
             └──────────────► TGU ◄──────────────────────┼───────────────────────┘
                                                         │
                      ACSU dec[4] ──► SMU (trace-back) ──► dec_bit / dec_valid

* **BMU** (`bmu.sv`). Computes the Hamming distance from the received symbol
  to each of the words 00, 01, 10 and 11. It also gives the minimum of each
  group, `{00,11}` and `{01,10}`, and the minimum over all four words.
* **ACSU** (`acsu.sv`). Four add-compare-select cells. A purged predecessor
  does not take part in the compare. A state that no live predecessor
  reaches is flagged unreachable. On a tie the predecessor `{a, 0}` wins.
* **TGU** (`tgu.sv`). The threshold generator, described in the next
  section.
* **PU** (`purge_unit.sv`). A state survives when it is reachable and its
  new metric is not above the threshold. The unit clears the valid bit of
  every other state.
* **SMU** (`smu.sv`). The survivor memory, described further down.

The path-metric and valid registers sit in `viterbi_decoder.sv`. After reset,
only state 0, the encoder's start state, is alive.

## Two-step threshold precomputation

This is the part that is hardest to follow.

At step `n` the purge needs `PM_opt(n) + T`. The TGU builds this value in
two steps, and neither step depends on the ACS output of step `n`.

1. **In the cycle of symbol n-1 (registered).** The states are split into
   two clusters by the group their outgoing branches use: {0,1} use group
   {00,11} and {2,3} use group {01,10}. The TGU computes

       X(n-1) = min over clusters c of ( min live PM_c(n-2) + bmg_min_c(n-1) )

   Each cluster emits both words of its group from every state. X(n-1) is
   therefore exactly the smallest metric that the ACS produces at step n-1.
   It is computed from the same register contents as the ACS, in parallel
   with it.
2. **In the cycle of symbol n (combinational).**

       threshold(n) = X(n-1) + bm_min(n) + T

   This is a lower bound on `PM_opt(n) + T`. It comes from a register plus
   two small adds, so the purge compare starts from the ACS output without
   waiting for a 4-way minimum.

With hard decisions, `bm_min` is always 0: some word always equals the
received symbol. The best metric grows by at most 1 per step, because the
two words leaving a state differ in both bits. So with `T >= 1` the best
state is never purged and at least one state always survives. The decoder
asserts both facts. A smaller `T` purges more states, which saves switching
activity but raises the risk of losing the correct path.

### Metric arithmetic

Path metrics are `PM_W`-bit numbers (default 8) that wrap around. Two
metrics are compared by the sign bit of their difference. This needs no
normalisation hardware, and it is exact as long as the live metrics and the
threshold stay within `2**(PM_W-1)` of each other. Survivors are never more
than about `T + 1` above the best metric, so `T` must be below
`2**(PM_W-2)` (asserted).

## Survivor memory and output timing

The SMU is a trace-back memory. Each step writes the four decision bits into
one word of a two-bank memory with `FRAME_LEN` words per bank (default 32).
The trace-back logic stays idle while a frame (codeword) is being written.

At the end of a frame the trace-back starts from the best surviving state.
That state is chosen by a compare tree in the decoder, which is read only at
frame ends. The trace-back reads one word per clock, backwards, and writes
the decoded bits into a buffer. The buffer is then shifted out in
transmission order, one bit per clock.

While one bank is traced back, the ACS fills the other. The decoder
therefore accepts one symbol per clock without stalls.

| event | cycle |
|---|---|
| last symbol of a frame taken | c |
| trace-back | c+1 … c+FRAME_LEN |
| decoded bits on `dec_bit`/`dec_valid` | c+FRAME_LEN+2 … c+2·FRAME_LEN+1 |

Each frame is traced back on its own. There is no overlap with the next
frame and no tail bits. The bits near the end of a frame are therefore
decided from that frame's symbols alone. A channel error in the last few
symbols of a frame is more likely to cause a wrong bit than one in the
middle.

## Top level and interfaces

`ecu_top` places the encoder and the decoder side by side. They share only
the clock and the active-low asynchronous reset. The channel is outside the
module: `tx_sym` is an output and `rx_sym` is an input.

| port | dir | width | meaning |
|---|---|---|---|
| `tx_valid`, `tx_bit` | in | 1, 1 | bit to encode |
| `tx_sym_valid`, `tx_sym` | out | 1, 2 | encoded symbol `{c1,c0}`, one clock later |
| `rx_valid`, `rx_sym` | in | 1, 2 | received hard-decision symbol |
| `t_thresh` | in | PM_W | T, from 1 to 2**(PM_W-2)-1 |
| `rx_dec_valid`, `rx_dec_bit` | out | 1, 1 | decoded bits, in order |
| `rx_state_valid` | out | 4 | states alive after the last step |
| `rx_purge_pulse` | out | 1 | the last step purged at least one state |
| `rx_tb_active` | out | 1 | trace-back running |

Parameters: `PM_W` (path-metric width, 8) and `FRAME_LEN` (trace-back frame
length, 32). The code itself (K = 3, generators 7 and 5, 4 states) is fixed
in `vd_pkg`. The cluster and group split in the BMU and TGU relies on the two
branches of each state carrying complementary words. A different code needs
those two blocks reworked.

## What follows the published architecture and what was chosen here

These points follow the published architecture:

* the code (rate 1/2, K = 3, [7,5], 4 states);
* hard-decision Hamming branch metrics;
* the ACS recursion;
* the trace-back survivor memory activated once per codeword;
* the BMG minima feeding a threshold generator that produces `PM_opt + T`;
* the purge unit comparing that threshold with the new metrics.

These are this design's own choices:

* the bit order of symbols and states;
* the ACS tie rule;
* the exact split of the two precomputation steps, and the use of
  clusters;
* `T` as a run-time input (no value for `T` is specified);
* the requirement `T >= 1`;
* the modulo metric arithmetic and `PM_W = 8`;
* valid bits as the way to mark purged states;
* `FRAME_LEN = 32`, the two-bank memory, and starting the trace-back from
  the best state without tail bits or frame overlap;
* the output ordering buffer;
* the registered encoder output and the reset behaviour.

The design was checked only in simulation. No timing or power figures were
measured, so the speed and power benefit of the precomputation is argued
from the structure, not shown.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

* `tb_conv_encoder`: random bits with idle cycles, checked against the
  generator equations, including the one-clock latency.
* `tb_bmu`: all four symbols exhaustively, checking the distances and the
  group minima.
* `tb_acsu`: random metrics, survivor masks and symbols, checked against an
  explicit transition table.
* `tb_tgu`: random inputs, checking the threshold against the two-step
  formula, including steps without `advance`.
* `tb_purge_unit`: random metrics around the threshold, including wrapped
  values.
* `tb_smu`: a random path laid into the decision memory with random
  decisions off the path. Frames are sent back to back and with gaps, and
  the test checks the bits and the `FRAME_LEN+2` latency.
* `tb_viterbi_decoder`: a behavioural model of the same algorithm written
  with plain integers. The test compares the survivor set after every step
  and every decoded bit. It also compares the decoded bits with the
  transmitted bits where channel errors are sparse. Phases: error-free,
  sparse errors, dense errors with `T = 1` and `T = 2`, and input gaps.
* `tb_ecu_top`: end to end at the default parameters. Encoder, channel with
  isolated bit errors, then decoder, with `T` = 20, 3 and 1 and with input
  gaps. Every decoded bit must equal the transmitted bit, and the frame
  latency is checked. It counts corrected errors, purges, trace-back runs,
  trace-backs overlapping reception and input gaps, and fails if any of
  them never happened.

To run one with Verilator, from the project root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ecu_top \
        -y rtl +libext+.sv -Irtl rtl/vd_pkg.sv tb/tb_ecu_top.sv
    ./obj_dir/Vtb_ecu_top

All testbenches finish in well under a second.
