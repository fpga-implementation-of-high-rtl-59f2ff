# Rate-1/2, K = 9 convolutional codec with a hard-decision Viterbi decoder

A convolutional code protects a bit stream by sending, for every data bit, two
parity bits computed over a sliding window of the last nine data bits. The
receiver undoes this with the Viterbi algorithm. It tracks all 256 possible
encoder states in parallel. It keeps, for every state, only the cheapest way
the received symbols could have arrived there. At the end of a frame it follows
the surviving path backwards to recover the data. This RTL implements both ends
of such a link:

```
 X ──► conv_encoder ──► Y ══► (channel, outside the design) ══► R ──► viterbi_decoder ──► Z
```

The channel is left open. `Y` leaves the top module and `R` comes back in, so a
testbench (or real hardware) can put noise between them.

The code is constraint length K = 9, rate 1/2, with hard decisions: each
received bit is already 0 or 1. The generator polynomials default to 753 and
561 (octal). They are parameters.

## Files

| file | what it is |
|---|---|
| `rtl/viterbi_pkg.sv` | default parameters, symbol type, `code_symbol()` used by encoder and decoder |
| `rtl/conv_encoder.sv` | shift-register encoder; appends the zero tail that closes each frame |
| `rtl/branch_metric_unit.sv` | Hamming distance of the received symbol to the four possible symbols |
| `rtl/acs_unit.sv` | add-compare-select for one state |
| `rtl/path_metric_unit.sv` | 256 ACS units plus the path-metric registers |
| `rtl/survivor_memory.sv` | single-port RAM, one 256-bit decision word per trellis stage |
| `rtl/traceback_unit.sv` | walks the decisions backwards and streams out the decoded bits |
| `rtl/viterbi_decoder.sv` | BMU + PMU + survivor RAM + traceback, and the frame controller |
| `rtl/viterbi_codec_top.sv` | encoder and decoder side by side (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/viterbi_ref.svh` | integer reference encoder and Viterbi decoder used by the testbenches |

## Conventions that everything depends on

These conventions are shared by every module. Get them wrong when changing a
generator or adding a block and nothing decodes.

* **State.** The state is the last K-1 = 8 input bits, with the newest bit in
  the MSB. Input `b` in state `s` moves to `{b, s[7:1]}`.
* **Encoder register and generators.** The generators see the 9-bit value
  `u = {b, s}`. Generator bit 8 taps the current input and bit 0 the oldest
  stored bit.
* **Symbol.** A symbol is `{c0, c1}`, where `c0` comes from G0 and is sent
  first.
* **Predecessors.** State `ns` can be reached from two states:
  `{ns[6:0], 0}` and `{ns[6:0], 1}`. The branch from predecessor `d` carries
  the symbol of register `u = {ns, d}`. So the decision bit stored for a state
  is the LSB of its surviving predecessor. The data bit that led into a state
  is that state's MSB.

Check with the small code K = 3, generators 7 and 5. Starting from state 00,
the input 1,0,1,1 passes through states 10, 01, 10, 11 and emits
11, 10, 00, 01. `tb_conv_encoder` checks exactly this.

## Frames and termination

Decoding works on frames of `FRAME_LEN` = 128 trellis stages:

* 120 data bits;
* then K-1 = 8 zero tail bits, which the encoder inserts on its own. `x_ready`
  is low during those 8 cycles.

The tail returns the encoder to state 0. The decoder can therefore start its
traceback at state 0 in the last stage, instead of searching for the best final
state. Encoding also always starts from state 0. The decoder gives state 0 a
start metric of 0 and every other state a start metric of 64, so that paths
beginning anywhere else lose.

The frame length is this design's own choice. It matches a survivor RAM of
256 × 128 = 32768 bits, the size of 512 FPGA 64×1 LUT-RAMs.

The decoder counts symbols from reset and has no frame marker on its input. It
therefore assumes that the symbol stream arrives in whole frames, as the encoder
produces it. A dropped or extra symbol shifts every later frame.

## The decoder, stage by stage

### Branch metrics
The branch metrics are combinational. `bm[c]` is the number of bits in which
the received symbol differs from symbol `c`, so it is 0, 1 or 2.

### Add-compare-select (path metric unit)
All 256 states are updated in the same clock. Each state has its own
`acs_unit`, which:

1. adds the two branch metrics to the two predecessor metrics (two adders);
2. compares the two sums;
3. keeps the smaller one.

On a tie, predecessor 0 wins. The 256 decision bits of the stage are written
to the survivor RAM in the same cycle.

Path metrics are 8 bits wide and never normalised. They are allowed to wrap
around. Two sums are compared through the sign of their difference, taken
modulo 256. This is exact as long as all metrics stay within 127 of each other.
For this code with hard decisions, the spread is bounded by the start bias (64)
plus about 2·(K-1) = 16, so the compare never goes wrong. If you raise
`INIT_BIAS`, switch to soft decisions or make the metrics narrower, check this
bound again.

### Survivor memory and traceback
The survivor memory is single-ported, with a read latency of one clock:

* during a frame it is only written, one word per stage;
* during the traceback it is only read.

The traceback starts one cycle after the last stage of a frame. It begins at
state 0 in stage 127. In each clock it:

1. takes the state's MSB as the data bit of that stage;
2. moves to the predecessor `{s[6:0], decision}`.

It finishes after 129 clocks. A correctly framed frame with correctable errors
must lead back to state 0 before the first stage as well. `path_ok`, which comes
with `frame_done`, reports whether it did. It is a check only: the bits are
output either way. The bits come out last-first. They are therefore
gathered in a 128-bit register and then streamed on `z` in their original
order, one per clock, with the 8 tail bits dropped. This streaming (120 clocks)
overlaps the next frame's input (at least 128 clocks). An assertion checks that
a traceback never starts while the previous frame is still being streamed.

### Timing and throughput

| phase | cycles | `r_ready` |
|---|---|---|
| receive a frame | 128 (one stage per accepted symbol) | high |
| traceback start + walk | 1 + 129 = 130 | low |
| output of the frame | 120 (one bit per clock, `z_valid`) | overlaps the next frame's receive phase |

Sustained throughput is therefore 120 data bits per 258 clocks, about 0.47 bit
per clock. The encoder never waits for the decoder. Whatever sits between them
(the channel) must buffer about 130 symbols per frame, or the source must be
throttled.

## Interfaces (top `viterbi_codec_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `x_valid`, `x`, `x_ready` | in, in, out | 1 | data bit in; taken when valid and ready |
| `y_valid`, `y`, `y_last` | out | 1, 2, 1 | code symbol, one clock after its bit; `y_last` on the frame's last symbol |
| `r_valid`, `r`, `r_ready` | in, in, out | 1, 2, 1 | received symbol; taken when valid and ready |
| `z_valid`, `z` | out | 1 | decoded data bit |
| `frame_done` | out | 1 | one-clock pulse at the end of each traceback |
| `path_ok` | out | 1 | with `frame_done`: the traced path began in state 0 |

Parameters are the same on every level: `K` (9), `G0` ('o753), `G1` ('o561),
`FRAME_LEN` (128) and `PM_W` (8). `FRAME_LEN` must be larger than K-1. `K`
must be at least 3.

## Where this design departs from, or adds to, its source description

The design follows a published description of a K = 9, rate-1/2 hard-decision
Viterbi decoder. That description gives:

* the code size and the hard-decision choice;
* the three decoder units, including the two-adder / comparator / selector
  form of the ACS;
* the traceback from state 0 to state 0;
* one decision per state per clock;
* a single-port RAM for the survivors.

The following points are this design's own:

* **Generator polynomials** 753/561. The source names none for K = 9.
* **Survivor handling.** The source calls its decoder "hybrid" and compares it
  with pure trace-back and pure register-exchange decoders. It does not say how
  the hybrid works. This design uses plain trace-back. The hybrid scheme is
  **not** implemented.
* **Frame length, tail insertion, start-metric bias, wrap-around metrics, tie
  rule, handshakes, output ordering and reset** are all own choices.
* **Resources.** The source reports its FPGA resource use, about 1600 registers
  and 512 LUT-RAMs. Generic synthesis of this RTL gives about 2240 flip-flop
  bits and 32768 RAM bits. Most flip-flops are the 256 × 8 path metrics. No
  FPGA timing or power figures are claimed for this RTL.

## Verification

Each testbench checks its module against values it computes itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_conv_encoder` covers:
  * the K = 3 worked example;
  * the K = 9 encoder against a tap-by-tap reference, with random idle cycles;
  * the tail timing and `y_last`.
* `tb_branch_metric_unit` is exhaustive.
* `tb_acs_unit` uses 2000 random vectors, including forced ties and metrics
  that wrap around.
* `tb_path_metric_unit` compares all 256 decisions and metrics every stage
  against an integer trellis model. It runs 3000 stages, long enough for many
  wraps, then an `init`.
* `tb_survivor_memory` writes every stage and reads the frame back in reverse.
* `tb_traceback_unit` plants a known path in a memory of random decisions. It
  then checks the recovered bits, the address order and the busy time
  (FRAME_LEN+1). It also checks `path_ok`, including a frame whose path starts
  elsewhere.
* `tb_viterbi_decoder` runs 9 frames in three channel conditions: clean, one
  bit flipped every 24 symbols, and about 15 % of symbols hit. The output must
  match the reference Viterbi decoder bit for bit. In the first two conditions
  it must also match the sent data. `r_ready` must be low for exactly 130
  clocks per frame.
* `tb_viterbi_codec_top` runs the whole link at the default parameters for 6
  frames, with a buffered noisy channel. It counts, and requires, these
  events:
  * tail insertion;
  * decoder stalls with symbols waiting;
  * injected channel errors;
  * tracebacks;
  * output that overlaps the next frame's input.

The reference decoder in `tb/viterbi_ref.svh` is written independently of the
RTL. It uses integer metrics with no wrap, loops over (state, input bit) pairs,
and does its traceback on an array.

To simulate, for example the whole link:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_viterbi_codec_top rtl/viterbi_pkg.sv tb/tb_viterbi_codec_top.sv
./obj_dir/Vtb_viterbi_codec_top
```

Replace the testbench name to run any other. The simulator used has two states
only, so all state that gets read is reset or initialised.
