# Forward-backward soft-output decoders in SystemVerilog

The forward-backward algorithm (also called BCJR or MAP) runs a trellis
twice, once forward and once backward in time, and combines the two passes
into a soft decision for every bit: a log-likelihood ratio whose sign is the
bit and whose size is the confidence. In the log domain every step is an
add-compare-select, as in a Viterbi decoder, but with the compare-select
replaced by MAX\*: max(a, b) + ln(1 + e^-|a-b|).

This repository holds two fixed-point hardware designs built on that idea.

* **TORBO-TM2** is a block turbo decoder for the classic 4-state parallel
  turbo code. It consists of two recursive systematic 7/5 encoders and an
  interleaver whose permutation the user supplies. The code is rate 1/3, or
  rate 1/2 when half the parity samples are punctured. One forward-backward
  unit is reused for both constituent decoders and for every iteration.
  Three external 64-bit SRAM banks hold the block and the intermediate
  values.
* **PRONTO-1** is a soft-output detector for the 1-D channel, one
  interleave of a class-IV partial-response (PR4) read channel. It uses the
  *difference-metric* form of the algorithm. With the MAX approximation,
  each recursion step becomes a simple limiter (a clamp), with no adder in
  the loop. A sliding window of L = 9 gives one soft output per clock.

`fb_vlsi_top` places the two side by side, each with its own clock, reset
and pins (`t_*` for the turbo decoder, `p_*` for the detector). They share
nothing except the saturating adder cell.

## Number formats and the two arithmetic cells

Every value is two's complement and every addition saturates
(`sat_add`). An out-of-range sum is replaced by the most positive or most
negative number. Subtraction a − b is built as a + ~b + 1.

| design | values | width | integer bits | fraction bits |
|---|---|---|---|---|
| turbo | channel samples, extrinsic/a-priori values (X, Y, Z, W) | 6 | 3 | 2 |
| turbo | branch metrics, state metrics, LLR | 8 | 4 | 3 |
| detector | everything | 6 | 1 | 4 |

A 6-bit turbo value enters the 8-bit domain by a left shift. An 8-bit
result returns to 6 bits by dropping one fraction bit (floor) and then
saturating.

`maxstar` replaces the correction term ln(1 + e^-|d|) by a two-valued
function: +0.375 (the constant 3 at 3 fraction bits) when −2 ≤ d < 2, and 0
otherwise. This needs no lookup table. The window test looks only at the top
four bits of the saturated difference d = x − y:

* for d ≥ 0 all four are 0;
* for −2 ≤ d < 0 all four are 1.

So the test is one 4-input AND or NOR, chosen by the sign.

## TORBO-TM2

### Trellis and datapath

The encoder state is a(k−1) + 2·a(k−2). The feedback bit is a = u ⊕ a1 ⊕ a2
and the parity is a ⊕ a2. Only four branch metrics exist per step
(`torbo_bmg`):

* 0
* P = x + z (systematic plus a-priori)
* Y = y (parity)
* Q = P + y

`torbo_smg` computes all four new state metrics in one clock:

* Forward: A'(0) = MAX\*(A0, A2+Q), A'(1) = MAX\*(A0+Q, A2), A'(2) = MAX\*(A1+P, A3+Y), A'(3) = MAX\*(A1+Y, A3+P).
* Backward: each new metric is the MAX\* of the two branch sums η(s', s) = B(s) + γ leaving the state.

The metrics are normalised every step by subtracting the largest one. The
eight backward branch sums η are also sent to `torbo_llrg`. There they are
added to the forward metrics A(k−1) of the branch's source state. The LLR is
the MAX\* tree over the four input-1 branches minus the one over the four
input-0 branches. `torbo_datapath` adds two outputs:

* W = L − sub, the value passed to the other decoder;
* the hard decision, sign(L).

State metrics start at 0 for state 0 and at −16.0 (the most negative 8-bit
value, standing for −∞) for the other states. Both recursions start this
way, because the two tail words of each block drive the upper encoder back
to state 0.

### Memory schedule

The core of the decoder is a schedule that runs two forward-backward decoders
over one block with only three single-port memories. It has four stages per
iteration (`torbo_ctrl`):

| stage | reads | writes |
|---|---|---|
| FORWARD0 | RAM_A: X1, Y1, Z (k = 1..N+2) | RAM_B: A(k−1); RAM_C: Y2 |
| BACKWARD0 | RAM_A, RAM_B (k = N+2..1) | RAM_C at address I⁻¹[k]: W and the expected bit U |
| FORWARD1 | RAM_C: W (tail X2 at N+1, N+2), Y2 | RAM_B: A(k−1) |
| BACKWARD1 | RAM_C, RAM_B (k = N+2..1) | RAM_A at address I[k]: Z = L − W; error count |

Memories are always read in sequential order. Interleaving and
de-interleaving happen on the *write* side:

* BACKWARD0 writes through the inverse permutation;
* BACKWARD1 writes through the forward permutation.

So the second decoder reads its inputs in interleaved order, and the next
iteration reads its a-priori values in natural order. Both permutations sit
in RAM_B next to the forward metrics. One RAM_B read therefore yields
A(k−1), I[k] and I⁻¹[k] together.

Memory map, with every word 64 bits and addresses starting at 1:

| bank | bytes |
|---|---|
| RAM_A | 0 X1, 1 Y1, 2 Y2, 3 Z, 4 U |
| RAM_B | 0–3 A(k−1) (4 × 8 bits), 4–5 I[k], 6–7 I⁻¹[k] |
| RAM_C | 0 W (or the tail X2 at N+1, N+2), 1 Y2, 2 U |

Each bank is reached through a request bundle `sram_req_t` (ce, we, 17-bit
addr, byte enables, wdata). Read data returns one clock after the request.

Timing:

* A forward stage takes **N+4** clocks: N+2 reads plus the read and pipeline latency.
* A backward stage takes **N+5** clocks, one more for the registered LLR.
* One iteration therefore takes **4N+18** clocks, N/(4N+18) decoded bits per clock.

In the last iteration, BACKWARD1 compares each hard decision with the
interleaved expected bit U and counts the mismatches. The count saturates at
65535.

### Host interface

`torbo_host_if` runs a four-phase handshake in each direction. The host is
assumed to run on the decoder clock.

* **In (32-bit words):**
  1. The decoder raises `wanted_in` and holds it until a word is taken.
  2. The host drives `sun_data_in` and raises `ready_in`.
  3. The word is captured and `wanted_in` falls.
  4. The host drops `ready_in`.
* **Out (16-bit error count):**
  1. `ready_out` rises with the count on `sun_data_out`.
  2. The host raises `ack_out`.
  3. `ready_out` falls.
  4. The host drops `ack_out`.

After reset, `n_in` is sampled and N permutation words are sent,
`{I⁻¹[k][31:16], I[k][15:0]}`. Every block is then N+2 data words,
`{U[24], X2[23:18], Y2[17:12], Y1[11:6], X1[5:0]}`. X2 is used only in the
last two words, and Y1 or Y2 is zero where punctured. `iter_in` (1..31;
0 counts as 1) is taken with the first data word. The permutation is kept
for the following blocks.

## PRONTO-1

### The limiter recursion

The 1-D channel has two states, so only the difference between the two
state metrics needs to be carried. With the MAX approximation, the forward
update of this difference is

    A(k) = clamp(A(k−1), y(k) − 1, y(k) + 1)

`pronto_bmg` forms the two thresholds, with saturation. `pronto_limiter` is
two comparators and two multiplexers; no subtraction is involved. The
output is always a copy of one of its inputs, so errors cannot accumulate
and no normalisation is needed. The noise-variance factor 2/σ² is left out
of the branch metrics. That scales every soft output by σ²/2 but changes no
decision.

The backward recursion has thresholds −(y+1) and −(y−1). This design
computes it on the negated metric B' = −B with the *same* limiter and
threshold pair. The soft output is then formed as L(k) = A(k) − B'(k). One
branch metric generator therefore serves both directions, and the two's
complement is taken once, at the end.

### Sliding window (`pronto_dmfb`)

Each output uses a backward recursion over the next L = 9 samples, starting
from 0 (equally likely states). The design is pipelined so that all L
backward limiters work on L different outputs at once:

* The branch-metric pair (y−1, y+1) enters a 2L-deep shift register.
* Backward stage s (s = 1..L) is a limiter and a register that reads tap
  2(s−1). As a result, a value entering stage 1 meets the samples of its window in
  reverse order as it moves through the chain.
* The forward limiter reads the last tap, 2L−1. It is therefore aligned
  with the backward result leaving stage L.
* The final adder forms A − B'.

The design has 10 limiters and 300 registers:

| part | bits |
|---|---|
| branch-metric shift register (2L × 12) | 216 |
| backward stages (L × 6) | 54 |
| forward metric | 6 |
| output | 6 |
| INIT shift register | 18 |

A one-clock `reset` travels down a 2L-bit shift register alongside its
sample. When it reaches the forward limiter it forces A = y − 1, the known
start state (INIT). This replaces a counter, which would sit in the critical
path.

The latency is **2L+2 = 20** clocks: the soft output for the sample presented
in clock k appears in clock k+20. Reset is asserted together with the first
sample.

### Pins (`pronto1`)

The chip core can run at twice the rate a tester can drive the pins. The
`dbl` pin selects the mode:

* **Single speed** (`dbl = 0`): one sample per clock on `y1` and one soft
  output per clock on `l1`. `l2` is held at 0. Latency is **22** clocks,
  including the input and output registers.
* **Double speed** (`dbl = 1`): `pin_ph` toggles at half the core rate.
  The tester holds a pair (`y1` first, `y2` second) for the two core clocks
  that start at `pin_ph = 0`. The matching soft-output pair appears together
  on (`l1`, `l2`) 23 clocks after the pair was first presented, and is held
  for two clocks.

The clock doubler that makes the core clock is not part of the RTL: `clk` is
the core clock.

## What is not here

* **SRAM chips, memory controller, host link.** TORBO-TM2 originally ran on
  an FPGA board and reached its SRAM through a board-specific controller.
  That controller used a tri-state bus and a control-register format not
  described here. The host link was a generated "nibble bus" adapter. The RTL
  stops at a clean request/read-data port per bank and at the handshake
  above. `tb/tm2_sram_model.sv` is a behavioural SRAM bank for simulation
  only.
* **The PRONTO-1 clock doubler** and pads.
* **Alternatives that were only compared against:**
  * the more memory-efficient three-processor sliding window;
  * the interval-arithmetic (IAU) tree for the detector's backward
    recursion;
  * a lookup-table soft demodulator in front of the turbo decoder.
* **Differences from the original description:**
  * The detector has 300 registers where 301 are quoted.
  * The printed forward recursion of the turbo decoder has A(k−2) as the
    second operand of each MAX\*. This design uses A(k−1) throughout, the
    one-step recursion the trellis and the feedback-register structure
    call for.
  * The host word formats, memory byte map, handshake phases, reset
    behaviour, double-speed pairing and pin registers are this design's
    choices. The original gives only the signal names, widths and memory
    totals.

## Limits

* N ranges from 1 to 65535, set by the 16-bit `n_in`. A 64K (65536)
  interleaver does not fit.
* The 17-bit SRAM address covers N+2 words for every N.
* 1 to 31 iterations.
* Decode time is ITER × (4N+18) clocks after the last data word.
* Simulated sizes: N = 1024 with 10 iterations, and the largest,
  N = 65535, with 3 iterations.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

* **References.** `tb/torbo_ref_pkg.sv` and `tb/pronto_ref_pkg.sv` are
  integer reference models written directly from the equations, together
  with an RSC encoder, a random interleaver and a Gaussian channel. All
  outputs are compared bit for bit against them.
* **Exhaustive tests:** `sat_add` (8 and 6 bits), `maxstar`, `torbo_bmg`,
  `pronto_bmg` and `pronto_limiter`.
* **Random tests:** `torbo_smg`, `torbo_llrg`, `torbo_datapath`.
* **`tb_torbo_ctrl` and `tb_torbo_tm2`** decode noiseless and noisy blocks
  at rate 1/3 and 1/2 with 1–6 iterations. They check:
  * the error count and the final Z values in RAM_A;
  * N+4 / N+5 clocks per stage and 4N+18 per iteration;
  * (`tb_torbo_tm2`) the pin-level handshakes.
* **`tb_torbo_tm2_nmax`** runs the same checks at the largest interleaver,
  N = 65535, with full-depth SRAM models.
* **`tb_pronto_dmfb` and `tb_pronto1`** check every soft output at its exact
  latency, with resets at random times, in both pin modes. On a
  low-noise 1-D channel, the signs must recover the transmitted bits.
* **`tb_fb_vlsi_top`** is the full-size end-to-end test, with every
  parameter at its default. It runs:
  * N = 1024 turbo blocks, rate 1/3 and 1/2 at 10 iterations, with
    full-depth SRAM models;
  * one N = 1024 block at about 1.5 dB Eb/N0, decoded with 1 and then
    8 iterations. In a typical run the errors fall from about 80 to 0, and
    the test requires fewer errors after 8 iterations;
  * 4000 detector samples in each pin mode, at the same time.

  It fails if any of these never happens: a handshake, an iteration past the
  first, an out-of-order interleaved write, puncturing, a block with and one
  without errors, the MAX\* correction, a saturated addition, INIT, each
  limiter case, single-speed outputs or double-speed output pairs.

The reference models were written from the same reading of the equations
as the RTL, so bit-exact agreement does not prove that reading right. The
independent evidence is behavioural:

* noiseless turbo blocks decode without errors;
* iterating removes errors;
* the detector's signs recover the channel bits.

To run one testbench with Verilator (5.x):

    verilator --binary --timing --assert --top-module tb_fb_vlsi_top \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/torbo_pkg.sv rtl/pronto_pkg.sv tb/torbo_ref_pkg.sv tb/pronto_ref_pkg.sv \
        tb/tb_fb_vlsi_top.sv
    ./obj_dir/Vtb_fb_vlsi_top

Every testbench finishes in seconds. The RTL is synthesizable: no
initial values, no delays. Packages `torbo_pkg` and `pronto_pkg` hold the
widths and the memory map.
