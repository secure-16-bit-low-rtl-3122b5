# Secure 16-bit pulse-latch shift register with XOR or NOT feedback

A plain latch-based shift register that is reset to zero and fed a constant `1` produces a
pattern anyone can predict: `1000`, `1100`, `1110`, `1111`, ... This design closes the loop
instead. The output of the last stages goes through a small gate and back into the first
latch, so the register cycles through a less obvious sequence. There are two variants of
that gate:

* **XOR feedback.** The first stage takes the XOR of tap stages: a linear feedback shift
  register (LFSR).
* **NOT feedback.** The first stage takes the complement of the last stage: a twisted-ring
  (Johnson) sequence.

The storage elements are unidirectional pulse latches. Latches in odd positions are clocked
by one pulse clock, `CLK_odd`, and latches in even positions by another, `CLK_even`. The
main configuration is 16 bits wide. The top level, `secure_lfsr16_top`, holds one register
of each variant side by side, sharing clock, reset and the two pulse clocks.

## The latch chain and its two pulse clocks

Stage `Qi` (i = 1 .. N) is one `ud_latch`. Stage Q1 takes the feedback gate's output. Every
later stage takes the stage before it, so data moves from Q1 towards QN ("to the right").
Each stage has a differential input pair (D, Db) and complementary outputs (Q, Qb). Each
stage therefore passes both Q and Qb to the next one. The feedback gate also produces its
value and its complement.

The transistor cell behind `ud_latch` is a cross-coupled inverter pair with two pull-downs:
- D pulls Qb low, and Db pulls Q low.
- Both pull-downs are footed by a transistor on the pulse clock.
- A separate device handles reset.

A pulsed latch is transparent only during a pulse that is shorter than its own delay. A chain
of them therefore behaves like a chain of edge-triggered flip-flops: each latch sees its
neighbour's value from before the pulse. The RTL models that behaviour directly:

* `clk` is the system clock. `clk_odd` and `clk_even` are **one-cycle enables sampled on
  the rising edge of `clk`**. They are not separate clock nets.
* A stage whose pulse is high at an edge takes, after that edge, the value its input had
  before the edge. There is one cycle of latency per step.
* **One shift step = one cycle with both `clk_odd` and `clk_even` high.** The whole
  register moves one place, and Q1 takes the feedback.
* With only `clk_odd` high, only Q1, Q3, ..., Q15 move and the even stages hold. With only
  `clk_even` high, the reverse happens. With neither high, everything holds.

This reading of the two clocks is this design's own choice, and it matters. The 4-bit
sequences that define the feedback (below) move the whole register one place per step. Pulses
that alternate between the odd and the even latches cannot produce those sequences: in any
one pulse, half the stages would hold. The register therefore treats a shift step as both
pulses together. The driver may still pulse one half alone. The testbenches exercise all
four pulse combinations.

The circuit that makes the narrow pulses is not part of this RTL. In a pulsed-latch design it
is a delay-based pulse shaper whose pulse width depends on the process. The two pulses
therefore enter as ports of the top, and whoever instantiates the top decides their timing.

Reset (`rst`) is asynchronous and active high, and reaches every stage. Each stage is
loaded with its bit of `RESET_VALUE`.

## Feedback and the sequences it produces

Bit `i` of every vector is stage `Qi`: vectors are declared `[N:1]`. In hex, Q1 is the
least significant bit. In the tables below, states are written Q1 first, left to right.

### 4-bit reference sequences

The feedback rules come from two 4-bit examples, which `lfsr_shift_register_tb` replays
exactly:

| step  | XOR feedback, Q1 ← Q3 ⊕ Q4 | NOT feedback, Q1 ← ¬Q4 |
|-------|----------------------------|------------------------|
| reset | 0001                       | 1101                   |
| 1     | 1000                       | 0110                   |
| 2     | 0100                       | 1011                   |
| 3     | 0010                       | 0101                   |
| 4     | 1001                       | 0010                   |

Each row of the XOR column fits "Q1 takes Q3 XOR Q4, every other stage takes its left
neighbour". No other two-input XOR that includes Q4 fits. The 4-bit XOR register has a
15-step cycle, because x⁴ + x³ + 1 is primitive. The 4-bit NOT register has an 8-step
cycle.

### 16 bits

The 16-bit register keeps the same rule: an XOR of the last two stages, Q15 ⊕ Q16, fed to
Q1. This extension is the design's choice: no 16-bit tap set is given. Two consequences
follow:

* **With the default taps, the XOR register has a 255-step cycle, not 65 535.** No
  two-input (trinomial) feedback of degree 16 is maximal. For a maximal sequence, set
  `TAPS` to four taps, for example Q16, Q15, Q13, Q4 (`16'b1101_0000_0000_1000`, that is
  x¹⁶ + x¹⁵ + x¹³ + x⁴ + 1). The testbench checks that this setting visits all 65 535
  non-zero states. Multi-input XOR feedback of this kind is how the register is meant to be
  made harder to predict.
* The XOR register must never hold all zeros, or it stays there. Its default reset sets
  Q16 only, which mirrors the 4-bit example's `0001`.

The 16-bit NOT register resets to the 4-bit example's `1101` repeated along the chain
(`not_q = 16'hBBBB`). It cycles every 32 steps, twice the width, from any start.

## Modules

| file | what it is |
|------|------------|
| `rtl/lfsr_pkg.sv` | `feedback_e` (`FB_XOR`, `FB_NOT`), `LFSR_WIDTH` = 16, and the default taps and reset patterns as functions of the width |
| `rtl/ud_latch.sv` | one pulse-latch stage: D/Db in, Q/Qb out, pulse enable, asynchronous reset to `RESET_VALUE`. An assertion flags D = Db during a pulse, where the two pull-downs of the real cell would fight; the model then holds its value |
| `rtl/lfsr_feedback.sv` | combinational feedback gate: `^(q & TAPS)` or `~q[N]`, plus its complement |
| `rtl/lfsr_shift_register.sv` | N `ud_latch` stages, odd/even pulse wiring, shared reset, one `lfsr_feedback`. Outputs `q`, `qb` (parallel) and `serial_out` (QN) |
| `rtl/secure_lfsr16_top.sv` | the XOR register and the NOT register side by side |

`secure_lfsr16_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `clk_odd`, `clk_even` | in | 1 | pulse enables for the odd and even stages of both registers |
| `xor_q`, `xor_qb`, `xor_serial` | out | 16, 16, 1 | XOR register: Q1..Q16, Qb1..Qb16, Q16 |
| `not_q`, `not_qb`, `not_serial` | out | 16, 16, 1 | NOT register: the same |

Parameters with their defaults:

| parameter | default | where |
|-----------|---------|-------|
| `WIDTH` | 16 | every module |
| `MODE` | `FB_XOR` | `lfsr_feedback`, `lfsr_shift_register` |
| `TAPS` | Q15 and Q16 | `lfsr_feedback`, `lfsr_shift_register` |
| `RESET_VALUE` | XOR: Q16 only; NOT: `1101` repeated | `lfsr_shift_register` (per stage in `ud_latch`) |

"Serial and parallel operation" here means parallel outputs of all stages plus a serial
output at QN. A parallel load is not provided.

After synthesis, the top is 32 flip-flops plus the two feedback gates and the
complement outputs.

## How far it follows the published design

These parts follow the published design:
- the chain of unidirectional pulse latches with a differential data pair;
- odd positions on `CLK_odd` and even positions on `CLK_even`;
- one reset line to every stage;
- XOR or NOT feedback into the first latch;
- the 16-bit width;
- the two 4-bit sequences, which are reproduced exactly.

These are this design's own choices:
- a shift step is one cycle with both pulse enables high;
- the pulses are enables on a single clock;
- reset is asynchronous and active high;
- the 16-bit taps and reset patterns;
- the differential-input assertion;
- putting both variants in one top.

One drawing of the XOR register labels the first latch's input with the constant `1` of
the conventional register. Here the first latch takes the feedback gate's output, because
that is the stated purpose of the feedback.

Not modelled:
* The transistor-level latch (a 10-transistor cell in a 90 nm process, W/L 120/90, 1.8 V).
  The reported power and delay figures belong to that cell and cannot be reproduced from
  RTL. They are about 5.87 mW (XOR) and 5.25 mW (NOT) at 100 MHz, against 283.8 µW for the
  no-feedback register.
* The pulse-clock generator (see above).
* The no-feedback reference register, which shifts in a constant `1`. It is the point of
  comparison, not part of this design.

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=<n> failures=<m>`.
The `tb/` directory holds:

* `tb/ud_latch_tb.sv`: random data, pulses and asynchronous resets against a one-bit
  reference, for both reset values.
* `tb/lfsr_feedback_tb.sv`: exhaustive 4-bit checks and random 16-bit checks of both gates
  and of a four-tap XOR.
* `tb/lfsr_shift_register_tb.sv`: the two 4-bit sequences and their 15- and 8-step
  cycles; 16-bit registers under random pulse patterns against a reference model; the
  four-tap 65 535-step cycle.
* `tb/secure_lfsr16_top_tb.sv`: the top at its default size with a 10 ns (100 MHz) clock.
  It runs random full steps, odd-only and even-only pulses, idle cycles and mid-run
  resets, and counts each kind. It measures the 32-step NOT cycle and the XOR cycle (255
  steps with the default taps), and checks that the XOR register never reaches all zeros.

With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/lfsr_pkg.sv tb/secure_lfsr16_top_tb.sv --top-module secure_lfsr16_top_tb
./obj_dir/Vsecure_lfsr16_top_tb
```

Replace the testbench name to run another test. Each test finishes in well under a second.
To change the taps or the reset pattern, override `TAPS` or `RESET_VALUE` on
`lfsr_shift_register`. Widths from 2 to 64 are accepted; the package functions that compute
the defaults cover up to `LFSR_MAX_WIDTH` = 64.
