# Flip-flop delay-chain Strong PUF

A physical unclonable function (PUF) answers a challenge with a response
that depends on the manufacturing variation of the chip it runs on. This
design is an arbiter-style Strong PUF for FPGAs: two delay paths are
launched by the same edge and an arbiter records which one finishes first.
Unlike the classic arbiter PUF, where each stage only swaps or passes two
wires, every stage here holds **M flip-flops** per path and the challenge
picks **one of them** as that stage's delay. The two paths read the
challenge in opposite stage order, so a stage pairs one of M upper delays
with one of M lower delays: M² combinations per stage, which gives
2·log2(M) bits of entropy per stage under uniformly random challenges.

Default configuration: 64 response bits, 64 stages per path, M = 2,
64-bit challenge, 16,384 delay flip-flops in total.

## How one response bit is produced

```
 START ──► stage 0 ──► stage 1 ──► ... ──► stage N-1 ──► Q^U ─┐
   │       (M FFs+MUX)                                         ├─► NAND latch ─► R
   └─────► stage 0 ──► stage 1 ──► ... ──► stage N-1 ──► Q^L ─┘
```

* **Delay element** (`puf_delay_ff`): a D flip-flop with D tied high. Its
  clock is the signal that arrives from the previous stage, so a rising
  edge on the clock makes Q rise one clock-to-output delay later. CLEAR
  resets it asynchronously.
* **Stage** (`puf_delay_stage`): M elements share one clock and one clear.
  An M:1 multiplexer driven by K = log2(M) challenge bits forwards one
  element's Q to the next stage, where it is the clock. On an FPGA a stage
  with M = 2 fits in one slice: two flip-flops and one MUX.
* **Path** (`puf_delay_path`): N stages in a chain. A START edge ripples
  down the chain. The path output rises after the sum of the delays of the
  selected elements.
* **Arbiter** (`puf_arbiter`): two cross-coupled NAND gates,
  `Z0 = ~(Q^U & Z1)`, `Z1 = ~(Q^L & Z0)`, `R = Z0`. After CLEAR both inputs
  are low and Z0 = Z1 = 1. The first input to rise pulls its gate low and
  locks the other gate high. So **R = 0 when the upper path is faster,
  R = 1 when the lower path is faster**. The later arrival changes nothing.
* **Response cell** (`puf_response_cell`): two paths plus the arbiter.
  **Top** (`strong_puf`): N_BITS cells driven by the same challenge, START
  and CLEAR. The bits differ only because their flip-flops differ physically.

### Challenge order

The challenge has N·K bits. C0 is bit 0. Stage i (0-based) takes the K-bit
field with these indices:

| path  | field used by stage i        | stage 0        | stage N-1 |
|-------|------------------------------|----------------|-----------|
| upper | `C[i*K +: K]`                | C0..C(K-1)     | last field |
| lower | `C[(N-1-i)*K +: K]`          | last field     | C0..C(K-1) |

With M = 2 this means: upper stage i uses Ci, and lower stage i uses C(N-1-i).
A field value of j selects element j of the stage.

### Operating sequence and timing

1. Hold `start` low and pulse `clear` high. All Q go low and every R reads 1.
2. Apply the challenge and release `clear`.
3. Raise `start`. Each cell's response is final when its faster path
   output rises. The whole response is final when every bit of `q_upper`
   and `q_lower` is high. That happens no later than N_STAGES times the
   largest element delay after `start`.
4. Read `response` and go back to step 1 for the next challenge.

There is no clock. The circuit is asynchronous, and whoever drives it
samples `response` after the race. The design has no capture register or
host interface.

## Modelling process variation in simulation

In logic simulation every flip-flop is identical, so every race would tie.
Each delay element therefore gets a simulation-only delay: an inertial
delay on its Q (`assign #(DELAY_PS) q = ...`). `strong_puf_pkg` computes
it from a 32-bit integer hash of the device seed and the element's
position (response bit, path, stage, element):

```
delay_ps = 400 + 3 * h,   h = 4-bit value from hash(seed, bit, path, stage, element)
```

This gives a 400–445 ps spread in 16 steps. The top-level parameter
`DEVICE_SEED` stands for "which chip": two instances with different seeds
behave like two boards carrying the same bitstream. The numbers are
illustrative, not measured. The delays are quantised so that elements
with equal delays share one module specialisation, which keeps Verilator
builds manageable.

Synthesis ignores these delays. On hardware the delays are whatever the
silicon and routing give.

## Building it on an FPGA

All delay elements are logically equivalent: same D, same clear, and in a
stage the same clock. A synthesis tool would merge them and delete the
multiplexers. `puf_delay_ff` therefore marks its register `keep` /
`dont_touch`. That alone is not enough for a working PUF. The upper and
lower paths must be placed and routed symmetrically: one stage per slice,
mirrored slices for the two paths, and fixed, matched routes between
slices. Otherwise a systematic route mismatch dominates the random
variation and the response bits become biased. The RTL contains no
placement constraints. They have to be written for the target device.
For reference, one response bit with M = 2 and 64 stages occupies 128
slices on an Artix-7.

The arbiter is a deliberate combinational loop (an SR latch). Lint and
synthesis tools report it as such.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `strong_puf` | `N_BITS` | 64 | response bits (cells) |
| | `N_STAGES` | 64 | stages per path |
| | `M` | 2 | delay elements per stage and path (power of two, ≥ 2) |
| | `K` | log2(M) | challenge bits per stage |
| | `DEVICE_SEED` | 1 | simulated device; no hardware meaning |
| `puf_delay_stage` | `DELAY_PS` | 400 each | packed per-element simulation delays |
| `puf_delay_ff` | `DELAY_PS` | 400 | simulation delay of one element |

The top's ports are `start`, `clear`, `challenge[N_STAGES*K-1:0]`,
`response[N_BITS-1:0]`, `q_upper[N_BITS-1:0]` and `q_lower[N_BITS-1:0]`.

## Files

`rtl/` holds one unit per file: `strong_puf_pkg` (delay model and
constants), `puf_delay_ff`, `puf_delay_stage`, `puf_delay_path`,
`puf_arbiter`, `puf_response_cell` and `strong_puf` (top).

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_puf_delay_ff` | clear, exact clock-to-Q delay, falling edge ignored, d = 0 |
| `tb_puf_delay_stage` | M = 4: every select value gives exactly that element's delay |
| `tb_puf_delay_path` | 8 stages, M = 4: arrival time of both paths for 40 challenges, including the reversed order |
| `tb_puf_arbiter` | both arrival orders, later arrival ignored, idle R = 1 |
| `tb_puf_response_cell` | 16×M=2 and 8×M=4 cells: path arrival times and R for 60 challenges |
| `tb_strong_puf` | four 16-bit devices (M = 2) plus one M = 4 device: every response bit, settle time, coverage of both race outcomes, every element selected, reversal-dependent bits, devices that differ; prints the uniqueness |

Expected values are recomputed in each testbench from the element delays
(`strong_puf_pkg::element_delay_ps`), the challenge order and the arbiter
rule. They are not read from the design.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/strong_puf_pkg.sv tb/tb_strong_puf.sv --top-module tb_strong_puf
./obj_dir/Vtb_strong_puf
```

`--timing` is required because the element delays are real delays. The
largest configuration simulated is the one in `tb_strong_puf`: four
16-bit devices with 16 stages and M = 2, plus an 8-bit, 8-stage device
with M = 4, for 4,608 delay flip-flops in all. The default 64×64 top has
16,384 delay flip-flops. It lints and synthesises, but its Verilator C++
build takes well over ten minutes. It has not been simulated at that size.

## What the model shows and what it cannot

* **Uniqueness.** Measured on real boards, the average inter-chip Hamming
  distance is about 20 % (ideal 50 %), against about 9 % for a classic
  arbiter PUF on the same FPGA. `tb_strong_puf` reports about 50 % over its
  four simulated devices. That is expected: the hash model has no
  systematic, shared route bias, which is what pulls real devices together.
  The simulated figure says nothing about silicon.
* **Reliability.** Measured reliability is about 96.6 % over 0–75 °C and
  92 % over ±10 % core voltage. The model has no temperature, voltage or
  metastability noise, so every evaluation repeats exactly. Reliability
  cannot be simulated here.
* **Ties.** If both paths arrive in the same simulation step, the zero-delay
  latch settles by evaluation order. In hardware this is the metastable
  case. The testbenches skip such bits.
* **Own choices** (not fixed by the underlying design): CLEAR is active high
  and asynchronous; select value j picks element j; all cells share the
  whole challenge; the response width equals the stage count; R is taken
  from Z0, so R = 0 means "upper faster"; the Q^U/Q^L outputs are exposed
  as settle indicators; the simulation delay model.
* **Not included:** the XOR / lightweight arbiter extensions, which are
  possible on top of this cell but were not designed. Also not included:
  placement and routing constraints and any measurement controller.
