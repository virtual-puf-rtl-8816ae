# Virtual PUF — a Loop PUF that answers from a model it builds at power-up

A *strong PUF* authenticates a chip by challenge–response: the server sends a
challenge, the chip's physical randomness decides the answer. A Loop PUF (one
ring oscillator whose n delay elements each take one of two paths, chosen by a
challenge bit) produces a multi-valued raw response, the count difference
`delta_c = count(c) - count(~c)`. Its delay structure is linear, so a
one-bit answer `sign(delta_c)` is easy to learn with machine learning.
*Non-monotonic quantisation* (NMQ) fixes that: the raw axis is cut into Q
intervals labelled 0,1,0,1,…, and with Q = 16 or 32 the bit becomes hard to
model. The price is reliability: with many thresholds, measurement noise
flips a large share of the answers.

The Virtual PUF removes the noise from the answer path. At power-up it
measures the physical Loop PUF once, carefully, and solves for its n delay
differences; every challenge after that is answered from this stored model,
so the same challenge always gets the same bit. What remains is a *mismatch*
between the model built at one power-up and the one the server enrolled,
which the authentication protocol tolerates by asking enough challenges.

This repository holds synthesizable SystemVerilog for the whole datapath and
control, a behavioural timing model of the ring oscillator, and
self-checking testbenches.

## How the model is built

For a challenge written as a ±1 vector `ĉ` (bit 0 → −1), the raw response is
`delta_c = ĉ · D`, with `D` the n path-delay differences. Measuring the n
rows of a Hadamard matrix `H` gives `Δ = H D`, and because `H` is symmetric
with `H H = n I`,

    D_i = (1/n) · Σ_j ( H_ij = +1 ? +Δ_j : −Δ_j )

— no inversion, no multiplier, and the `1/n` is a shift (n is a power of
two). The element `H_ij` is the parity of `i AND j`, a few gates.

`model_builder` runs this in two phases:

1. **Measure.** For each row j it loads the Hadamard challenge
   (`hadamard_gen`) and runs `iter = 2^log2_iter` Loop PUF measurements,
   summing them into `S_j`. Each `S_j` (20 bits) goes into a 64-word
   response store and into `abs_mean`.
2. **Transform.** For each i it walks the store once, adding or subtracting
   `S_j` by the parity of `i AND j`, and writes
   `D_i = (Σ << 4) >>> (log2 n + log2 iter)` — a signed 12.4 fixed-point
   number (12 integer bits, 4 fraction bits, truncated, saturated) — into
   `delay_mem`.

The summed responses are divided by the iteration count in the same final
shift, so averaging costs nothing.

## Thresholds from the folded mean

NMQ needs the spread of the raw responses. Estimating the standard deviation
needs a square root; instead `abs_mean` takes the mean of the absolute
Hadamard responses, `mu_Y = (1/n) Σ |Δ_j|` (for a normal distribution this is
about 0.8 σ, close enough to scale thresholds). The thresholds are then evenly
spaced, `s = mu_Y >> (log2 Q − 2)`, at `0, ±s, ±2s, …, ±(Q/2−1)s` — for Q = 4
simply `{−mu_Y, 0, mu_Y}`.

`nmq` never stores them. It starts from `resp = 1` for a negative response
and `0` otherwise, compares `|delta|` with `s, 2s, 3s, …` one per clock, and
toggles `resp` each time a threshold is passed; after `Q/2 − 1` thresholds
the outermost interval is reached. Seen along the axis, Q = 8 gives the
labels `0 1 0 1 | 0 1 0 1` around zero. A value exactly on a threshold
belongs to the interval nearer zero.

## Answering a challenge

`virtual_puf` computes `Σ_k (c_k ? +D_k : −D_k)` over the delay memory, one
word per cycle (n + 2 cycles), keeping the 4 fraction bits (22-bit result).
`nmq` quantises it with `mu_Y` (same 12.4 scale) and the Q chosen with the
challenge. `puf_interface` and `vpuf_control` do the handshaking and
sequencing.

## Block map

| module | role |
|---|---|
| `virtual_puf_top` | the design; instantiates everything below |
| `vpuf_control` | after reset: sample configuration, build model; then per challenge: infer → quantise → respond |
| `model_builder` | measurement loop, 64×20-bit response store, Hadamard transform |
| `hadamard_gen` | registered Hadamard row as challenge (bit k = parity(row AND k)) |
| `loop_puf` | measurement logic: synchroniser, edge counters, two windows of w cycles, saturating difference |
| `loop_puf_ring` | **behavioural** model of the oscillator (not synthesizable) |
| `abs_mean` | folded mean `mu_Y` in 12.4 |
| `delay_mem` | 64×16-bit model store, one write port, one registered read port |
| `virtual_puf` | model inference, one delay per cycle |
| `nmq` | sequential non-monotonic quantiser, Q ∈ {4, 8, 16, 32} |
| `puf_interface` | challenge/response valid–ready ports |
| `vpuf_pkg` | sizes, `q_sel_e`, `hadamard_bit()` |

## Top-level interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (100 MHz assumed for the timing figures), active-low asynchronous reset; reset release is power-up |
| `cfg_log2_w` | in | 5 | window `w = 2^cfg_log2_w` clock cycles, clamped to 20; sampled at power-up |
| `cfg_log2_iter` | in | 3 | `2^cfg_log2_iter` measurements per Hadamard row, clamped to 4 (16); sampled at power-up |
| `model_ready` | out | 1 | model built |
| `chal_valid/ready`, `chal_data`, `chal_q` | in/out | 1/1/64/2 | challenge handshake; `Q = 4 << chal_q` |
| `resp_valid/ready`, `resp_data` | out/in/out | 1 | response handshake; held until taken |

* **Build time**: exactly `n·(iter·(2w+4)+2) + n·(n+1) + 4` cycles from reset
  release to `model_ready`. For n = 64, iter = 16, w = 2^20 that is
  2,147,492,036 cycles, 21.47 s at 100 MHz; for w = 2^16, iter = 8 it is 0.67 s.
  The measurement term `2·n·iter·w` dominates.
* **Answer time**: at most `n + Q/2 + 8` cycles from the challenge handshake
  to `resp_valid` (88 cycles, 0.88 µs, for Q = 32).
* Challenges offered during the build are held off (`chal_ready` low).

The top parameters are `LOG2_N_P` (6), `LOG2_W_MAX_P` (20),
`LOG2_ITER_MAX_P` (4), `D_FRAC_P` (4: the delay model is 12.`D_FRAC_P`)
and the oscillator model's `RING_*` numbers. The raw-response width (16)
and the 12 integer bits are in `vpuf_pkg`.

## The oscillator model

`loop_puf_ring` stands in for placed delay cells. Path p of element k has
delay `400 ps + u(k,p)`, `u` uniform in ±40 ps from a hash of `SEED`; the
output toggles every `Σ_k delay(k, c_k)` plus a uniform jitter of ±`JITTER`
ps (default 2). With these numbers the loop runs near 19.5 MHz, and a
2^20-cycle window at 100 MHz yields raw responses within ±2^11, the range the
16-bit raw-response path was sized around. These delay numbers, the uniform
(not normal) distribution and the jitter model are inventions for
simulation; on silicon or an FPGA this module is replaced by the real delay
chain. `loop_puf` counts rising edges of the synchronised oscillator output,
which requires the oscillator to run below half the clock frequency.

## Choices this RTL makes on its own

* Counting scheme (two-flop synchroniser and edge counting in the clock
  domain), raw-response width 16 bits with saturation, summed 20-bit
  response words.
* Each Hadamard row is measured `iter` times back to back, not in sweeps.
* Window size and iteration count are run-time inputs sampled at power-up,
  so one build can be configured like the measurement platform that
  produced the latency table; Q is chosen per challenge.
* Valid/ready challenge and response ports with one request in flight. The
  link to the server (probably a serial port on a board) is not modelled.
* The control state machine's states and the registered Hadamard row.
* `mu_Y` kept in the same 12.4 format as the delays.
* NMQ thresholds: `Q/2 − 1` on each side of zero, strictly alternating
  labels, and a value on a threshold assigned to the interval nearer zero
  (so on the negative side the intervals are closed towards zero, the
  mirror image of the positive side).

## Where the RTL departs from the reference implementation

* Inference takes n + 2 cycles instead of n (registered memory read).
* Resource figures of the reference FPGA build (504 LUTs, 507 registers,
  2304 RAM bits) are not matched exactly; the RAM bits are (1280 + 1024).
* Iteration counts above 16 (32 and 64 were also characterised) need
  `LOG2_ITER_MAX_P = 6` (`tb_vpuf_mismatch` runs one such copy); other model precisions are set with `D_FRAC_P`.
* Side channels during the build, reliability-based attacks across reboots,
  temperature effects and the server-side protocol (false acceptance and
  rejection rates versus challenge count and tolerance) are outside the RTL.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it establishes |
|---|---|
| `tb_hadamard_gen` | H_8 rows against the printed matrix; all pairs of H_64 rows orthogonal; symmetry |
| `tb_loop_puf_ring` | half period equals the sum of selected path delays; complementary challenges sum to a constant |
| `tb_loop_puf` | `count(c) − count(~c)` against ideal square waves; latency exactly 2w + 2 |
| `tb_abs_mean` | folded mean for every iteration setting, with saturation |
| `tb_model_builder` | every delay word against an independent Hadamard transform; `mu_Y`; exact cycle count |
| `tb_delay_mem` | write/read-back, read-during-write |
| `tb_virtual_puf` | signed sums against a reference at n = 64 and 8; latency n + 2 |
| `tb_nmq` | 3000 random cases against an interval-based and a closed-form reference, all Q |
| `tb_puf_interface`, `tb_vpuf_control` | handshakes and sequencing |
| `tb_virtual_puf_top` | end to end at default parameters: two power-ups (1 and 2 iterations, w = 2^14), 500 challenges, every response against a model the testbench builds from the observed raw measurements; recovered delays correlate > 0.9 with the oscillator's real path differences (0.9996 observed); exact build cycle count; answer ≤ 1.3 µs; stalls, back-pressure, all Q and the outermost quantile exercised |
| `tb_vpuf_mismatch` | the mismatch experiment: enrol, re-power, 1000 challenges × 4 Q, for a 12.4 and a 12.0 model of the same oscillator, three (iterations, window) settings, and a third copy built for 64 iterations; checks perfect reliability within a power-up, mismatch rising with Q, and falling with more iterations, a larger window and more fraction bits |

With a noisy oscillator (±1 ns jitter per half period), one run of
`tb_vpuf_mismatch` measured, for Q = 4 / 8 / 16 / 32:

| model | iterations | window | mismatch |
|---|---|---|---|
| 12.4 | 1 | 2^13 | 8.2 / 17.6 / 32.8 / 42.8 % |
| 12.4 | 16 | 2^13 | 2.6 / 4.6 / 9.2 / 19.2 % |
| 12.4 | 16 | 2^12 | 2.4 / 6.1 / 14.4 / 27.9 % |
| 12.4 | 64 | 2^12 | 2.3 / 5.3 / 11.3 / 23.1 % |
| 12.0 | 1 | 2^13 | 14.7 / 31.6 / 38.5 / 5.9 % |
| 12.0 | 16 | 2^13 | 7.5 / 13.0 / 27.0 / 62.9 % |
| 12.0 | 16 | 2^12 | 12.1 / 26.6 / 58.5 / 5.4 % |

These numbers describe the simulation model, not silicon, and move by a
few points with the simulator's random seed; the trends (more Q hurts,
more iterations, window and fraction bits help) are the point. The 12.0
model fails badly here because the raw responses of such short windows
are only a few counts wide. With no fraction bits the threshold step for
Q = 32 rounds to one unit or to zero. At zero every answer is fixed by the
sign alone, so that model's small Q = 32 figures are meaningless. The test
applies its trend checks only to the 12.4 models.

The largest window simulated is 2^14 cycles. A build at the full 2^20-cycle
window and 16 iterations is 2.1·10^9 clock cycles; the build-time formula
above, checked exactly at smaller windows, gives its length.

### Running

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv rtl/vpuf_pkg.sv tb/tb_virtual_puf_top.sv \
      --top-module tb_virtual_puf_top -o sim && obj_dir/sim

Replace the testbench name to run another. `tb_vpuf_mismatch` takes about a
minute, the others seconds.
