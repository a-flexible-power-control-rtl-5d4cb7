# Power-controlled pattern generator for scan-based logic BIST

Pseudo-random scan patterns toggle about half of their bits, so every
scan-shift cycle of a logic BIST run toggles far more flip-flops than the
circuit ever does in normal operation. That burns power the chip was never
designed for, can slow the logic down, and makes good parts fail ("over-testing").
Filtering the patterns down to a very low toggle rate fixes the power problem
but removes randomness, and fault coverage drops. What you want is the *right*
power: a scan-in toggle level you choose per circuit, not the highest or the lowest.

This RTL is a BIST test pattern generator (TPG) that sets the scan-in power to a
programmed level. It has three parts:

* **A pseudo low-pass filter (PLPF) in front of every scan chain.** The filter
  takes the chain's own first flip-flop as the past bit and looks ahead at the
  next one or two pseudo-random bits. It can run as a plain pass-through (50 %
  toggle rate), as an order-1 filter (16.7 %) or as an order-2 filter (7.1 %).
  Two control signals switch it between these modes while the chain shifts.
* **A switch-timing controller.** Each scan-in sequence gets a filtered
  head, an unfiltered middle and a filtered tail. Changing the three part
  lengths moves the average shift power anywhere between the filtered level
  and the fully random level.
* **Three ways to place the middle part.** *Basic* puts it in the same place
  in every chain. *Swap* exchanges head and tail between odd and even chains
  on each pattern. *Moving* slides it one bit per pattern so that every
  flip-flop eventually gets random data.

The method comes from the published work "A Flexible Power Control Method
for Right Power Testing of Scan-Based Logic BIST". This code is an
independent implementation of it.

## Block diagram

```
            +------+   lfsr_state   +-----+  T_j, T_j+1, T_j+2   +-----------------+ scan_in  +-------------+
 start ---> | TPG  |--------------->| PSF |--------------------->| power_ctrl_cell |--------->| scan_chains |---> scan_out
            | LFSR |                +-----+     (per chain)      |  (per chain)    |<---------|  FF0 ... FFn|
            +------+                                              +-----------------+  FF0     +-------------+
               ^ en = scan_en                                             ^ ctrl[2:1]            ^ capture_d   | scan_q
               |                                                          |                      |             v
        +----------------+  shift_idx, capture   +--------------------+   |               (logic under test, external)
        | bist_sequencer |---------------------->| switch_timing_ctrl |---+                      ^
        +----------------+                       +--------------------+                          |
               | capture                          approach, plpf_n, alpha, beta, gamma          |
               v                                                                                 |
          +---------+  pi_pattern -----------------------------------------------------------------+
          | PI LFSR |
          +---------+
```

| Module | What it is |
|---|---|
| `lbist_pkg` | the `approach_e` enum, the LFSR constants, `galois_step`, and `min_part_len` (E_n) |
| `lfsr` | internal (Galois) LFSR; the TPG uses x^16+x^15+x^13+x^4+1 with seed `16'hAAAA` |
| `psf` | phase shifter for filter: the current bit and future bits of each chain, as XORs of LFSR stages |
| `new_plpf` | the filter: an AND bank and an OR bank, with a 2:1 mux selected by the past bit |
| `power_ctrl_cell` | one filter of order N_MAX plus gating that switches future bits off |
| `switch_timing_ctrl` | head/middle/tail placement (Fixed, Basic, Swap, Moving) |
| `bist_sequencer` | runs NUM_PATTERNS tests of CHAIN_LEN shifts plus one capture |
| `scan_chains` | the parallel scan chains. Flip-flop 0 is the scan-in end. |
| `lbist_power_ctrl_top` | wires all of the above together, plus a second LFSR for the primary inputs |

The combinational logic of the circuit under test is not part of this RTL.
The top brings out its stimulus (`scan_q`, `pi_pattern`) and takes its
response (`capture_d`).

## The filter: why AND/OR with a feedback select lowers the toggle rate

Let `S_j-1` be the value in the chain's first flip-flop (the bit shifted in
last). Let `T_j .. T_j+n` be the current bit and the next n bits the
pseudo-random source will produce. The filter computes

```
S_j = S_j-1 ? (T_j | T_j+1 | ... | T_j+n)    // was 1: stay 1 unless all n+1 bits are 0
            : (T_j & T_j+1 & ... & T_j+n)    // was 0: stay 0 unless all n+1 bits are 1
```

So the scan-in stream changes value only when the source shows a run of n+1
equal bits of the opposite value. That works like a low-pass filter on a run
of random bits. With unbiased input bits, the mean distance between output
toggles is E_n = 2^(n+2) - 2:

| n | mode | E_n (bits) | toggle rate | measured (60 000 random bits) |
|---|---|---|---|---|
| 0 | raw PSF bit | 2 | 50 % | — |
| 1 | order-1 filter | 6 | 16.67 % | 16.51 % |
| 2 | order-2 filter | 14 | 7.14 % | 7.15 % |
| 3 | order-3 filter | 30 | 3.33 % | 3.33 % |

The "past bit" is the real first scan flip-flop, not a private register. So
the first bit shifted after a capture is filtered against the captured
response, as in hardware that sits next to the chain.

E_n also sets the smallest useful length of a filtered part. A filtered run
shorter than about E_n bits does not reach the filter's average rate.
`lbist_pkg::min_part_len(n)` returns E_n.

### One filter for all orders (`power_ctrl_cell`)

Each future bit `T_j+k` (k ≥ 1) has a control signal `ctrl[k]`. When
`ctrl[k] = 1`, the bit reaches the AND bank as 1 and the OR bank as 0, so it
no longer affects either bank:

| `ctrl[2] ctrl[1]` | result |
|---|---|
| `11` | both banks reduce to `T_j`, so the raw PSF bit is shifted in |
| `10` | order-1 filter (`T_j`, `T_j+1`) |
| `00` | order-2 filter |

With `N_MAX = 3` (needed for very low targets) there is a third control
signal, and the same rule applies.

## Where the unfiltered bits go: head, middle and tail

A scan-in sequence of L bits is split, in shift order, into:

```
 shifted first ............................................ shifted last
 [ head: gamma bits, order n ][ middle: beta bits, raw ][ tail: alpha bits, order n ]
 ends near scan-out                                         ends near scan-in
```

alpha + beta + gamma = L. Shift power is judged with the weighted transition
metric WTM. A transition that enters the chain at shift t (0-based) toggles
one flip-flop per remaining shift, so it weighs L − t. WTM_in is the weighted
sum over the sequence divided by its maximum, L(L−1)/2.

Count bit positions i = 1..L from the scan-in end, so the tail is
i = 1..alpha. Each position contributes with weight i and with the toggle
probability of its part. The expected scan-in power of a split is then

```
WTM_in = [ 0.0714 * sum_{i=1}^{alpha} i  +  0.5 * sum_{i=alpha+1}^{alpha+beta} i
         + 0.0714 * sum_{i=alpha+beta+1}^{L} i ] / sum_{i=1}^{L} i        (order 2)
```

Choosing (alpha, beta, gamma) for a target WTM_in is an offline step:
evaluate the formula for candidate splits and keep the closest one. The
hardware only applies the split. Bits near scan-out (the head) carry the
largest weights. A raw middle therefore costs the most power when it sits
near the head and the least when it sits near the tail.

Example: b22 uses 92-flip-flop chains and the split (39, 13, 40). The formula
gives 13.1 %. A full 30 000-pattern run of this RTL measures 13.09 % against
a target of 13.12 %.

### The three placement schemes (`switch_timing_ctrl`)

The controller compares `shift_idx` with the head length of each chain. In
the middle part it sets all control signals (raw bits); elsewhere it selects
order `plpf_n`.

* **Basic**: head = gamma in every chain and every pattern. This needs the
  least logic.
* **Swap**: chains whose 0-based index parity differs from the pattern parity
  use (gamma, beta, alpha) instead of (alpha, beta, gamma). So half of the
  chains have the raw part early and half have it late, and this alternates
  per pattern. Over two patterns, every chain gets random data in both places.
  The power peaks of the two chain groups also fall in different cycles.
* **Moving**: the head starts at gamma and grows by one bit at every capture,
  so the raw part slides towards the scan-in end. When the tail would become
  shorter than E_n, the head restarts at E_n. The raw window therefore sweeps
  all positions from E_n to L − E_n. Averaged over a sweep, the power equals
  that of a centred raw part.
* **Fixed**: no raw part; the whole sequence is filtered with `plpf_n`
  (`plpf_n = 0` gives the unfiltered LFSR). This is the single-filter
  generator the schemes improve on. It is also handy for debugging.

`swap_phase`, `mov_head` and `mov_wrap` are brought out of the top so that a
testbench or an on-chip monitor can see the controller state.

## The pattern source: LFSR and PSF

The TPG LFSR is an internal-type 16-bit LFSR. Stage i of `state` is
flip-flop i+1. Stage 0 takes the top stage, and every stage whose x^i term is
in the polynomial XORs the top stage in. The filter needs the bits a chain
*will* receive in the next one or two shifts. Because the LFSR is linear,
each such future bit is an XOR of present stages.

`psf` finds these XOR masks at elaboration time: it steps each unit vector k
times through the LFSR function. Chain c reads stage `(c*TAP_STRIDE) mod 16`.
For a 4-bit LFSR with x^4+x+1 and four chains, this gives the familiar table:
chain 1 gets FF1 / FF4 / FF3, and chain 2 gets FF2 / FF1⊕FF4 / FF3⊕FF4.
`tb_psf` checks that table exactly.

The LFSR advances only in shift cycles, so `T_j+1` is always the next bit
that chain will receive, even across a capture.

## Timing

* `start` is sampled in IDLE or DONE. It pulses `init`, which reloads both
  LFSR seeds and the switch-timing state. The first shift is on the next
  clock.
* Each test is CHAIN_LEN shift cycles (`scan_en = 1`, `shift_idx` =
  0..L−1) followed by one capture cycle (`capture = 1`). The capture cycle
  loads `capture_d` into the chains, steps the PI LFSR and advances the
  Swap/Moving state.
* `done` rises NUM_PATTERNS·(CHAIN_LEN+1)+1 clocks after the start clock. For
  the defaults that is 2 790 001 clocks.
* The filter path is combinational: scan_in for shift t depends on the LFSR
  state and the first flip-flop in that same cycle. The critical path runs
  from the LFSR through the PSF XORs (at most a few levels) and the AND/OR
  banks to the mux.
* `approach`, `plpf_n`, `alpha`, `beta` and `gamma` must stay stable during
  a run. An assertion checks `alpha + beta + gamma == CHAIN_LEN` when `start`
  is given.

## Top-level parameters

| Parameter | Default | Notes |
|---|---|---|
| `NUM_CHAINS` | 9 | b22 benchmark configuration |
| `CHAIN_LEN` | 92 | b22; the published evaluation used chains of 76–182 flip-flops |
| `N_MAX` | 2 | highest filter order; use 3 for targets below about 7 % |
| `NUM_PATTERNS` | 30000 | tests per run |
| `TAP_STRIDE` | 1 | PSF stage spacing between chains |
| `PI_W`, `PI_POLY`, `PI_SEED` | 16, same polynomial, `16'h5555` | primary-input LFSR |

## What is taken from the method and what is chosen here

These parts follow the method:

* the AND/OR/mux filter with the first scan flip-flop as select;
* gating of future bits by control signals, so that one filter covers every
  order;
* the head/middle/tail split and its order (filter, raw, filter);
* the Basic, Swap and Moving behaviour;
* the LFSR polynomial, type and seed;
* 30 000 tests of shift plus capture;
* the b22 sizes used as defaults.

These are choices made here:

* **Filter inputs.** The filter combines *all* bits T_j..T_j+n. This is what
  gives the 1/(2^(n+2)−2) toggle rates above. A version that combines only
  T_j and T_j+n does not.
* **Which code selects order 1.** `ctrl = 10` (only T_j+2 off) gives the
  order-1 filter.
* **Part order.** gamma is the part shifted first and alpha the part shifted
  last. This matches the weighting in the power formula.
* **(alpha, beta, gamma) are inputs, not derived.** The published split
  tables do not always follow the closed forms (for example Basic with
  alpha ≠ gamma), so any split can be programmed.
* **Swap parity.** Chain 0 (the first chain) uses the programmed orientation
  on even patterns.
* **Moving restart.** The head restarts at E_n. The exact restart point is
  not fixed by the method. This choice makes the raw window cover L − 2E_n
  positions.
* **Run-time approach select.** The approach is a run-time input (plus the
  extra Fixed mode), so one build can run every scheme. A product would
  build only the scheme it needs, which is smaller.
* **PSF taps.** One LFSR stage per chain, stride 1. Adjacent chains then
  receive largely shifted copies of one sequence, which is fine for power but
  poor for decorrelating chains. A real phase shifter can be merged in, since
  the future-bit masks are computed for any tap.
* **Primary-input LFSR.** Its width, polynomial and seed are assumptions. It
  steps once per test.
* **Reset and end of run.** Asynchronous active-low reset everywhere, scan
  flip-flops included. No response compactor (MISR) and no final unload
  shift after the last capture.
* **Lengths and orders are build-time parameters.** Other benchmarks need a
  rebuild with their chain length (and N_MAX = 3 for order-3 targets).

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_lfsr`, `tb_pi_lfsr` | seed, hold, init, every step against the written-out polynomial equations, period 65 535 |
| `tb_psf` | the 4-bit example table for all 16 states; for the 16-bit LFSR, that T_j+k equals T_j k steps later |
| `tb_new_plpf` | orders 1–3 bit by bit against the "all bits disagree" rule; toggle rates within 0.4–0.7 points of 1/(2^(n+2)−2) |
| `tb_power_ctrl_cell` | exhaustive over all inputs and control codes |
| `tb_switch_timing_ctrl` | per-chain control signals in every shift of 14 patterns, for all four approaches and orders 1 and 2; Moving restarts and Swap exchanges occur |
| `tb_bist_sequencer` | exact shift/capture sequence, pattern count, run length, restart from DONE |
| `tb_scan_chains` | shift, capture and hold against an array model |
| `tb_lbist_power_ctrl_top` | 9 × 40 chains, 12 tests per run, Fixed / Basic (orders 1 and 2) / Swap / Moving. Every scan-in bit matches an independent model; mechanisms are counted; WTM_in is near the split prediction |
| `tb_lbist_full` | default size, one complete 30 000-test Basic run with the b22 split. Every bit matches the model; WTM_in is 13.09 % (target 13.12 %); runs in a few seconds |
| `tb_workloads` | the ten benchmark scan configurations, rebuilt at their own chain lengths, 3 000 tests per run: unfiltered (50 %), single order-1 and order-2 filters against the published single-filter values, then Basic, Swap and Moving against the target; each within 0.6 points |

WTM_in measured by `tb_workloads` (9 chains per configuration; the chain count
is assumed except for b22):

| Circuit | L | order | target % | Basic % | Swap % | Moving % |
|---|---|---|---|---|---|---|
| s9234 | 76 | 2 | 17.81 | 17.78 | 17.90 | 17.94 |
| s13207 | 96 | 2 | 26.32 | 26.33 | 26.57 | 26.50 |
| s15850 | 100 | 2 | 19.03 | 19.22 | 19.20 | 19.16 |
| s38417 | 182 | 2 | 17.63 | 17.51 | 17.52 | 17.53 |
| s38584 | 97 | 2 | 27.53 | 27.45 | 27.69 | 27.73 |
| b14 | 82 | 2 | 13.14 | 12.76 | 12.84 | 12.84 |
| b15 | 90 | 3 | 5.95 | 5.85 | 5.88 | 5.88 |
| b20 | 98 | 2 | 13.08 | 13.24 | 13.25 | 13.24 |
| b21 | 98 | 2 | 13.08 | 13.24 | 13.25 | 13.24 |
| b22 | 92 | 2 | 13.12 | 13.09 | 13.13 | 13.18 |

All 30 runs land within 0.4 points of their targets. Run alone, the single
filters give 16.57–16.66 % (order 1) and 7.08–7.13 % (order 2) on these
chains. That is 0.03–0.43 points below the published per-circuit values of
16.68–17.01 % and 7.15–7.51 %, which come from captures of real circuits.
Unfiltered chains give 49.98–50.05 %.

What is *not* verified here: fault coverage, scan-out power and peak power.
Each needs the benchmark netlists and a fault simulator, and none of them is
part of this RTL.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lbist_pkg.sv tb/tb_lbist_full.sv --top-module tb_lbist_full -o sim
./obj_dir/sim
```

Replace `tb_lbist_full` with any other testbench name. `lbist_pkg.sv` must
come first, because every module imports it. Only `tb_workloads` needs the
helper `tb/wl_unit.sv`, and `-y tb` finds it.

To use the generator with a real circuit:

1. Set `NUM_CHAINS`, `CHAIN_LEN` and `N_MAX`.
2. Connect `scan_q` and `pi_pattern` to the logic under test, and its
   response to `capture_d`.
3. Pick (alpha, beta, gamma) for your target with the formula above.
4. Pulse `start`.
