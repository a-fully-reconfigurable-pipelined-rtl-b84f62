# Run-time reconfigurable parallel PRBS generator and self-synchronizing checker

Pseudo-random binary sequences (PRBS) are the usual test patterns for
high-speed serial links. Most PRBS generators fix the polynomial and the
parallel width at synthesis time, so each new pattern means a new FPGA build.
This design makes every property of the sequence a register value:

* the polynomial, and with it the order (up to `MAX_ORDER`, default 32);
* the seed;
* the output width: 1 to `MAX_WIDTH` bits per clock (default 256).

You write the registers, pulse `reconfig`, and an on-chip bootstrap unit
computes all the internal GF(2) matrices itself. Every wide XOR is a pipelined
tree, so the clock rate does not depend on the order or the width. The
generator delivers one full-width word on every clock.

On the receive side, a checker built from the same blocks finds its position
in the received sequence by itself. It does not need the seed. It then reports
every bit error.

The structure is taken from the architecture published as *A Fully
Reconfigurable Pipelined Architecture for FPGA-based Parallel PRBS Test
Pattern Generators*:

* a core and a sequence generator made of masked ("dynamic") XOR gates;
* a bootstrap unit that turns the parameters into masks and preloads the
  pipeline;
* a checker made of a delay line, a comparator, a synchronization FSM and a
  multiplexed state-update path.

That description names these blocks but gives neither equations nor timing.
The equations, the state convention, the timing and all interface details
below are this implementation's own. They are marked as such where it matters.

## Files

| file | contents |
|---|---|
| `rtl/prbs_pkg.sv` | shared functions (XOR tree depth, loop latency) and the register selector enum |
| `rtl/pipe_xor_tree.sv` | pipelined wide XOR: a tree of `FAN_IN`-input XORs with a register after each node |
| `rtl/dyn_xor.sv` | dynamic XOR gate: parity of (inputs AND run-time mask) |
| `rtl/prbs_core.sv` | state register and core XOR array (the feedback loop) |
| `rtl/prbs_seqgen.sv` | bit-sequence XOR array and output register |
| `rtl/prbs_bootstrap.sv` | turns polynomial, seed and width into the masks and the initial states |
| `rtl/prbs_cfg_regs.sv` | polynomial, seed and width registers |
| `rtl/prbs_gen.sv` | the generator: registers + bootstrap + core + sequence generator |
| `rtl/prbs_sync_fsm.sv` | the checker's lock / loss state machine |
| `rtl/prbs_checker.sv` | the self-synchronizing checker |
| `rtl/prbs_err_stats.sv` | counters for checked bits, bit errors, errored words and losses of lock |
| `rtl/prbs_top.sv` | generator and checker + statistics side by side, as at the two ends of a link |
| `tb/prbs_ref_pkg.sv` | bit-serial reference model used by all testbenches |
| `tb/prbs_gen_runner.sv` | testbench helper that runs one generator instance through a list of widths |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_prbs_top_full.sv` at the default sizes |

## Sequence conventions

Everything below depends on these conventions, so they come first.

**Polynomial.** Bit `k-1` of the polynomial register is the coefficient of
`x^k`. The constant term is implied. The order `n` is the position of the
highest set bit plus one. Examples:

| polynomial | register value |
|---|---|
| x^7 + x^6 + 1 (PRBS7) | `0x60` |
| x^15 + x^14 + 1 (PRBS15) | `0x6000` |
| x^23 + x^18 + 1 (PRBS23) | `0x42_0000` |
| x^31 + x^28 + 1 (PRBS31) | `0x4800_0000` |

There is no separate order register: changing the polynomial changes the
order.

**Recurrence.** This is a Fibonacci LFSR. Let `h` be the last `n` bits
produced, with `h[0]` the newest. The next bit is `parity(poly AND h)`, and it
is then shifted in at `h[0]`.

**Seed.** The seed is the initial value of `h`: the `n` bits that precede the
first output word. The first bit sent is therefore `parity(poly AND seed)`,
not a bit of the seed itself. This choice is what lets the checker use the
last received bits directly as its state. An all-zero seed produces all
zeros. The hardware does not reject it.

**Bit order within a word.** With width `w`, `out_word[w-1]` is the first bit
in time and `out_word[0]` the last. Bits `w` and above are zero. A serializer
that sends the LSB first needs the word reversed.

## Dynamic XOR gates and pipelined trees

Every function in the datapath is a GF(2) linear map of the state. A *dynamic
XOR gate* (`dyn_xor`) computes `parity(in AND taps)`. The taps come from a
register, so an array of these gates implements any matrix, and a new matrix
only needs new register values.

A 32-input XOR is too slow as one level of logic. `pipe_xor_tree` therefore
splits it into `FAN_IN`-input lookup-table nodes, each followed by a register:

* The tree has `DEPTH = ceil(log_FAN_IN(N))` levels, each one clock deep.
* At the defaults (`N = MAX_ORDER = 32`, `FAN_IN = 4`), DEPTH is 3:
  32 → 8 → 2 → 1.
* The AND with the mask is folded into the leaf level, so the gate has no
  extra latency.
* `FAN_IN = 6` suits six-input-LUT FPGAs. It gives DEPTH 2 at order 32.

The sequence generator has `MAX_WIDTH` of these gates, one per output bit. The
core has `MAX_ORDER` of them, one per state bit.

## The pipelined feedback loop (prbs_core)

The core is the hardest part to get right. The core register feeds the XOR
array, and the array's result feeds back into the core register. Because the
trees are pipelined, the loop is `LAT = DEPTH + 1` registers long (4 at the
defaults). So the result for the state present at cycle `t` comes back at
cycle `t + LAT`, not at `t + 1`.

The loop is used as `LAT` interleaved generators:

1. Let `A` be one serial LFSR step. One output word advances the state by
   `A^w`.
2. The core array is programmed with `M = A^(w·LAT)`.
3. The bootstrap unit loads `LAT` consecutive states, each one word apart, on
   consecutive clocks: `P0 = seed`, `P1 = A^w·P0`, …, `P(LAT-1)`.
4. The first result to come round the loop is `M·P0 = P(LAT)`, exactly when
   it is due. From then on, the core register shows `P0, P1, P2, …` one per
   clock, with no path longer than one LUT.

The same property makes the checker simple. If the core register is loaded
with correct consecutive states on every clock, and the load path is then
switched off, the loop carries on seamlessly.

Row `k` of `M` is the mask that gives state bit `k`, `w·LAT` steps later. For
a Fibonacci register this is a row of the output recurrence described next,
so the bootstrap can compute it with the same hardware as the output masks.

## Bootstrap unit (prbs_bootstrap)

The bootstrap unit never builds a matrix power. It uses one fact: the mask
`c(i)` that gives "the bit `i` steps after state `h`" follows the LFSR's own
recurrence:

```
c(0)   = e(n-1)                                   (just the oldest history bit)
c(i+1) = (c(i) >> 1) XOR (c(i)[0] ? poly : 0)
```

From these rows:

* Output bit `w-1-j` of a word (its `j`-th bit in time) has mask `c(n+j)`.
* Core row `k` is `c(w·LAT + n-1-k)`.

After `reconfig`, the unit does the following:

1. **Latch and clear (1 clock).** It latches the polynomial, the seed and the
   width. A width of 0 or above `MAX_WIDTH` is clamped to `1..MAX_WIDTH`. It
   clears both mask arrays.
2. **Calculate (`w·LAT + n` clocks).** Each clock it steps the row recurrence
   once and writes the row into whichever array entry is due. In parallel, a
   serial copy of the LFSR runs from the seed and records every `w`-th state.
   These are the `LAT` initial states.
3. **Preload (`LAT` clocks).** It sends the initial states into the core
   register, `P0` first.
4. **Ready.** `ready` stays high until the next `reconfig`.

In the generator, the first valid word leaves `w·LAT + n + DEPTH + 2` clocks
after the edge that takes `reconfig`. At the defaults, with width 256 and
PRBS31, that is 1 062 clocks. From then on `out_valid` is high on every clock.
A `reconfig` is accepted at any time and restarts the unit.

Storage cost: the generator masks take `MAX_WIDTH × MAX_ORDER` flip-flops
(8 192 at the defaults). The core masks take `MAX_ORDER²` flip-flops.

## Self-synchronizing checker (prbs_checker)

In this Fibonacci convention, the state is simply the last `n` bits of the
sequence. So the checker keeps a history register of the last `n` received
bits, bit 0 the newest. After each word it is updated as:

```
hist = ((hist << w) | rx_word)  masked to n bits
```

Under the seed convention above, this history is exactly the core state that
predicts the next word. The blocks:

* **State-register multiplexer.** While `sync = 0` (hunting), the core
  register is loaded with the new history on every clock. This keeps the
  pipelined loop full of consecutive received states. While `sync = 1`, the
  core runs on its own XOR array and ignores the input. Link errors therefore
  show up once and do not spread into later predictions.
* **Delay line.** Received words wait `DEPTH + 1` clocks after the input
  register. Each word then meets the generated word predicted from the history
  just before it.
* **Comparator.** The error word is the generated word XOR the delayed
  received word. A word counts as a match when the error word is zero and the
  history that predicted it is not all zeros. An idle, all-zero link fits
  every polynomial. Without this guard the checker would lock onto it.
* **Synchronization FSM** (`prbs_sync_fsm`). It has three states:

  | state | `sync` | what it does |
  |---|---|---|
  | HUNT | 0 | After `LOCK_WORDS` (4) consecutive matches, goes to VERIFY. |
  | VERIFY | 1 | Checks the next `LAT` words. They come from states loaded just before the switch, whose predictions had not been checked yet. Any mismatch returns to HUNT. |
  | SYNC | 1 | Errors are real link errors. `UNLOCK_WORDS` (4) consecutive mismatching words mean the sequence was lost: `sync_lost` pulses and the FSM returns to HUNT. |

  A word with `rx_valid` low, or a checker that is not configured, forces
  HUNT.

The checker uses the same parameter registers as the generator. The seed is
ignored. `err_word`/`err_valid` are produced only while locked, `DEPTH + 3`
clocks after the word entered. The checker expects a continuous stream of one
word per clock.

Lock time: after `ready`, the checker needs `ceil(n/w)` words to fill the
history, then `LOCK_WORDS + LAT` clean words to lock. On top of that come the
`DEPTH + 3` clocks of pipeline.

## Top level (prbs_top)

`prbs_top` holds the two ends of a link test:

* the generator, with ports `tx_*`;
* the checker, with its error counters, with ports `rx_*` and `stat_*`.

Each end has its own register port (`*_wr_en`, `*_wr_sel`, `*_wr_data`) and
its own `*_reconfig`. Configure the same polynomial and width on both ends.
The serializer, the channel and the deserializer lie between `tx_word` and
`rx_word` and are not part of the RTL. For a loop-back test, connect
`rx_word = tx_word` and keep `rx_valid` high once the generator has started.

Register writes take one clock. `wr_sel` is `prbs_pkg::cfg_sel_e`:

| `wr_sel` | register | reset value |
|---|---|---|
| `CFG_POLY` | polynomial | `0x60` (x^7 + x^6 + 1) |
| `CFG_SEED` | seed | all ones |
| `CFG_WIDTH` | width, from the low bits of `wr_data` | `MAX_WIDTH` |

A typical sequence:

1. Write `CFG_POLY`, `CFG_SEED` and `CFG_WIDTH`.
2. Pulse `tx_reconfig` for one clock.
3. Wait for `tx_valid`.

Nothing is generated after reset until the first `reconfig`.

The statistics counters are 48 bits wide and saturate: checked bits, bit
errors, errored words and losses of lock. `stats_clear` resets all of them.
The bit error ratio is `stat_err_bits / stat_bits`.

Reset is synchronous and active low. It covers the control state only. The
datapath registers are not reset. Their contents are ignored until the
bootstrap has refilled them.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `MAX_ORDER` | 32 | largest polynomial order; width of state, masks and polynomial/seed registers |
| `MAX_WIDTH` | 256 | largest output width in bits per clock |
| `FAN_IN` | 4 | inputs per XOR-tree node (set to 6 for six-input LUTs) |
| `LOCK_WORDS`, `UNLOCK_WORDS` | 4, 4 | checker lock and loss thresholds (`prbs_checker`) |

The defaults are the configuration for which the source reports both its
order sweep and its width sweep. In that source, the throughput at the maximum
clock rate is `Fmax × MAX_WIDTH`, e.g. 552 MHz × 256 bits ≈ 141 Gbps. It also
reports orders up to 64, which need `MAX_ORDER = 64`. That variant is
simulated by `tb_prbs_size_sweep`. Neither the clock rate nor the resource use of this RTL has
been measured on an FPGA.

## What follows the source and what does not

Follows the source architecture:

* The split into core, sequence generator and bootstrap unit.
* Dynamic XOR gates as the only datapath element.
* Pipelined LUT/register XOR trees.
* Polynomial, seed and width as run-time registers, with a reconfiguration
  request.
* A bootstrap unit that both computes the masks and preloads the core
  pipeline.
* The checker's block list: input register, delay, XOR comparator, zero test,
  FSM, and a multiplexed state path selected by `sync`.

Choices made in this implementation:

* The seed and state convention.
* The bit order within a word, read from the parallel-LFSR drawing, where the
  higher output index is the earlier bit.
* The interleaved-state scheme and `M = A^(w·LAT)`.
* The row recurrence and the bootstrap timing.
* The register write port and the reset values.
* Zeroing of unused output bits.
* The FSM's states and thresholds, including the VERIFY state.
* The all-zero guard in the checker.
* The statistics counters.
* `FAN_IN = 4`.

In the checker, the `sync = 1` input of the state multiplexer is fed from the
core XOR array. The original drawing connects it to the generated-sequence
path.

## Verification

Each testbench compares against `tb/prbs_ref_pkg.sv`. This is a bit-serial
model that shares no code with the RTL. Expected masks are derived from it by
linearity: the model is run from single-bit histories.

| testbench | what it establishes |
|---|---|
| `tb_prbs_pkg` | tree depth and loop latency for several shapes |
| `tb_pipe_xor_tree`, `tb_dyn_xor` | parity results and latency for random inputs and masks |
| `tb_prbs_core` | with model masks and preloaded states, the core steps through every following state, one per clock |
| `tb_prbs_seqgen` | output words from model states, widths 64 and 20 |
| `tb_prbs_bootstrap` | every mask row of both arrays, the preloaded states, the exact reconfiguration time, width clamping, restart in mid-calculation |
| `tb_prbs_cfg_regs` | reset values and writes |
| `tb_prbs_gen` | words from register setup to output. Covers x^15+x+1, x^15+x^4+1 and x^15+x^7+1 switched back to back, widths 1, 3, 7 and 32, one word per clock, first-word latency. |
| `tb_prbs_sync_fsm` | lock, failed verification, isolated errors, loss, forced hunt |
| `tb_prbs_checker` | lock without seed at widths above, equal to and below the order. Injected errors appear at the exact bit and clock. A sequence jump causes one loss, then relock. No lock on an all-zero input. |
| `tb_prbs_err_stats` | counters against a testbench count, clear, saturation |
| `tb_prbs_top` | loop-back at `MAX_ORDER=16`, `MAX_WIDTH=32`: reconfiguration, preload, width change, lock, error counting, loss of lock on a polynomial change, relock |
| `tb_prbs_top_full` | the same end to end at the default sizes: PRBS31 at width 256, x^31+x^3+1, PRBS23 at width 16 |
| `tb_prbs_size_sweep` (with helper `prbs_gen_runner`) | generators built with `MAX_ORDER` 8, 16, 32 and 64 at `MAX_WIDTH=256`, each running a polynomial of its full order. The default-size generator also runs widths 16, 32, 64, 128 and 256. |

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

To run one testbench with Verilator 5, from the top of the tree:

```
verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style \
    rtl/prbs_pkg.sv tb/prbs_ref_pkg.sv -y rtl -y tb \
    tb/tb_prbs_gen.sv --top-module tb_prbs_gen -Mdir obj_gen
./obj_gen/Vtb_prbs_gen
```

The full-size top testbench builds in about half a minute and runs in well
under a second.

## Limits

* The checker expects one word per clock with no gaps. A gap drops the lock,
  and the checker then locks again.
* Bit slips are detected as loss of lock followed by relock. The checker does
  not realign within a word.
* The polynomial is not checked: a non-primitive polynomial gives a shorter
  sequence. An all-zero polynomial or seed produces all zeros.
* Changing `width` or the polynomial always needs a full `reconfig`. The
  output is invalid for about `w·LAT + n` clocks while the bootstrap runs.
