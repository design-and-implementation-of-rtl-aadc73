# Scan-testable Sleep Convention Logic pipeline

Sleep Convention Logic (SCL) is a clockless, self-timed pipeline style for
ultra-low idle power. Every gate has a sleep input that forces it low, so a whole
pipeline stage can be power-gated and reset to its "empty" state in one step.
Testing such a pipeline for stuck-at faults is awkward: there is no clock, and
the logic is spread across handshake elements, latches and gates. This RTL builds
a three-stage SCL pipeline whose registers are made of LSSD-style scan cells.
Its combinational blocks can then be tested with ordinary combinational test
patterns. The handshake elements are tested by sending one DATA/NULL pair
through the pipeline.

The datapath is an example: a 3-bit ripple-carry adder, one bit per stage. The
pipeline structure, the register, completion-detector and C-element behaviour,
and the scan cell interface follow the SCL DFT method. The adder, the scan-chain
order and some glue choices are this design's own (see "Departures and own
choices" below).

## Dual-rail data and the DATA/NULL cycle

Each logical bit travels on two wires, `f` and `t` (`scl_pkg::dual_rail_t`):

| t f | meaning |
|-----|---------|
| 0 0 | NULL (spacer) |
| 0 1 | DATA0 |
| 1 0 | DATA1 |
| 1 1 | illegal in normal operation |

Words move as a DATA wavefront followed by a NULL wavefront. Every gate is a
threshold gate TH*mn* (`scl_th`): its output rises when at least *m* of its *n*
(optionally weighted) inputs are high. No gate inverts, so in the DATA phase
signals only rise and in the NULL phase they only fall. Plain NULL Convention
Logic needs each gate to hold its output until all of its inputs return to NULL.
SCL gates have no such hysteresis. The stage's sleep signal clears them all at
once instead, so the gate is `out = !sleep && (weighted sum >= m)`.

## One stage, and how stages talk

```
        x[i] ──┬──────────► R_i ──► F_i ──► x[i+1]
               │            ▲ s      ▲ s
               ▼            │        │
   s[i-1] ─► CD_i ──cd──► C_i ──► s[i] ───► (CD_{i+1} sleep, C_{i-1} input)
                           ▲
                         s[i+1]
```

* **R_i** (`scl_scan_register`, normal mode = `scl_reg_rail` per rail) is an
  odd latch. While `s` is low, a rail that goes high sets its output. The
  output then stays high even after the input falls. Only `s` high clears it.
* **CD_i** (`scl_cd`) watches the *input* of R_i, not its output (early
  completion). Its first level is one TH12 (OR of the two rails) per bit. Further
  levels of TH22..TH44 (ANDs) merge these, so `cd` rises when every bit holds
  DATA. The detector is put to sleep by the *previous* stage's sleep signal,
  because that is what clears its inputs.
* **C_i** (`scl_c_element`) is a C-element with an inverted output and a reset.
  Its state rises when both inputs are high, falls when both are low, and holds
  otherwise. The inverted output `s[i]` is stage i's sleep signal. It feeds
  R_i, F_i, CD_{i+1} and, as the acknowledge, C_{i-1}. These are the only gates
  that never sleep.

Sequence for one token: CD_i sees complete DATA while stage i+1 sleeps, so
`s[i]` falls. R_i latches the DATA, F_i computes, and CD_{i+1} wakes. Once stage
i+1 has taken the DATA (`s[i+1]` low) and the previous stage has slept (CD_i
cleared), `s[i]` rises again. R_i, F_i and CD_{i+1} then drop to NULL together.
No NULL wavefront has to ripple through the logic.

**Timing assumption.** Because completion is detected at the register input, R_i
must latch its DATA before the previous stage can remove it. That removal takes a
trip through C_{i-1}, R_{i-1} and F_{i-1}, so real hardware meets the assumption
easily. A zero-delay simulator does not. `scl_c_element` therefore puts a
`DELAY` (default 1 time unit) on its output. Synthesis ignores it. With
`DELAY = 0` a simulation can lose tokens.

## Top level: `scl_dft_pipeline`

Parameter `STAGES` (default 3) sets both the number of stages and the adder
width.

| port | dir | meaning |
|------|-----|---------|
| `rst` | in | resets every C-element: all stages asleep, all registers NULL |
| `x_i[6:0]` | in | dual rail: `[0]` carry in, `[1+2j]` = a[j], `[2+2j]` = b[j] |
| `s_i` | in | sender's sleep; clears CD_1 when the sender returns to NULL |
| `k_o` | out | = `s[1]`; high: send DATA, low: send NULL |
| `x_o[3:0]` | out | dual rail: sum[2:0], carry out at `[3]` |
| `k_i` | in | receiver: high requests DATA, low requests NULL |
| `test_mode` | in | M of every scan cell |
| `load`, `cl0`, `cl1` | in | L, CL0, CL1 of every scan cell |
| `scan_in`, `scan_out` | in/out | the single scan chain |

Sender protocol: while `k_o` is high, drive DATA on `x_i` with `s_i` low. When
`k_o` falls, drive NULL with `s_i` high, then wait for `k_o` to rise. Receiver
protocol: keep `k_i` high. When `x_o` is complete DATA, take it and drop `k_i`.
When `x_o` has returned to NULL, raise `k_i`. Several tokens can be in the
pipeline at once, and a slow receiver stalls the sender through `k_o`.

Stage widths (dual-rail bits) with 3 stages are 7, 6, 5 and 4 at the output.
Stage k carries the k−1 finished sum bits, the carry, and the operand pairs still
to be added (`scl_pkg::stage_width`). Each F_k (`scl_adder_slice`) holds one
full adder made of threshold gates and TH11 buffers for the bits passed on:

```
carry.t = TH23(a.t, b.t, c.t)          carry.f = TH23(a.f, b.f, c.f)
sum.t   = TH34w2(carry.f, a.t, b.t, c.t)   (weight 2 on carry.f)
sum.f   = TH34w2(carry.t, a.f, b.f, c.f)
```

## Scan test mode

Each dual-rail register bit is two scan cells (`scl_scan_cell`), one per rail.
With `test_mode = 1`:

* the cell is a pair of level-sensitive latches (LSSD). `cl0` opens the first
  latch to the previous cell's output, and `cl1` copies it to the cell's output.
  Pulse `cl0` then `cl1`, never overlapping, to shift the chain by one cell.
* `load` opens the first latch to the functional input (the rail coming from
  F_{i-1}, or `x_i` for R_1). Pulse `load` then `cl1` to capture responses.
* the registers ignore sleep, and the sleep inputs of all F_i are held low. Each
  F_i is then an ordinary Boolean circuit on each rail, with the rails driven
  independently, so any combinational stuck-at test set can be applied.

Chain order: `scan_in` → R_1 → R_2 → R_3 → `scan_out`. Within a register the
order is bit 0 rail f, bit 0 rail t, bit 1 rail f, and so on: 36 cells in all.
To load cell g with value P[g], shift P[35] first and P[0] last. The response of
F_3 is read directly on `x_o`. A test cycle is: shift in, set `x_i`, wait for
the logic to settle, check `x_o`, pulse `load` and then `cl1`, and shift out.
Reset the pipeline (`rst`) after leaving test mode. The C-elements run freely
during test mode and are in an arbitrary state afterwards.

## What the DATA/NULL pair test catches

The other half of the method: a single complete DATA/NULL pair through the
pipeline exposes every stuck-at fault on the completion C-elements' inputs and
outputs. Every C-element must change state in each phase, so a stuck pin stops
the handshake or corrupts the result. The end-to-end testbench checks this by
forcing faults and running the pair. It confirms, for this RTL:

* stuck-at-0 and stuck-at-1 on the detector input and on the output of C_1, C_2
  and C_3: all caught by the first pair;
* sleep fork into a register stuck-at-1: stall (the register only outputs NULL);
* sleep fork into a register stuck-at-0: the register never returns to NULL.
  The first pair passes, and a second pair with different DATA gives an
  illegal/wrong result. This fault class is the one the scan chain is meant to
  cover;
* a first-level gate of a completion detector stuck-at-0: deadlock;
* sleep fork into a completion detector stuck-at-1: caught. Stuck-at-0 there,
  and on the sleep fork into a combinational block, cannot be seen (redundant /
  untestable), as the analysis predicts.

## Files

| file | content |
|------|---------|
| `rtl/scl_pkg.sv` | dual-rail type, codes, `stage_width()` |
| `rtl/scl_th.sv` | threshold gate TH*mn* with weights and sleep |
| `rtl/scl_reg_rail.sv` | one rail of an SCL register |
| `rtl/scl_and_tree.sv` | THnn (n ≤ 4) AND tree, used by the detector |
| `rtl/scl_cd.sv` | completion detector |
| `rtl/scl_c_element.sv` | completion C-element (inverted output, reset, delay) |
| `rtl/scl_scan_cell.sv` | scan cell (SCL register rail / LSSD latch pair) |
| `rtl/scl_scan_register.sv` | W-bit dual-rail register of scan cells |
| `rtl/scl_adder_slice.sv` | combinational block F_k (example adder) |
| `rtl/scl_dft_pipeline.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog. Files carry no `timescale`; the testbenches assume 1 ns units with
1 ps precision (the C-element tests use half-unit delays). Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    -y rtl -y tb +libext+.sv rtl/scl_pkg.sv tb/tb_scl_dft_pipeline.sv \
    --top-module tb_scl_dft_pipeline -o sim
./obj_dir/sim
```

`tb_scl_dft_pipeline` runs the top at its default size. It sends 350 random
additions through the pipeline with fast and slow receivers, and runs 20 scan
patterns (shift, capture, shift-out, compared with a Boolean model of each
slice). It then runs the fault campaign above. It counts each mechanism
(pipelining with two tokens in flight, back-pressure stalls, registers holding
DATA after their input went NULL, idle sleep, shift, capture, mode switch,
fault detection) and fails if any of them never happened. It takes well under
a second. `tb_scl_dft_pipeline_wide` builds the top with `STAGES = 6` (a 6-bit
adder). It checks 300 additions with at least three tokens in flight at once,
then checks that a bit stream comes back out of the 126-cell scan chain after
exactly 126 shifts.

## Departures and own choices

* **Datapath.** The method is independent of the logic in the stages. The
  adder slices are only an example of unate threshold-gate logic. Replace
  `scl_adder_slice` and `stage_width()` to pipeline another function.
* **Disabling sleep in test mode.** Each F_i's sleep input is `s[i] & ~test_mode`.
  The method asks for the combinational blocks' sleep to be disabled during
  test but does not say how.
* **Scan cell insides.** Only the cell's pins and mode behaviour are specified.
  Here it is an SCL register rail, an LSSD latch pair and a 2:1 multiplexer on
  M. `load` writes the first latch, so a `cl1` pulse must follow it. The SCL
  rail latch keeps following D_in and S during test mode; this is invisible
  because the multiplexer selects the scan latches.
* **Scan-chain order** and the **handshake polarity** of `k_o`/`k_i` (high =
  ready for DATA) are this design's choices.
* **Reset** puts every C-element in the sleep state.
* **C-element delay** exists only to give simulation the SCL timing
  assumption.
* **Not in RTL.** The dynamic-threshold CMOS (DTCMOS) power switch, the
  DTCMOS-based flip-flop and the PFM regulator controller that go with this
  method are transistor-level or mixed-signal parts. Their power savings
  cannot be represented in logic simulation. The test equipment and the
  pattern-generation tool are external; the top testbench plays their role.

## Reading tool output

Synthesis reports latches and combinational loops, and they are intended. The
latches are the SCL register rails, the scan latches and the C-element states.
The loops are the asynchronous handshake rings between neighbouring
C-elements. The design has no clock and no flip-flops.
