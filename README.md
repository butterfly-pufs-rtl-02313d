# Butterfly PUF and hybrid arbiter-butterfly PUF for FPGAs

A physical unclonable function (PUF) turns tiny, uncontrollable differences
between chips into a device-specific bit pattern. No key is stored. The
pattern is re-created each time it is needed, and a copied bitstream on
another FPGA gives different bits.

A **butterfly cell** gets this behaviour from ordinary FPGA latches. Two
D latches are cross-coupled: each latch's data input is the other latch's
output. A shared *excite* signal clears latch 1 and presets latch 2. While
excite is high, the pair is forced into a contradictory state: latch 1 is 0,
latch 2 is 1, and each holds the opposite of its own data input. When excite
falls, both latches are released at once and start copying each other. The
latch that finishes switching first wins, and the pair settles on the value
it carries:

| who finishes first | latch 1 (response) | latch 2 |
|---|---|---|
| latch 1 | 1 | 1 |
| latch 2 | 0 | 0 |
| exact tie, identical latches | toggles every switching delay | toggles |

Which latch is faster depends on manufacturing variation. So a cell gives a
repeatable bit on one device, and that bit can differ on another device.

This repository holds synthesizable SystemVerilog for two PUFs built from
such cells:

* **Array8 butterfly PUF** (`bpuf_array`): eight independent cells read
  together. It has one response word per device, so it is a *weak* PUF with
  no real challenge.
* **Hybrid arbiter-butterfly PUF** (`abpuf`): a 64-stage arbiter-PUF delay
  chain drives a butterfly cell, which takes the place of the arbiter. The
  challenge selects the paths the falling edge takes to the two latches, so
  the skew between clear and preset depends on the challenge. This gives a
  *strong* PUF with 2^64 challenges.
* **Two-stage series butterfly PUF** (`bpuf_2stage`): a second cell whose
  excite is a latch output of the first. It is the cascade studied before
  the parallel array was preferred, kept for comparing the two.

`puf_top` puts all three side by side with separate ports.

## Why the RTL carries delays

A PUF's whole function lies in timing that RTL cannot express: which of two
nominally identical latches switches first. In a zero-delay simulation,
every cell is perfectly symmetric, and the result is either an artefact of
the simulator's evaluation order or an endless toggle. To make the design
testable, every element whose timing matters carries a **simulation-only
inertial delay parameter**:

* `bpuf_latch.SWITCH_PS` is the time from a change of the latch's function
  (release of clear or preset, or a new D while transparent) to the change
  of Q. The default is 1900 ps, the switching time seen in the
  post-implementation timing of an Artix-7 latch.
* `bpuf_cell.EXC_CLR_PS/EXC_PRE_PS` are the routing delays from excite to
  latch 1's clear and to latch 2's preset. The default for both is
  2086 ps, the matched value of the reference Artix-7 layout.
  `bpuf_array.EXC_PS` gives one such delay per cell.
* `apuf_stage.P_PS/S_PS/Q_PS/R_PS` are the four timing arcs of one chain
  stage. The default is 0, an ideal symmetric stage.

All of them except the latch delay are built from `wire_delay`, which is a
plain wire in hardware and an inertial delay in simulation.

Each delay is *inertial*: a change that reverses before the delay has
elapsed never reaches the output. This is what makes a race settle. Suppose
latch 1 finishes first. Its new value reaches latch 2's D input before
latch 2 has finished moving the other way, which cancels that pending
change. With transport delays the pair would pass a pulse back and forth
forever instead.

Synthesis ignores every delay. In hardware the parameters mean nothing, and
the real race is decided by the silicon. In simulation, a set of delay
values stands for **one device**. Testbenches build several "devices" by
passing different delay sets. The defaults stand for a device with no
variation at all. At the defaults every cell oscillates with a 1.9 ns period
once released, as a variation-free timing simulation of the real design
does. The series PUF is the exception. Its second stage is never released,
because its excite route filters out the short pulses of the oscillating
first stage.

## The butterfly cell (`bpuf_cell`, `bpuf_latch`)

`bpuf_latch` is a D latch with asynchronous clear and preset and a
gate/gate-enable pair, like the FPGA latch primitive (LDCPE) the cell maps
to. Clear wins over preset; otherwise it is transparent when `g & ge`.

`bpuf_cell` wires two of them:

```
excite ──┬────────────> CLR  latch 1  Q ──┬──> out
         │        ┌───> D    (PRE = 0)    │
         │        │                       │
         │        └──── Q    latch 2  D <─┘
         └────────────> PRE  (CLR = 0)         q2 = latch 2 Q
```

Both gates are tied open. There is no clock.

Timing at the ports (latch delays T1, T2; excite routes Rc to the clear
and Rp to the preset):

* excite rises: `out` falls Rc + T1 later and `q2` rises Rp + T2 later
  (unstable mode).
* excite falls: latch 1 would finish at Rc + T1 and latch 2 at Rp + T2, and
  the earlier one wins. With matched routes this is just T1 against T2. If
  T1 < T2, `out` rises Rc + T1 after the fall and stays 1. If T2 < T1, `q2`
  falls Rp + T2 after the fall and `out` stays 0. If the two totals are
  equal and T1 = T2, both toggle every T1 until excite rises again.
* Unequal routes are a static skew. A skew larger than the latch
  difference decides the bit by itself, the same way on every chip. The
  cell testbench has a device whose latches tie but whose clear route is
  86 ps shorter, and it always reads 1.
* The response is valid once the slower of the two possible switchings has
  had time to finish. In practice, read it a few switching delays after the
  fall. The tests read it 150 ns later, the hold time of the excite pattern
  used with the hardware.

**Implementing it on an FPGA.** The loop through the two latches is a
combinational loop, and tools report it. That is the circuit. Tied-open
gates let synthesis see each latch as a plain mux, so the instances carry
`dont_touch` to keep them as latch primitives. The build must allow the
loop. It must also route excite to latch 1's clear and to latch 2's preset
with equal delay, and route Q1→D2 and Q2→D1 with equal delay. Otherwise a
static skew, the same on every chip, decides the bit, and the PUF loses its
uniqueness. The RTL cannot enforce any of this. It is a placement and
routing job.

## Array8 (`bpuf_array`)

`N` cells (default 8), with no shared state. Bit *i* of `excite` drives cell
*i* and bit *i* of `outt` is its response. In the reference implementation
all eight cells hang on one EXCITE pin. Driving all bits of `excite`
together reproduces that. Driving them separately re-excites single cells
while the others hold.

Operation: drive `excite = '1` and wait. `outt` reads all zeros. Then drive
`excite = '0`, wait, and read `outt`. The word is the device's fingerprint.
Reading it again gives the same word, a within-device Hamming distance of 0.
Another device gives a different word.

## Two cells in series (`bpuf_2stage`)

Stage 2's excite comes from stage 1. `TAP` selects which latch of stage 1
drives it:

* `TAP = 2` (default): stage 1's latch 2. While excite is high that latch
  is preset, so stage 2 is held unstable too and `out` is 0. After excite
  falls:
  * if stage 1's latch 1 wins, stage 1 settles to 1. The link stays high,
    stage 2 stays held, and `out` = 0;
  * if stage 1's latch 2 wins, stage 1 settles to 0. The link falls and
    releases stage 2, whose own race decides `out`.
* `TAP = 1`: stage 1's latch 1, its response. Stage 2 is excited only when
  stage 1 settles to 1. It resolves only when that link falls again, which
  is on the next rising edge of excite, when stage 1 is cleared. Until then
  stage 2 keeps its last value. This dependence on particular excite
  transitions is why this variant was dropped.

With `TAP = 2`, a response of 0 happens with probability

```
P(0) = p1 + (1 - p1) * (1 - p3)
```

where p1 is the chance that stage 1's latch 1 finishes first and p3 the
same for stage 2. With p1 = 60 % and p3 = 40 %, P(0) = 84 %. Other
combinations give P(0) anywhere from 46 % to 95 %. So adding a stage makes
the bit more predictable in some cases and less in others, depending on
how the two stages are biased. `tb_bpuf_2stage` simulates the four race
orders and weights them with five such probability sets plus that example.

## Hybrid arbiter-butterfly PUF (`abpuf`, `apuf_stage`)

```
start ─┬─ top ─[stage 0]─[stage 1]─ … ─[stage 63]─ top ──> CLR latch1 ┐
       └─ bot ─[  c0   ]─[  c1   ]─ … ─[  c63   ]─ bot ──> PRE latch2 ┘ butterfly pair ─> response
```

Each `apuf_stage` passes its two inputs straight through for challenge bit
0 and crosses them for 1. It uses two levels of NAND gates:
`p = ~(~c & top)`, `s = ~(c & bot)`, `top' = ~(p & s)`, and the same for
the bottom path with `q` and `r`. An edge entering on top leaves on top
through arc *p* (c = 0) or on bottom through arc *r* (c = 1). An edge
entering on bottom leaves through *q* or *s*. The arrival times of the
falling edge follow

```
c = 0:  top' = top + P,  bot' = bot + Q
c = 1:  top' = bot + S,  bot' = top + R
```

and the chain skew is dTa = t_bot − t_top.

The butterfly pair is wired as in the single cell, except that its clear and
preset come from the two chain outputs. Latch 1 finishes at
t_top + dTb1 and latch 2 at t_bot + dTb2:

* dTb1 < dTa + dTb2: latch 1 wins, response 1;
* dTb1 > dTa + dTb2: latch 2 wins, response 0;
* exact tie: both latches swap at the same instant. One switching delay
  later, the faster latch copies the other's new value first and decides
  the bit. The response is 1 if latch 2 is the faster latch, 0 if latch 1
  is. Identical latches keep toggling.

Protocol: hold `challenge` steady and raise `start`. Wait for the chain
(≈ STAGES × arc delay) plus a switching delay; `response` is 0. Lower
`start`, wait, and read `response`. There is no handshake. The caller owns
all timing.

The chain length is a parameter (`STAGES`, default 64). Chip-to-chip
variation of the arcs makes the challenge-to-response map device-specific.
The butterfly pair hides which path arrived first behind its own latch
variation.

## Where this design departs from, or adds to, its source

* **Delay parameters** on latches and arcs exist only to simulate process
  variation (see above). The latch default is the 1.9 ns published switching
  time. The arc defaults (0) are not from the source.
* **Clear has priority over preset** in `bpuf_latch`. The cells never assert
  both, so this does not change their behaviour.
* **Excite is a vector** in `bpuf_array`. The published 8-bit and 4-bit
  implementations use one EXCITE pin; the description of the 8-bit array
  also speaks of an 8-bit excite vector. Tie the bits together for the
  single-pin form.
* **Active-high clear/preset in the hybrid PUF**, as in the single cell. One
  description of the hybrid calls them active low and tied to Vcc, which
  contradicts the rest of its own description.
* **Chain length 64**, one stage per challenge bit. The published arbiter
  PUF the hybrid builds on has 64 stages. The hybrid's description mentions
  both N and N−1 multiplexer stages.
* **Exact ties** in the hybrid are resolved by the second round as described
  above. The published case analysis says a tie gives 1. The model agrees
  only when latch 2 is the faster latch.
* `q2` outputs on the cell, array and hybrid expose latch 2 for tests.
* **The series PUF is included** even though it was set aside in favour of
  the parallel array. Its two wirings are one module with a `TAP`
  parameter. While its second stage is waiting, it keeps its last value.
  Real hardware would be in an undefined state there.
* **Excite routes are per cell, not per latch, in the array.** The
  reference 4-bit build put two pairs of cells in two logic blocks, with
  2.317 ns and 2.038 ns from excite to each block. Which cells share a
  block is not known, and `tb_hd_eval` assumes cells 0-1 and 2-3. The
  latch-to-latch (Q→D) routing is folded into the switching delays.
* Not built: the FPGA pad buffers (left to the tools), the challenge/response
  database a verifier keeps, and the offline Hamming-distance analysis. The
  last is reproduced in a testbench. Also not built: the stand-alone
  arbiter PUF with a latch arbiter, which only serves as the hybrid's
  starting point.
* Not modelled: noise. Every simulated device answers the same way every
  time. On one real board, 2 of 50 readings differed from the usual word,
  but the model gives a within-device distance of exactly 0. Temperature is
  approximated only by scaling all delays together, which cannot change any
  race's winner.

## How far it can be trusted

The logic of every block is checked by its testbench against values worked
out independently: truth tables, arc-by-arc arrival times, and race outcomes
predicted from the delay parameters. Each testbench has been shown to fail
on a deliberately broken copy of its block. What the simulations cannot
show is how a real FPGA behaves. That depends on placement, routing
symmetry and the silicon. The RTL fixes the structure only, and whether a
built device yields useful, stable bits has to be measured on hardware.

## Files

| file | what |
|---|---|
| `rtl/bpuf_pkg.sv` | sizes, nominal latch delay, outcome enum |
| `rtl/bpuf_latch.sv` | clear/preset D latch with switching delay |
| `rtl/bpuf_cell.sv` | one butterfly cell |
| `rtl/bpuf_array.sv` | N parallel cells (Array8) |
| `rtl/wire_delay.sv` | inertial route/arc delay (a wire in hardware) |
| `rtl/bpuf_2stage.sv` | two cells in series |
| `rtl/apuf_stage.sv` | one NAND switch stage of the chain |
| `rtl/abpuf.sv` | hybrid arbiter-butterfly PUF |
| `rtl/puf_top.sv` | the three PUFs side by side |
| `tb/tb_bpuf_latch.sv` | latch function table, delay and filtering |
| `tb/tb_bpuf_cell.sv` | 100-sample excite pattern (150 ns per level) on four devices: latch 1 faster, latch 2 faster, matched, matched with a route skew |
| `tb/tb_bpuf_2stage.sv` | the four race orders of the series PUF, its zero-probability table, and the latch-1 tap |
| `tb/tb_bpuf_array.sv` | 8-cell device, shared and per-cell excitation |
| `tb/tb_apuf_stage.sv` | switch function and the four arc delays |
| `tb/tb_abpuf.sv` | 200 random 64-bit challenges against the arrival-time prediction |
| `tb/tb_puf_top.sv` | two devices end to end: array fingerprints, within/between-device distance, hybrid responses, series PUF released and held; counts each mechanism |
| `tb/tb_puf_top_full.sv` | `puf_top` at its defaults: unstable mode, then 1.9 ns oscillation in every cell, series PUF held |
| `tb/tb_hd_eval.sv` | 4-bit evaluation: two boards (1111 and 1101), 50 excitations each, distance histograms, reliability across a delay corner, two excite-route delays |
| `tb/tb_puf_pkg.sv` | delay generator, Hamming distance, race predictor |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_puf_top \
    rtl/bpuf_pkg.sv tb/tb_puf_pkg.sv rtl/*.sv tb/tb_puf_top.sv
./obj_dir/Vtb_puf_top
```

Replace `tb_puf_top` with any other testbench name. Packages must come
first on the command line. `--timing` is required, because the delays are
the model. Everything runs in well under a second.

To model another device, pass different delay arrays to `puf_top`
(`ARRAY_L1_PS`, `ARRAY_L2_PS`, `ARC_*_PS`, `AB_L1_PS`, `AB_L2_PS`,
`TS_*_PS`). `TS_TAP` selects the series PUF's wiring.
`tb_puf_top` shows how to generate them from a seed with a constant
function.
