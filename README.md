# Segmented scan chains with Embedded Enable Capture Bits

Scan test burns far more power than normal operation: every shift clock toggles long
chains of flops, and every capture clock reloads all of them at once, setting off
switching in the logic behind them. This design cuts both by splitting each scan chain
into **segments** and placing one extra scan flop, the **Embedded Enable Capture Bit
(EECB)**, in front of each segment. The EECB decides whether its segment captures on
the capture clock(s) of the current pattern:

* EECB = 1: the segment captures the functional logic's response as usual.
* EECB = 0: the segment keeps the values that were shifted in. Its flops do not toggle,
  the logic they feed sees no new transitions, and the same low-toggle data that was
  shifted in is shifted out again.

The key property is that the EECBs are *ordinary cells of the scan chain*. Their values
are just bits of each test pattern, so a standard test pattern generator sets them like
any other scan cell: it enables the segments that are needed to observe the targeted
faults and is free to deny the rest. No separate control chain, extra scan pins or
pattern post-processing is needed, and a test-data decompressor can fill the EECBs
along with everything else. The scheme works for single-capture (stuck-at) patterns and
for launch-off-capture (LOC) transition patterns, where the EECB value holds over both
capture clocks.

The RTL here is the scan structure itself: the scan cell, the EECB cell, a segment, a
segmented chain, and a top that spreads a design's scan flops over several balanced,
segmented chains. The functional logic of the circuit under test and the test-data
decompressor are outside it (see "What is not included").

## One segment, cell by cell

Each functional flop is a MUX-D scan flop with a load enable (`scan_dff`): `se` selects
the scan input over the functional input `d`, and the flop loads only while `en` is 1.
In a plain chain every flop's `en` is `enable | se`, where `enable` is a global
functional enable (for example for clock gating or a low-power mode).

A segment (`scan_segment`) adds two things in front of its flops:

```
            +------+     +--------+     +--------+           +--------+
  si ------>| EECB |---->| flop 0 |---->| flop 1 |--> ... -->| flop n |----> so
            +------+  |  +--------+     +--------+           +--------+
              ^   |   |      ^ en           ^ en                 ^ en
              |___|   |      |              |                    |
   (holds when se=0)  +-->[ OR ]--------------------------------+
                             ^
                  enable | se (one OR gate per chain)
```

* The EECB cell (`eecb_cell`) is a MUX-D flop without an enable. With `se = 1` it takes
  its scan input; with `se = 0` its mux feeds its own output back, so it holds through
  any number of capture clocks.
* One two-input OR gate per segment combines the EECB with the chain's `enable | se`
  and drives the `en` pin of every flop in the segment.

The segment's flop enable is therefore:

| se | enable | EECB | flops of the segment |
|----|--------|------|----------------------|
| 1  | x      | x    | shift (EECB shifts too) |
| 0  | 0      | 1    | capture `d` |
| 0  | 0      | 0    | hold (capture denied) |
| 0  | 1      | x    | load `d` (functional operation) |

During test `enable` must be kept at 0, otherwise the EECBs lose control. In functional
operation the EECBs must be 0 so that `enable` alone decides; reset clears them. Neither
rule is enforced in hardware: both are about how the pins are driven.

The cost per segment is one MUX-D flop and one OR gate. When the design already has
enable flops, no logic is added in the functional data paths.

## Chains, segments and the pattern layout

`segmented_scan_chain` splits `CHAIN_LEN` flops into `NUM_SEGS` segments, and
`eecb_scan_top` splits `NUM_FLOPS` flops into `NUM_CHAINS` chains. Both splits use the
same rule (`scan_seg_pkg::part_start`): part *i* of *n* starts at item
`floor(i * total / n)`. Lengths differ by at most one and the longer parts come last.

* Chain *c* holds the flat flop indices `floor(c*F/C)` up to, but not including,
  `floor((c+1)*F/C)`. For 5364 flops in 5 chains this gives 1072, 1073, 1073, 1073, 1073.
* Within a chain of *L* flops, segment *s* covers chain flops `floor(s*L/S)` up to
  `floor((s+1)*L/S) - 1`. A 5-flop chain in 2 segments gives 2 + 3 flops.

A chain is *L + S* cells long, and **loading or unloading it takes L + S shift clocks**;
a top with chains of different length needs (longest chain + S) clocks. Counting scan
positions from the scan input (position 0 next to `si`):

* EECB *s* is at position `floor(s*L/S) + s`;
* chain flop *i* of segment *s* is at position `i + s + 1`.

The bit shifted in first ends up in the last position (next to `so`). For the 5-flop,
2-segment chain the cell order is

```
si -> EECB0 -> SDFF0 -> SDFF1 -> EECB1 -> SDFF2 -> SDFF3 -> SDFF4 -> so
```

so the seven bits shifted in are, in order: SDFF4, SDFF3, SDFF2, EECB1, SDFF1, SDFF0,
EECB0. When unloading, the EECB values come out mixed in with the response bits and are
simply ignored (or compared against what was loaded, since they never change during
capture).

A test cycle is:

1. `se = 1`, `enable = 0`: shift for (longest chain + `NUM_SEGS`) clocks.
2. `se = 0`, `enable = 0`: one capture clock (stuck-at) or two (LOC launch and capture).
   Only segments whose EECB is 1 load `d`.
3. `se = 1`: unload, overlapped with loading the next pattern.

All flops, EECBs included, reset asynchronously to 0 on `rst` (active high).

## Parameters and sizes

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `eecb_scan_top` | `NUM_FLOPS` | 5364 | functional scan flops in the design |
| | `NUM_CHAINS` | 5 | balanced scan chains |
| | `NUM_SEGS` | 6 | segments (and EECBs) per chain |
| `segmented_scan_chain` | `CHAIN_LEN` | 1073 | flops in the chain |
| | `NUM_SEGS` | 6 | segments per chain |
| `scan_segment` | `SEG_LEN` | 179 | flops in the segment |

The defaults are the largest evaluated circuit, a double-precision FPU with 5364 scan
flops in 5 chains, with every chain cut into sixths. That gives segments of 178-179 flops
(quoted as 180), 30 EECBs and 1079 shift clocks per load.

The scheme was evaluated on four circuits, with three segment lengths each. All twelve
are parameter settings of `eecb_scan_top` (5 chains each):

| circuit | scan flops | longest chain | segments/chain | flops/segment | EECBs | shift clocks | EECBs per flop |
|---|---|---|---|---|---|---|---|
| des56 | 312 | 63 | 4 | 15-16 | 20 | 67 | 6.4% |
| des56 | 312 | 63 | 3 | 21 | 15 | 66 | 4.8% |
| des56 | 312 | 63 | 2 | 31-32 | 10 | 65 | 3.2% |
| fm_receiver | 509 | 102 | 4 | 25-26 | 20 | 106 | 3.9% |
| fm_receiver | 509 | 102 | 3 | 34 | 15 | 105 | 2.9% |
| fm_receiver | 509 | 102 | 2 | 51 | 10 | 104 | 2.0% |
| colorconv | 879 | 176 | 4 | 44 | 20 | 180 | 2.3% |
| colorconv | 879 | 176 | 3 | 58-59 | 15 | 179 | 1.7% |
| colorconv | 879 | 176 | 2 | 88 | 10 | 178 | 1.1% |
| fpu_double | 5364 | 1073 | 36 | 29-30 | 180 | 1109 | 3.4% |
| fpu_double | 5364 | 1073 | 12 | 89-90 | 60 | 1085 | 1.1% |
| fpu_double | 5364 | 1073 | 6 | 178-179 | 30 | 1079 | 0.6% |

For the two longer colorconv segmentations the quoted segment lengths are 60 and 90,
a flop or two more than a third or half of a 176-flop chain. This RTL uses the exact even
split.

For orientation, the evaluation (with commercial test generation, real netlists and
switching-activity counting) reported, on top of patterns that were already low-power:

* total test power reductions of roughly 8-22% for the three smaller circuits on
  stuck-at patterns;
* about 33-36% for fpu_double on stuck-at patterns, and 28-38% on transition patterns;
* cell-area overheads of 2.2-5.2%.

One case got worse: fm_receiver transition patterns with quarter- and half-chain
segments. There the pattern count grew by about 20% and total power rose by 2-4%. None of
these power figures can be reproduced by RTL simulation alone.

## What is not included

* **Functional logic of the circuit under test.** `d[]` and `q[]` of every scan flop are
  ports of the top. The testbenches close the loop with a small XOR function.
* **On-chip test-data decompressor.** It is generated by the test tool, and its structure
  is not part of this design. The chain scan inputs `si[]` and outputs `so[]` are ports
  where a decompressor and compactor, or a tester, connect.
* **Test pattern generation.** EECB values come from the patterns; nothing in the
  hardware picks them.
* **Clock gating as the deny mechanism.** Gating a segment's clock instead of using the
  flop enable is a possible alternative. It is not built.

## Design choices not fixed by the scheme

* Reset: asynchronous, active high, clearing every flop and EECB to 0. The reset pin is
  part of every cell, but its polarity and timing are this design's choice.
* Split rule: `floor(i*total/n)`, with the longer parts last. This reproduces the 2+3
  example split and the 62-63 / 101-102 / 175-176 / 1072-1073 balanced chain lengths.
* Flop order: consecutive flat indices form a chain, in index order. A real scan
  insertion would choose the order from placement.
* `eecb[]` and `seg_en[]` are brought out of every level for observation and test. They
  can be left unconnected.
* The EECB mux uses input 0 for the hold feedback and input 1 for scan, the same
  convention as the scan cell (1 = scan).

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_scan_seg_pkg` | the split rule against the balanced chain lengths of all four circuits, the 2+3 example split and 5+2 = 7 shift clocks |
| `tb_scan_dff` | random d/si/se/en against a reference, asynchronous reset |
| `tb_eecb_cell` | shift vs. hold under random se, reset |
| `tb_scan_segment` | a 5-flop segment under random controls against the reference model, per clock |
| `tb_segmented_scan_chain` | the 5-flop, 2-segment example by hand for all four EECB settings (7-clock load, two capture clocks, unload order, functional load/hold), then a 23-flop, 4-segment chain under random operations against the model |
| `tb_eecb_scan_top` | 47 flops, 3 chains, 4 segments, 24 patterns, end to end against per-chain models; counts shift, enabled and denied segment captures, stuck-at and LOC captures, functional load and hold, and reset, and fails if any never happened |
| `tb_eecb_scan_top_full` | the same test with the top at its default size (5364 flops, 5 × 6 segments), 4 patterns |
| `tb_workloads` | all twelve evaluated configurations: load length, bit placement, selective capture, denied segments frozen, segment length against the quoted one, and capture toggles of a random-EECB pattern against an all-enabled one |

Two rules of the scheme are also written as concurrent assertions in the RTL, so they
are checked in any simulation run with assertions on:

* `eecb_cell`: the EECB does not change on a clock with `se` low.
* `scan_segment`: a segment whose enable is low keeps all its flops.

A reset pulse between two clock edges is allowed to clear either.

`seg_chain_model_pkg` (in `tb/`) holds the reference model: a chain kept as a bit array
in scan order, using the position formulas above. `workload_runner` is a helper for
`tb_workloads`. The capture-toggle counts printed by `tb_workloads` come from random
patterns and a stand-in for the logic. They show the mechanism working; they do not
estimate the power of the real circuits.

To run a testbench with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_eecb_scan_top \
  -y rtl -y tb +libext+.sv rtl/scan_seg_pkg.sv tb/seg_chain_model_pkg.sv \
  tb/tb_eecb_scan_top.sv
./obj_dir/Vtb_eecb_scan_top
```

Replace the top module and file for the other testbenches. The full-size test runs in a
few seconds.

## Files

* `rtl/scan_seg_pkg.sv`: split rule and shift-length function
* `rtl/scan_dff.sv`: MUX-D scan flop with load enable
* `rtl/eecb_cell.sv`: Embedded Enable Capture Bit
* `rtl/scan_segment.sv`: EECB + OR gate + `SEG_LEN` scan flops
* `rtl/segmented_scan_chain.sv`: one chain of `NUM_SEGS` segments
* `rtl/eecb_scan_top.sv`: `NUM_CHAINS` balanced segmented chains (top)
