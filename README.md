# Single-cycle decision-tree ransomware classifier

This design classifies a process snapshot as **benign** or **ransomware** in one clock
cycle. It takes six memory-forensics features, such as the number of shared-process
services or of mutant handles, as read from a memory image. It runs them through a
decision tree that was trained offline and is hard-wired here as comparators. All the
tree's decision nodes are evaluated in parallel. A small priority network then picks the
leaf the tree would reach, and a single register holds the answer. Throughput is one
sample per clock and latency is exactly one clock. At the 50 MHz clock of the reference
FPGA board that is 20 ns per sample. There is no memory, no arithmetic beyond compares
and one subtraction, and no control state.

## The tree that is built in

The tree was trained on a balanced set of benign and ransomware memory dumps (13,706
training samples reach the root). Each node tests `feature <= threshold`. The "true" side
goes on down the tree, and the counts are training samples as `[benign, ransomware]`:

| node | test (real units)                                | true →                       | false →                        |
|------|--------------------------------------------------|------------------------------|--------------------------------|
| N1   | `svcscan.shared_process_services <= 116.5`        | N2                           | **benign** leaf 0 `[6822, 0]`  |
| N2   | `svcscan.process_services <= 25.0`                | N3                           | **benign** leaf 1 `[27, 0]`    |
| N3   | `handles.nevent <= 3368.5`                        | N4                           | N6                             |
| N4   | `handles.nthread <= 886.5`                        | **ransomware** leaf 4 `[0, 6791]` | N5                        |
| N5   | `handles.nmutant <= 262.0`                        | **benign** leaf 5 `[1, 0]`   | **ransomware** leaf 6 `[0, 61]` |
| N6   | `psxview.not_in_ethread_pool_false_avg <= 0.041`  | **ransomware** leaf 2 `[0, 1]` | **benign** leaf 3 `[3, 0]`   |

The leaf numbers 0..6 are the ones the testbenches report.

## Number format

Every feature is a **signed 32-bit fixed-point number holding round(x × 1000)**. The
thresholds therefore become integers:

| name | feature (input struct field)                   | real threshold | constant |
|------|-------------------------------------------------|---------------:|---------:|
| F1 / T1 | `svcscan_shared_process_services`            | 116.5   | 116500  |
| F2 / T2 | `svcscan_process_services`                   | 25.0    | 25000   |
| F3 / T3 | `handles_nevent`                             | 3368.5  | 3368500 |
| F4 / T4 | `handles_nthread`                            | 886.5   | 886500  |
| F5 / T5 | `handles_nmutant`                            | 262.0   | 262000  |
| F6 / T6 | `psxview_not_in_ethread_pool_false_avg`      | 0.041   | 41      |
|  REF_VALUE | (used with F5)                            | 0.1     | 100     |
|  TOLERANCE | (used with F5)                            | 2.0     | 2000    |

The integer constants are those of the trained model. The ×1000 scale is implied by them
(116.5 → 116500, 0.041 → 41), and the design assumes it. Converting and rounding the
features is the job of whatever feeds the classifier. Values above about 2.1 million in
real units do not fit and must be saturated by the feeder. Every threshold is an exact
multiple of 0.001, so a real value and its rounded fixed-point value fall on the same
side of each threshold. The one exception is a value just above a threshold that rounds
*onto* it, e.g. 0.0414 → 41. Such a value can take the other branch, and this
is the source of the small accuracy loss that fixed point brings.

## Datapath

```
features ──► C1  F1 >  T1 ─┐
         ──► C2  F2 >  T2 ─┤
         ──► C3  F3 >  T3 ─┤
         ──► C4  F4 >  T4 ─┤                         ┌──────────┐
         ──► C4a F6 <= T6 ─┼──► priority decision ──►│ output   ├─► ransomware
         ──► C5  F5 >  T5 ─┤                         │ register ├─► within_tol
   F5 ──► F5 - REF ──► |·| ──► C6  < TOLERANCE ──────┘──────────┘
```

* **Comparators** (`threshold_cmp`). Each one is a signed compare against a parameter
  constant, which synthesis turns into a carry chain or a few LUTs. C1..C5 and C4 test
  the "false" side of a node (`>`). C4a tests the "true" side of N6 (`<=`). The polarity
  only changes how the priority logic reads the flag.
* **Priority decision** (`priority_decision`). This is the tree rewritten as an if/else
  chain, in the order in which the paths leave the tree:

  ```
  C1            → benign
  else C2       → benign
  else C3       → C4a ? ransomware : benign
  else !C4      → ransomware
  else C5       → ransomware
  else          → benign
  ```

  The chain does the tree's job, but as one flat level of logic after the comparators,
  not as a walk from node to node.
* **Tolerance path** (`ref_subtractor` → `abs_unit` → `tolerance_cmp`). This path flags
  samples whose F5 lies within 2.0 of 0.1, that is `|F5 − 100| < 2000` in fixed point.
  The subtractor keeps one guard bit (33 bits), so the difference and its magnitude are
  exact for every input. **The trained tree has no node for this flag, and nothing
  defines how it should change the class.** This design therefore leaves the class to the
  tree alone. The flag goes out as a second registered output, `within_tol`, for whoever
  wants to use it. To make it part of the decision, edit the one `always_comb` in
  `priority_decision.sv`.
* **Output register** (`output_register`). It captures `{within_tol, class}` on every
  rising edge and is reset asynchronously to 0 (benign).

### Timing

There is one register stage, so a sample applied before a rising edge has its class on
`ransomware` right after that edge. The critical path is the F3 or F4 comparator, then
the priority chain, then the register. The tolerance path runs in parallel through a
33-bit subtractor and a negation. It is the longest arithmetic path, but it only drives
`within_tol`. The clock period must cover that delay plus register setup, skew and
jitter. At 50 MHz there is ample slack on a mid-range FPGA.

## Interface (`rd_classifier_top`)

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock (50 MHz on the reference board) |
| `rst_n`      | in  | 1     | asynchronous reset, active low; clears both outputs |
| `features`   | in  | 192   | `rd_pkg::feature_vec_t`: F1 in bits 191:160 … F6 in bits 31:0, each signed ×1000 |
| `ransomware` | out | 1     | registered class: 1 = ransomware, 0 = benign |
| `within_tol` | out | 1     | registered tolerance flag: F5 within 2.0 of 0.1 (`abs(F5 − 100) < 2000`) |

There is no valid/ready handshake. The classifier accepts a new sample on every clock,
and an external counter or FIFO can track which output belongs to which sample (always
the one presented one cycle earlier).

## Files

| file | contents |
|------|----------|
| `rtl/rd_pkg.sv` | feature struct, thresholds, reference/tolerance, comparator-mode and class enums, flag struct |
| `rtl/threshold_cmp.sv` | one decision-node comparator (`>` or `<=` against a constant) |
| `rtl/ref_subtractor.sv` | F5 − reference, 33-bit signed |
| `rtl/abs_unit.sv` | absolute value |
| `rtl/tolerance_cmp.sv` | C6, magnitude < tolerance |
| `rtl/priority_decision.sv` | comparator flags → class |
| `rtl/dt_inference_datapath.sv` | the whole combinational datapath |
| `rtl/output_register.sv` | output register with async reset |
| `rtl/rd_classifier_top.sv` | top: datapath + output register |
| `tb/rd_ref_pkg.sv` | reference tree walk in real arithmetic, stimulus generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each module has a self-checking testbench. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected results never reuse the
RTL's arithmetic. Compares and differences are recomputed in 64-bit integers, and the
classification reference (`rd_ref_pkg::ref_classify`) walks the tree on real numbers,
`value / 1000.0`, against the real thresholds listed above.

* `tb_threshold_cmp`, `tb_ref_subtractor`, `tb_abs_unit`, `tb_tolerance_cmp` test the
  exact threshold, ±1, the 32/33-bit extremes and random values.
* `tb_priority_decision` tests all 128 flag combinations.
* `tb_output_register` tests capture, hold, one-cycle delay, and reset both at and
  between edges.
* `tb_dt_inference_datapath` uses 7000 samples aimed in turn at each of the seven leaves.
  Many values sit on or next to a threshold, and F5 often falls inside the tolerance
  window.
* `tb_rd_classifier_top` is the end-to-end test at the default configuration. It streams
  batches of 1, 50, 100, 150, 500 and 1000 samples back to back at 50 MHz, one per clock,
  and checks every registered result against the reference. It checks that a batch of N
  takes N × 20 ns, and it applies an asynchronous reset between batches. It fails if any
  leaf, either outcome of the tolerance check, or the reset never occurs.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rd_classifier_top \
  rtl/rd_pkg.sv tb/rd_ref_pkg.sv rtl/threshold_cmp.sv rtl/ref_subtractor.sv \
  rtl/abs_unit.sv rtl/tolerance_cmp.sv rtl/priority_decision.sv \
  rtl/dt_inference_datapath.sv rtl/output_register.sv rtl/rd_classifier_top.sv \
  tb/tb_rd_classifier_top.sv
./obj_dir/Vtb_rd_classifier_top
```

For another testbench, change the top module and the last file. The packages must come
first. Lint with `verilator --lint-only -Wall rtl/rd_pkg.sv rtl/*.sv --top-module
rd_classifier_top`. The only warnings are package constants that a given module does not
use.

## How far it follows the model, and where it departs

Taken from the trained model and its hardware mapping:

* the tree structure and all six thresholds;
* the reference value and the tolerance;
* the comparator set (C1–C5, C4a, C6) and the polarity of each;
* the subtractor → absolute value → comparator chain on F5;
* signed 32-bit fixed point;
* a combinational datapath with one output register;
* single-cycle inference at 50 MHz.

This design's own choices:

* **Scale of 1000** for the fixed-point format. It is inferred from the constants.
* **The role of C6.** It is computed but does not affect the class (see above). As a
  result, the output register is 2 bits and the top has 196 pins. With only the class
  registered it would be 1 register bit and 195 pins (192 feature bits, clock, reset,
  class).
* **Reset.** It is asynchronous and active low, and it resets to benign.
* **Class encoding.** 1 = ransomware.
* **Tolerance compare.** It is a strict `<`.
* **Guard bit.** The subtractor has a 33-bit guard bit.
* **No handshake.**

Not reproduced here:

* **Classification accuracy on real data.** The reference implementation reported about
  98.3 % accuracy, 99.0 % precision and 97.6 % recall for the fixed-point hardware, and
  about 99.95 % for the floating-point software tree. No dataset samples are included,
  so the testbenches check the hardware against the tree, not against labels.
* **FPGA resource use.** 146 logic elements and no memory or multipliers were
  reported on a Cyclone IV. So were the power (~177 mW, mostly static) and the energy per
  inference (~3.5 nJ). None of these is measured here.

To retrain, put the new thresholds in `rd_pkg.sv`. If the tree's shape changes, rewrite
the if/else chain in `priority_decision.sv` and the comparator instances in
`dt_inference_datapath.sv`.
