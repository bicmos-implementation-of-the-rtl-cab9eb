# HyPE neuron hardware: a counting-down threshold neuron in SystemVerilog

HyPE (Hierarchy for Pattern Extraction) is a fully digital neural network. Its
neurons have no weights: a connection is either present or absent. A neuron
fires when enough of its connected upper-level neurons fire:

    fire  =  #(C & F) >= T                                   (every neuron)
    fire  =  #(C & F) >= T  and  2 * #(C & F & E) >= T       (beta-level regular neuron)

where `C` is the neuron's connectivity vector over the upper level, `F` the
upper level's firing vector, `E` the upper level's "regular" flags (set once a
neuron has learned a pattern) and `#` counts ones. The second condition stops a
beta regular neuron from being pushed over its threshold by inputs from
untrained (virgin) neurons.

Training a HyPE network means evaluating this rule millions of times, over
levels of up to about 2000 neurons. The RTL here is the co-processor neuron
that does those evaluations for a host computer. It follows the neuron designs
of K. Y. Hung's thesis *BiCMOS Implementation of the Hierarchy for Pattern
Extraction Artificial Neural Network* (University of Windsor). The thesis
built them in 0.8 µm BiCMOS dynamic logic; here they are written as
synthesizable logic.

## The main idea: stream the inputs, count the threshold down

A neuron can have more than a hundred connections, far more than a chip can
take as parallel inputs. So the host streams the vectors `C`, `F` and `E` a few
bits per clock (3 on the test chip, 4 to 8 on the pipelined neuron). The neuron
keeps an 8-bit two's complement *running value* in each of two halves:

* the **upper half** starts at the threshold and subtracts the number of active
  inputs (`C & F`) in each chunk;
* the **lower half** starts at half the threshold and subtracts the number of
  active *regular* inputs (`C & F & E`).

A half has "fired" once its running value is negative: the sign bit (bit 7) is
the comparison result. The **activity block** combines the halves. An ordinary
neuron fires on the upper sign bit alone. A beta regular neuron
(`beta_regular = 1`) needs both sign bits.

### Why the host loads T−1

"Negative" means the count has *passed* the start value (count > start), but
the rule asks for count ≥ T. The host therefore loads **T−1** on the threshold
inputs. The lower half is wired to the same inputs shifted right by one bit, so
it starts at `(T−1) >> 1`. It goes negative exactly when `count > (T−1)>>1`,
which is the same as `2*count >= T` for every T. Nothing else is needed: with
these start values both halves reproduce the firing rule exactly.

Examples: a threshold of 3 is loaded as 2. Three active inputs take the value
to −1 and the neuron fires. An imprinted neuron with 3 connections has
threshold 2 (loaded as 1) and fires when 2 of them are active.

### Limits of the arithmetic

* The running value is not saturated. Once it is negative, the host should stop
  feeding chunks, or at least feed fewer than T+128 active inputs in total:
  beyond that the value wraps to positive. Thresholds never exceed 128. With
  the level sizes HyPE uses (15 to 26 connections per new neuron, "over 100"
  for grown ones), the value never reaches the wrap point.
* The test chip's threshold inputs are 7 bits wide. It takes T = 1..128 (loaded
  as 0..127). A threshold of 0 cannot be loaded there. The pipelined neuron's
  8-bit signed threshold can take T−1 = −1.

## The test chip (`hype_test_chip`)

This is the design that was fabricated. It holds two identical 3-input
**single block neurons** that differ only in their output latch circuit, plus
a **choice block** for the shared test pins.

```
 va[2:0] (C) ─┐
 vb[2:0] (F) ─┼─► single_block_neuron #(LATCH_TSPC)  ──► vact_1
 vc_reg (E)  ─┤        upper/lower values ─────────┐
 vt[6:0] T-1 ─┤                                    ├─► choice_block ──► vr_left[7:0]  (lower half, complemented)
 vc (sel)    ─┤                                    │   (vchoice)    ──► vr_right[7:0] (upper half, complemented)
 vbeta       ─┼─► single_block_neuron #(LATCH_UCDCS) ─► vact_2
 vclk1 ──────┴── (and ~vclk1 for the UCDCS latches)
```

### Single block neuron (`single_block_neuron`)

In each half, one merged block (`parallel_subtractor3`) does the counting, the
start-value selection and the subtraction:

    next = (sel ? {0, threshold} : held_value) - #(3 AND outputs)

An output latch holds the 8-bit result and feeds it back. A chunk of three
inputs is therefore absorbed in **one clock**:

| clock | host drives before the falling edge | after the falling edge |
|---|---|---|
| 0 | chunk 0, `sel = 1`, T−1 | value = start − count(chunk 0) |
| k ≥ 1 | chunk k, `sel = 0` | value includes chunks 0..k |
| last | last chunk | `activity` is the neuron's output |

An evaluation of an N-input neuron takes ⌈N/3⌉ clocks. There is no reset: the
first `sel = 1` defines the state.

The two output latch circuits store on the **falling edge** of the clock:

* `tspc_latch`: a true-single-phase-clock master n-latch (transparent while the
  clock is high) followed by a p-latch (transparent while it is low). It needs
  one clock.
* `ucdcs_latch`: a current-steering master n-latch with a bipolar pull-down,
  followed by a TSPC p-latch. It needs the clock and its complement. The chip
  makes the complement with an inverter. The model asserts that `clk_b` is
  the complement of `clk` at every edge.

In the original circuits these latches carry the dynamic-logic evaluation
itself. In the RTL they are falling-edge registers with the same cycle
behaviour.

The test outputs `r_upper` and `r_lower` carry the **complement** of the
running values, as the dynamic switching tree delivers them (a pin at logic 0
means bit = 1). `activity` and the fed-back values use the true polarity.

### Choice block (`choice_block`)

There are only 16 output pins for the two neurons' 32 test bits. Sixteen 2-to-1
multiplexers pick one neuron: `vchoice = 0` gives the TSPC neuron,
`vchoice = 1` the UCDCS neuron. Both neurons get identical inputs, so in normal
operation they show identical values. The choice lets each circuit be
observed on its own.

## The pipelined general neuron (`pipeline_neuron`)

The single block neuron was derived from this design: a wider neuron with
separate, pipelined stages. Each half has:

```
C,F(,E) ─► AND gates ─► parallel counter ─► [count FFs] ─► subtractor ─► [value FFs] ─┬─► sign bit ─► activity block
                                                              ▲                       │
                                     threshold (or >>>1) ─► mux (sel) ◄────────────────┘
```

All flip-flops (`tdrn_dff`) are resettable falling-edge D flip-flops with an
active-low asynchronous clear `rb`. With N_IN = 8 there are 2×4 count bits and
2×8 value bits, 24 flip-flops in all, matching the original 8-input neuron.

Because the count is latched before it is subtracted, the latency is one clock
more than on the single block neuron, and `sel` is late by one clock too:

| clock | host drives before the falling edge | after the falling edge |
|---|---|---|
| 0 | chunk 0 | count(chunk 0) latched |
| 1 | chunk 1, **`sel = 1`**, T−1 | value = start − count(chunk 0) |
| k ≥ 2 | chunk k (or zeros after the last), `sel = 0` | value includes chunks 0..k−1 |

An evaluation of an N-input neuron takes ⌈N/N_IN⌉ + 1 clocks. `sel` is not
pipelined. The host raises it in the clock after the first chunk, when the
first count sits in the count flip-flops.

### Variants

| parameters | original design it stands for | counter / subtractor |
|---|---|---|
| `N_IN=8` (default) | 8-input logic-gate neuron; 8-input switching-tree neuron | 8-input counter (4 bits), 8-4 subtractor |
| `N_IN=8, SLOW=1` | slow (area-minimised) 8-input neuron | two 4-input counters + 3-3 adder; 3-3 subtractor chained into a 5-1-c subtractor |
| `N_IN=4` | 4-input logic-gate neuron | 4-input counter (3 bits), 8-3 subtractor |
| `N_IN=7` | 7-input switching-tree neuron | 7-input counter (3 bits), 8-3 subtractor |

The logic-gate and switching-tree versions differ only below the gate level.
They share one RTL. The slow variant keeps its structure as separate modules:
`slow_counter4`, `adder_3_3`, `slow_counter8`, `sub_3_3`, `sub_5_1_c` and
`slow_subtractor_8_4`. In the 8-4 subtraction, bits 2..0 of the value lose
bits 2..0 of the count. The borrow ("carrier") then goes on with count bit 3
into bits 7..3.

## Top level (`hype_top`)

`hype_top` places three independent designs side by side, each with its own
clock and ports:

* `chip_*`: the test chip;
* `pf_*`: the 8-input pipelined neuron, fast form;
* `ps_*`: the 8-input pipelined neuron, slow form.

It has no parameters.

## What was not built

* **The host.** It runs the HyPE training algorithm: wake and sleep phases,
  imprinting, novelty arousal, the basal ganglia output neuron and pain and
  pleasure feedback. The original runs this in software, and the neuron is
  its co-processor. The testbenches play the host's part.
* **Pads, the custom-layout gate cells and the dynamic NMOS switching trees.**
  These are physical realisations. Their logic functions appear inside the
  blocks above.
* **Circuit speed.** The original circuits ran at 50 MHz (TSPC neuron), 66 MHz
  (UCDCS neuron) and 333 MHz with one switching tree split off. This is a
  property of that technology, not of this RTL.

## Where this RTL makes its own choices

The original description leaves these points open. Each choice is also noted
at the top of the file concerned.

* The T−1 loading and the right-shifted lower-half start value (see above).
  The original says a half fires when its value "becomes negative", and
  elsewhere that a neuron fires when the count is "greater or equal" to T.
  The T−1 convention satisfies both.
* Multiplexer polarity: `sel = 1` selects the threshold.
* `vchoice = 0` selects the TSPC neuron.
* The UCDCS neuron's test outputs are complemented like the TSPC neuron's.
  The complement is documented only for the TSPC neuron.
* The `tdrn_dff` clear is asynchronous.
* The counters and subtractors are written arithmetically. The original used
  two-level minimised gate netlists and merged switching trees. `slow_counter4`
  and `adder_3_3` are gate-level, but in a gate form of their own, not the
  original Karnaugh-map netlists.
* Inputs 3..0 go to the first 4-input counter of the slow counter, 7..4 to the
  second.

## Files

`rtl/` holds one module or package per file. `hype_pkg.sv` holds the shared
widths (`VAL_W = 8`, `THR_W = 7`) and the `latch_kind_e` enum. Hierarchy:

```
hype_top
├── hype_test_chip
│   ├── single_block_neuron (×2: LATCH_TSPC, LATCH_UCDCS)
│   │   ├── and_gate_array
│   │   ├── parallel_subtractor3 (×2)
│   │   ├── tspc_latch | ucdcs_latch (×2)
│   │   └── activity_block
│   └── choice_block
└── pipeline_neuron (×2: fast, SLOW)
    ├── and_gate_array
    ├── parallel_counter | slow_counter8 (slow_counter4 ×2, adder_3_3)   (×2)
    ├── tdrn_dff (count and value rows)
    ├── mux2_bank (×2)
    ├── subtractor | slow_subtractor_8_4 (sub_3_3, sub_5_1_c)            (×2)
    └── activity_block
```

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`hype_tb_pkg.sv`. That package is a reference model of the firing rule,
written from the rule and not from the RTL. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* The combinational blocks are tested exhaustively or with random vectors.
* The latches and flip-flops are checked for edge, hold and clear.
* `tb_single_block_neuron`, `tb_pipeline_neuron` and `tb_hype_test_chip` compare
  the running values after every clock with a cycle-accurate model, and the
  final activity with the firing rule. They also check that firing, not
  firing and the beta-regular veto all occur.
* `tb_hype_top` runs the whole top at its default sizes. It builds HyPE neurons
  as the training algorithm would: upper levels of 54, 150, 200 and 2000
  neurons; 15 to 26 random connections, or 120 on the 2000-neuron level;
  virgin thresholds of 50, 7 or 6, or imprinted thresholds. It streams each
  neuron through the chip and both pipelined neurons and checks activity,
  final values and clock counts. It also checks the worked examples of the
  firing rule, the output neuron's rule (threshold 1: fire on any active
  connected input), and that the fast and slow neurons agree.

## Simulating

With Verilator 5 (two-state), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hype_pkg.sv tb/hype_tb_pkg.sv tb/tb_hype_top.sv --top-module tb_hype_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way, and all of them finish in seconds. To
lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/hype_pkg.sv rtl/<module>.sv
```

Every module lints without warnings.

## How far to trust it

Every module passes lint and elaboration with Verilator and with Yosys' slang
front end, and every testbench passes. Each testbench was also run against a
deliberately broken copy of its module and caught it. The RTL reproduces the
neuron's arithmetic and cycle behaviour as described. It does not reproduce the
transistor-level circuits: dynamic precharge/evaluate timing, the analog
behaviour of the latches, or the exact gate netlists. The open points listed
above are the places where a reader with the original at hand should look
first.
