# MTD³L intermediate product shifter

A floating-point multiplier produces a mantissa product that must be
normalised: depending on the product's leading bit, the result is taken either
as it stands or shifted right by one place, and the exponent is incremented.
This design is that one-bit shifter (47 input bits, 46 output bits, one select)
built in a clockless, energy-aware logic style called MTD³L: *multi-threshold
dual-spacer dual-rail delay-insensitive logic*. It follows the shifter
described in K. Sushma and J. Sudhakar, "Energy Aware IP Shifter for DSP
Processors using MTD³L Asynchronous Approach". That paper reports transistor-level
results for a 130 nm process. This repository models the same circuit at gate
level in synthesizable SystemVerilog.

```
 IP[46] IP[45]      IP[45] IP[44]            IP[1] IP[0]
    |     |            |     |                  |     |
   B|    A|           B|    A|                 B|    A|
  +-------+          +-------+                +-------+
  | mux2  |--P[45]   | mux2  |--P[44]   ...   | mux2  |--P[0]
  +-------+          +-------+                +-------+
      ^  sel, sleep0, sleep1 shared by all 46 multiplexers
```

`select = 0` gives `P = IP[45:0]` (no shift). `select = 1` gives
`P = IP[46:1]`, a right shift by one. When shifting, the top output takes
`IP[46]`, so driving `IP[46]` to 0 fills the top with zero.

## Dual rail and the two spacers

Every logical bit is a pair of wires (`mtd3l_pkg::dr_t`, packed `{r1, r0}`):

| r1 r0 | meaning |
|-------|---------|
| 0 1   | DATA0 |
| 1 0   | DATA1 |
| 0 0   | all-zero spacer |
| 1 1   | all-one spacer |

A delay-insensitive circuit knows that a new value has arrived because the
rails leave the spacer state. In plain NCL the only spacer is 00 (NULL).
Dual-spacer logic alternates between the 00 and 11 spacers from one data word
to the next. Then every rail switches exactly once per cycle, whatever the
data, which makes the power drawn independent of the data. In this design the
spacer is not produced by the data inputs. The gates' sleep inputs force it.

## The sleep pair

Every gate has two control inputs, `sleep0` (sleep-to-0) and `sleep1`
(sleep-to-1). All gates of the shifter share one pair:

| sleep0 sleep1 | every gate output |
|---------------|-------------------|
| 0 0 | its threshold function of the inputs (evaluate) |
| 1 0 | 0 (all-zero spacer on every rail pair) |
| 0 1 | 1 (all-one spacer on every rail pair) |
| 1 1 | keeps its previous value |

In the transistor circuit, `sleep0` cuts the pull-up path and turns on a
pull-down. The inverted `sleep1` cuts the pull-down path and turns on a
pull-up. With both asserted, neither network conducts and the output node
keeps its charge. The original sleep table calls this state invalid, but its
text and the transistor circuit describe it as holding the previous output.
The RTL holds, using one level-sensitive latch per gate in
`mtd3l_sleep_stage`. These latches are the design's only storage, and lint
tools report them as intended latches. If you do not want the hold
behaviour, keep 11 off the sleep pair.

"Multi-threshold" refers to high- and low-Vth transistors that cut leakage
during sleep. It has no logic function and is not modelled.

The sleep pair replaces the hysteresis of ordinary NCL gates. A gate
evaluates its threshold function as a plain Boolean function while awake,
and the sleep signals return it to a spacer. The shifter itself contains no
registers, completion detection or sleep sequencer. A surrounding pipeline
must drive the pair: evaluate, then a spacer, then evaluate, and so on, with
the spacer alternating between 10 and 01.

## Threshold gates

Three gates from the standard 27-gate NCL library are used, each wrapped
around `mtd3l_sleep_stage`:

| module | set function (inputs A B C D) | role in the multiplexer |
|--------|-------------------------------|-------------------------|
| `mtd3l_thand0`   | AB + BC + AD | rail condition of the selected input |
| `mtd3l_th24comp` | (A+B)(C+D)   | both data inputs carry data |
| `mtd3l_th22`     | AB           | joins the two conditions |

The paper names the gates. Their functions come from the standard NCL
library.

## The dual-rail multiplexer (`mtd3l_mux2`)

`Z = A` when `S = 0` and `Z = B` when `S = 1`, built from five gates:

```
g_z0  = THand0(B.r0, A.r0, S.r0, S.r1) = A0·B0 + A0·S0 + B0·S1
g_z1  = THand0(B.r1, A.r1, S.r0, S.r1) = A1·B1 + A1·S0 + B1·S1
g_cmp = TH24comp(A.r0, A.r1, B.r0, B.r1)
Z.r0  = TH22(g_z0, g_cmp)        Z.r1 = TH22(g_cmp, g_z1)
```

The `A·B` term lets the output resolve before the select arrives when both
inputs agree. `g_cmp` holds the output at the spacer until both data inputs
carry data, even the unselected one. This is input completeness: a downstream
completion detector that sees data on `Z` may conclude that both `A` and `B`
have arrived. The gate list and the connections follow the paper's
multiplexer diagram. The pin order inside each THand0 was chosen so that the
result reproduces the paper's dual-rail truth table.

## Select polarity: the one point where the sources disagree

The paper's shifter diagram labels the multiplexer inputs for `P[i]` as
`A = IP[i+1]` and `B = IP[i]`, with `A` on the select-0 input. Read
literally, that wiring makes select 0 give `IP[46:1]`. But the paper's text
says select 1 shifts right and select 0 leaves the output unchanged. Its
worked example and its simulated waveform agree with the text:

* Worked example: input `...00010100101001010001001010010` gives the same
  pattern with select 0, and `...00001010010100101000100101001` with
  select 1.
* Simulated waveform: `P6..P0 = 1010010` with select 0 and `0101001` with
  select 1.

The literal wiring cannot produce these values for any input. This RTL
therefore wires `A = IP[i]` and `B = IP[i+1]`. The 47/46 widths and the
one-multiplexer-per-output structure are unchanged. If your system expects
the other polarity, swap `.a` and `.b` in `mtd3l_ip_shifter`, or invert the
select, which in dual rail means swapping its two rails.

## What is not here

* **The MTNCL variant.** The paper compares against a single-sleep shifter in
  MTNCL, the baseline logic style. It is not built. An MTD³L gate with
  `sleep1` held low behaves like its MTNCL counterpart.
* **Analog behaviour.** Power, delay, energy and slew rate are transistor-level
  properties and are not modelled. The paper reports 57.9 µW, 15.1 ns and
  8.75 nJ for its 130 nm MTD³L shifter, against 1.45 µW, 99.6 ns and 14.5 nJ
  for MTNCL.
* **Pipeline control.** No completion detection, registers or sleep generation
  is included, because the paper's shifter has none.
* **Delays.** The RTL has no delays. Evaluation and spacer changes take effect
  in the same simulation step.

## Files

| file | contents |
|------|----------|
| `rtl/mtd3l_pkg.sv` | `dr_t`, spacer/data constants, `sleep_mode_e`, encode helpers |
| `rtl/mtd3l_sleep_stage.sv` | gate output stage obeying the sleep pair (holding latch) |
| `rtl/mtd3l_th22.sv`, `rtl/mtd3l_thand0.sv`, `rtl/mtd3l_th24comp.sv` | threshold gates |
| `rtl/mtd3l_mux2.sv` | dual-rail 2:1 multiplexer |
| `rtl/mtd3l_ip_shifter.sv` | top: `OUT_W` multiplexers (default 46, so 47 inputs) |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports: `ip` (`dr_t [OUT_W:0]`), `sel` (`dr_t`), `sleep0`, `sleep1`
and `p` (`dr_t [OUT_W-1:0]`). Only `OUT_W` is parameterised. Any width of 1
or more works.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
  rtl/mtd3l_pkg.sv tb/tb_mtd3l_ip_shifter.sv --top-module tb_mtd3l_ip_shifter
./obj_dir/Vtb_mtd3l_ip_shifter
```

`-Wno-fatal` is needed because Verilator can report NOLATCH for the
intended hold latch once it is inlined. Substitute another `tb_*` for a
single module. The testbenches check the
following:

* **Gates and sleep stage:** every input pattern under each sleep setting,
  and the hold state while the inputs change.
* **Multiplexer:** the eight rows of the dual-rail truth table, both spacers,
  hold, and that the output stays at the spacer while a data input is still
  a spacer. It then makes 2000 random input changes while the gates are
  awake, each followed by an output check.
* **Shifter, at full size (46 outputs):** the worked example and the waveform
  sequence with their printed expected values, and 200 random products with
  both select values in alternating-spacer cycles. It also checks hold, and
  a single incomplete input bit, which keeps the two outputs that read it at
  the spacer. The shifter testbench counts each mechanism (no shift, shift,
  all-zero spacer, all-one spacer, hold, incomplete input). It fails any
  mechanism that never occurred.

The whole suite runs in a few seconds.
