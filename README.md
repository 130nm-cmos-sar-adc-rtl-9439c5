# An 8-bit SAR ADC whose control logic is a shift register and a counter

A successive-approximation ADC finds its output word by binary search: it
compares the sampled input with a threshold, keeps the answer as one result
bit, moves the threshold up or down by half the previous step, and repeats
until every bit is known. The control logic that runs this search is usually
built from a sequencer (a one-hot ring that says which bit is being tried) and
a code register (which accumulates the answers).

This design does without both. It treats the search as a state machine whose
states are the nodes of the binary search tree, and it picks a deliberately
redundant state encoding in which the next state is always obtained by

* shifting the comparator decision into an R-bit shift register, and
* incrementing a ceil(log2 R)-bit counter.

A combinational decoder turns that state into the switch settings of the
capacitive DACs, and an output register copies the shift register when the
next conversion starts. For R = 8 the whole control logic is 8 + 8 + 3 = 19
D-type registers and one decoder.

The RTL here contains that control logic as synthesizable SystemVerilog, plus
behavioural (real-valued, simulation-only) models of the analog parts, two
switched-capacitor DACs and a dynamic comparator, so that the complete
converter can be simulated.

## The state encoding

The state is the concatenation of R "decision" bits and ceil(log2 R) "layer"
bits. At the root of the tree (before the first comparison) the decision bits
are all ones and the layer is 0. Each comparison shifts the decision bits one
place towards the higher index, puts the comparator outcome into bit 0, and
adds one to the layer count.

For a 4-bit converter the states read as follows, written as decision bits
0,1,2,3 and then layer bits 0,1 (layer LSB first):

| layer | states (c1 = first decision, ...)                                  |
|-------|---------------------------------------------------------------------|
| 1     | `111100`                                                            |
| 2     | `c1 1 1 1  1 0` : `011110`, `111110`                                |
| 3     | `c2 c1 1 1  0 1` : `001101`, `101101`, `011101`, `111101`           |
| 4     | `c3 c2 c1 1  1 1` : `000111`, `100111`, ..., `111111`               |

Six bits encode fifteen tree nodes where four would do, but no next-state
logic beyond a shift and an increment is needed, and the design scales to
another resolution by lengthening the chains. After the R-th comparison the
decision bits hold the result with bit j equal to result bit j (the first
decision, the MSB, has been shifted all the way to bit R-1), so the output
register copies them unchanged.

Testbench `tb_dcl` walks all eight paths of the 4-bit tree and checks every
one of these fifteen state codes.

## Blocks

| module                 | what it is |
|------------------------|------------|
| `d_register`           | one D-type register, the only storage cell of the control logic |
| `shift_register`       | R decision bits; loads all ones during Sample, otherwise shifts in the comparator decision |
| `layer_counter`        | ceil(log2 R)-bit layer count; cleared during Sample, +1 per comparison |
| `logic_network`        | combinational decoder from (decision bits, layer, Sample) to the Ref/Gnd switches of both DACs |
| `output_register_bank` | R registers loaded from the shift register during Sample |
| `dcl`                  | the control logic: the four blocks above |
| `cap_dac`              | behavioural model of one binary-weighted capacitive DAC |
| `comparator`           | behavioural model of the clocked latch comparator |
| `sar_adc`              | top level: `dcl`, two `cap_dac`s, `comparator` |
| `sar_pkg`              | default resolution (8), reference (800 mV), capacitor weights, counter width |

## How the two DACs implement the search

This is the least obvious part of the design, and the part where the RTL
makes the most choices of its own.

Each DAC is an array of R capacitors with a common top plate: capacitor i
(i >= 1) weighs 2^(i-1) units and capacitor 0 one unit, 2^(R-1) units in all
(64C, 32C, 16C, 8C, 4C, 2C, C, C for R = 8). The bottom plate of capacitor i
can be switched to VREF/2 (`Ref_i`) or to ground (`Gnd_i`), and during
sampling to the sampled voltage.

* **Sample phase.** DAC1 (the reference side, top plate Z) has both plates at
  VREF/2. DAC2 (the input side, top plate Y) has its top plate at VREF/2 and
  its bottom plates on the input, so it stores VIN - VREF/2. All `Ref_i` and
  `Gnd_i` are 0.
* **First comparison.** All `Ref_i` are 1. Z stays at VREF/2 and Y becomes
  VREF - VIN, so the comparator (Z on its + input, Y on its - input) answers
  VIN > VREF/2: the MSB.
* **Every later comparison.** Once result bit i is known, capacitor i of
  exactly one DAC moves from VREF/2 to ground. That lowers its top plate by
  2^(i-1) LSB (LSB = VREF/2^R). If the bit is 1 it is DAC1 that moves, which
  raises the effective threshold; if it is 0 it is DAC2, which lowers it. In
  terms of the decision bits: DAC2 gets `Ref_i = bit`, `Gnd_i = ~bit`, DAC1
  the mirror image. Capacitor 0 is never switched. The decoder thus drives
  a separate Ref/Gnd pair per capacitor for each DAC, 2 x 16 signals for
  R = 8, from 8 + 3 state bits and the Sample line.

At layer m the comparison threshold, in LSB, is therefore

    T = 2^(R-1) + sum over decided bits i of (bit_i ? +2^(i-1) : -2^(i-1))

which is exactly the trial code of a textbook SAR (decided bits, a 1 in the
next position, zeros below). `tb_logic_network` checks this identity for all
256 words at all eight layers by converting the decoder's switch pattern back
into a threshold.

The decoder finds bit i of the result in the shift register from the layer
count alone: during layer m it is known when m + i >= R, and it is then in
decision bit m + i - R.

Each capacitor moves at most once per conversion and only downwards, so no
capacitor is ever charged back up from ground during a conversion.

## Timing

One conversion takes R + 1 = 9 clocks: one Sample clock and eight comparison
clocks. With a 12.5 kHz clock that is 1.39 kS/s. `sample` must be high for
exactly one clock every nine clocks; the converter does not check this, and
a late Sample lets the shift register run on and lose the word.

| clock edge      | what happens |
|-----------------|--------------|
| during cycle 0  | `sample` = 1: DACs track the input |
| edge 1          | state := root (all ones, layer 0); `data_out` := previous word |
| cycle 1 mid     | comparator resolves the MSB (it runs on the inverted clock) |
| edges 2 ... 9   | one decision shifted in per edge, MSB first |
| cycle 9         | `sample` = 1 for the next conversion |
| edge 10         | `data_out` := this conversion's word; held for nine clocks |

Every register is a plain rising-edge D-type cell with no reset; the Sample
clock is what initialises the state. The comparator model decides on the
falling edge of the system clock, half a cycle after the DACs switch, and
holds its answer until the control logic takes it at the next rising edge.

## Analog models

`cap_dac` computes the top-plate voltage by charge conservation from the
sampled bottom-plate voltage and the current switch settings, with ideal
capacitors and instantaneous settling. `comparator` outputs
`vp + OFFSET_MV > vn` at each rising edge of its clock; a level exactly on a
threshold therefore gives the lower code. With these ideal models the
converter's transfer function is `floor(vin / LSB)`, saturated to 0..255.
Mismatch, parasitic capacitance, charge injection, noise and comparator
metastability are not modelled, so the models say nothing about the linearity
or power a transistor-level implementation would reach.

## Where the RTL departs from the circuit it is based on

The converter this RTL follows was drawn at transistor level. Points where the
RTL deliberately differs, or fills in something that was not specified:

* **One clock edge everywhere.** The shift register of the original circuit
  clocks its first stage and the later stages on opposite clock phases, the
  counter is a ripple counter, and the output registers are clocked by the
  Sample line itself. Here all registers use the rising edge of `clk`, the
  counter is synchronous, and Sample is a load enable. The state sequence is
  the same; the output word appears at the end of the Sample clock instead of
  at its start.
* **Initialisation.** The register cell has no set or reset. The RTL loads the
  root state through the D inputs while Sample is high.
* **The reference-side switching rule** (DAC1 grounds capacitor i when bit i is
  1) is this design's completion of the switching strategy. The rule given
  for the input side (`Ref = decision`, `Gnd = ~decision`) is followed. A
  further step of that description, which also forces the next capacitor
  (`Ref_(n-1)` to 0, `Gnd_(n-1)` to 1) at each comparison, could not be made
  consistent with a correct binary search with the two switch rails
  available, and is not implemented.
* **Start signal.** The original block diagram lists a `Start` control for
  each DAC whose function is not described; it is not generated.
* **The decoder** was originally a hand-minimised NAND/NOR network; here it is
  a behavioural `always_comb` description of the same function, left to
  synthesis.
* **Conversion length.** One Sample clock plus R comparison clocks is this
  design's choice; it gives 1.39 kS/s from 12.5 kHz, against the 1.4 kS/s
  quoted for the original.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Besides the block tests:

* `tb_sar_adc` (default parameters): 2000 conversions of random inputs from
  -20 to 820 mV; checks every word against `floor(vin/LSB)`, the nine-clock
  latency, the return to the root state, and that decisions of both signs
  occur in every layer, that both DACs switch, that the counter wraps and
  that both ends saturate.
* `tb_table1_samples`: six reference samples of a 70 Hz, 800 mVpp tone
  (537.790, 799.560, 617.310, 374.780, 143.500, 1.120 mV). Their reference
  words from a transistor-level converter are 10101100, 11111111, 11000101,
  01111000, 00101110, 00000000. The ideal model gives four of them exactly
  and the other two (374.78 and 143.50 mV, both within 0.08 LSB of a code
  boundary) one code lower. With `COMP_OFFSET_MV = 0.75` all six match.
* `tb_ramp_linearity`: a full-scale ramp in 1/32-LSB steps; no missing codes,
  monotonic, DNL and INL within the ramp step (ideal models).
* `tb_sine_enob`: 2048 samples of an 800 mVpp tone at 69.85 Hz (the
  nearest to 70 Hz that gives a coherent record) sampled at 1.39 kS/s. Every
  word is checked; the words are turned back into a staircase by an ideal
  DAC and its spectrum gives SNR 50.0 dB, THD -64.5 dBc (first eleven
  harmonics), SINAD 49.8 dB and ENOB 7.99 bits, as expected of an ideal
  8-bit quantiser.
* `tb_sar_adc_4bit`: the complete converter at R = 4 (five clocks per
  conversion), all sixteen codes checked.

## Simulating

All files use only IEEE 1800-2017 constructs and simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_sar_adc rtl/sar_pkg.sv tb/tb_sar_adc.sv
    ./obj_dir/Vtb_sar_adc

Replace `tb_sar_adc` with any other testbench name. The DAC and comparator
models use `real` ports and variables and are not synthesizable; `dcl` and
everything below it are.

## Changing the resolution

`R` (default 8, from `sar_pkg::RESOLUTION`) sets the shift register, output
register and DAC sizes; the counter width follows as ceil(log2 R). The layer
decoding assumes the counter wraps to 0 after R comparisons, which holds when
R is a power of two; for other R the Sample clock clears it anyway.
`VREF_MV` sets the reference, `COMP_OFFSET_MV` the comparator offset of the
model.
