# Common-mode rejection for groups of 16 silicon-strip channels

Silicon microstrip sensors are read out through amplifiers, analogue memories
and ADCs. After the per-strip pedestal (the average base line) is subtracted,
a whole group of adjacent strips still moves up and down together from event
to event: ground bounce and pick-up on the cables shift all their base lines by
about the same amount. This shift, the *common mode*, must be measured in every
event and removed before strips with particle charge can be told apart from
noise.

The difficulty is that some strips of the group may carry a particle signal,
which must not be averaged into the base line. The method implemented here
sorts the 16 samples of a group in ascending order and averages from the
bottom up, stopping just before the first value that makes the running average
jump: the samples below the jump are taken to be base line only.

This SystemVerilog implements that method as a small sequential datapath
that uses a 160 MHz clock. It needs no divider and no comparator network:

* sorting is a bit-serial radix sort that moves the group back and forth
  between two 16-word memories, one word per clock;
* division by k is a multiplication by a constant from an 11-entry table,
  followed by a shift.

The top level, `es_cm_frame`, puts six such units behind a pedestal-subtraction
stage. Together they process the 24 groups that one optical link of the CMS
Preshower detector delivers per event. The Preshower has 4 sensors × 32 strips
× 3 time samples per link.

The method follows N. Manthos, G. Sidiropoulos and P. Vichoudis, *An Efficient
Hardware Design for Rejecting Common Mode in a Group of Adjacent Channels of
Silicon Microstrip Sensors Used in High Energy Physics Experiments*. Their
implementation was in VHDL on a Virtex-II Pro FPGA. This is an independent RTL
description. Where the published description leaves something open, the
choice made here is stated in the section on interpretations below.

## The common-mode estimate

Let v₁ ≤ v₂ ≤ … ≤ v₁₆ be the sorted, pedestal-subtracted samples of one group.

* **Gradual mean:** m_k = (v₁ + … + v_k) / k, for k = 1 … 16.
* **Selection:** the common mode is m_k for the first k, starting at k = 1,
  for which

      m_k − m_(k−1) < c1    and    m_(k+1) − m_k ≥ c2

  The mean is still flat up to k, and adding v_(k+1) makes it jump, so
  v_(k+1) is the smallest sample that carries charge. m₀ is taken equal to m₁,
  so the first condition always holds at k = 1. If no jump is found up to
  k = 15, the common mode is m₁₆, the mean of the whole group.
* **rms:** (m_k − m₁) · 4 / k. This is a cheap spread estimate, intended as a
  later cut on the corrected samples.
* **Corrected output:** every sample minus the common mode, returned in the
  original strip order.

c1 and c2 are run-time inputs. The value used in the original study was 3 ADC
counts. They should follow the channel noise.

**Division without a divider** (`lut_divider`):

* k = 1, 2, 4, 8 or 16: a right shift.
* Any other k from 3 to 15: multiply by round(256/k), then shift right by 8.

| k      | 3  | 5  | 6  | 7  | 9  | 10 | 11 | 12 | 13 | 14 | 15 |
|--------|----|----|----|----|----|----|----|----|----|----|----|
| factor | 85 | 51 | 43 | 37 | 28 | 26 | 23 | 21 | 20 | 18 | 17 |

The quotient is truncated. Most factors are within 1 % of 256/k. The factors
for 13 and 14 are about 1.6 % off, and the testbench checks against that
bound.

All means are formed on values from which the group minimum has been removed.
These values are non-negative, so truncation is well defined. The minimum is
added back to the chosen mean, which gives a signed common mode.

## Sorting with two banks and Gray codes

This is the least obvious part of the design (`bitsort_ctrl`).

**The banks.** Each unit has two banks (`sort_bank`) of 16 words of 16 bits.
Each word holds:

* the 4-bit strip address, which travels with the value;
* a 12-bit value.

**The load.** The group is loaded into bank 0.

**One pass.** Pass j reads the 16 words of the source bank in order, one per
clock, and writes each one into the other bank:

* if bit j of the value is **0**, the word goes to the next free address
  **from the top** (0, 1, 2, …);
* if bit j is **1**, it goes to the next free address **from the bottom**
  (15, 14, …).

Source and destination then swap, and the next bit is processed.

**Why Gray code is needed.** With plain binary, this would not be a sort:

* a least-significant-digit radix sort needs every pass to keep the order of
  equal keys;
* filling the "ones" from the bottom reverses their order.

The values are therefore converted to reflected-binary Gray code, G = b xor
(b >> 1), before sorting. A Gray-coded list that is sorted on bits 0 … j−1 is
in Gray order on those bits. Gray order reverses exactly when the next bit is 1.
So the bottom-up reversal of the ones puts them in the right order. After the
last pass, the destination bank holds the words in ascending binary order.

**Example.** Four 4-bit numbers A, 5, 3, C have the Gray codes F, 7, 2, A:

| after pass | bit tested | bank contents (Gray)  |
|------------|------------|-----------------------|
| load       | –          | F 7 2 A               |
| 0          | 0          | 2 A 7 F               |
| 1          | 1          | F 7 A 2               |
| 2          | 2          | A 2 7 F               |
| 3          | 3          | 2 7 F A  → 3 5 A C    |

**Offset and encoding.** The encoding happens on the fly during the first
pass. The unit reads the raw signed sample, subtracts the group offset and
encodes the result (`gray_codec`). Later passes move Gray codes only.

**Reading back.** When the sorted bank is read out, each value is decoded
back to binary and the offset is added again.

**Pass count and timing.** A pass takes 16 clocks. A group needs as many
passes as its values have significant bits:

* full 12-bit values: 12 passes, 192 clocks (1.2 µs at 160 MHz);
* an even number of passes leaves the result in bank 0;
* an odd number leaves it in bank 1, and `final_bank` says which.

**Skipping circuit (`length_detect`).** While the group is being loaded, this
circuit keeps the running minimum and maximum. The minimum is the offset. The
bit length of (max − min), at least 1, is the number of passes.

A group of noise-only strips spans a few tens of counts and needs 5 to 7
passes instead of 12. A sort pass on a bit that is 0 in every value would only
copy the bank, so skipping it changes nothing.

## One group through `cm_unit`

| phase | clocks   | what happens |
|-------|----------|--------------|
| LOAD  | 16       | samples written to bank 0 with their strip address; min/max tracked |
| START | 1        | pass count fixed |
| SORT  | 16 × p   | p passes (p = 1 … 12) |
| –     | 1        | sort done |
| MEAN  | 16       | sorted bank read in order; see below |
| FIN   | 3        | last criterion test, m₁₆ fallback, rms |
| OUT   | 16       | restored bank read in strip order; out = sample − common mode |

In each MEAN cycle, the value read from the sorted bank is decoded and does
two things:

* it feeds `cm_select`, which builds the running sum, the mean from the table
  divider and the criterion;
* it is written into the other bank at its own strip address.

So the original strip order is restored while the common mode is computed,
with no extra memory and no extra time.

**Criterion timing.** The test for k needs m_(k+1), so it is made in the cycle
where value k+1 arrives. No look-ahead is needed.

**Total latency.** From the first sample in to the last sample out, with
continuous input and output, a group takes **53 + 16·p clocks**: 245 for a full
12-bit sort.

**Handshakes.** The unit accepts a new group only after the previous one has
left. `in_ready` is high during LOAD only. OUT waits for `out_ready`.

## The link stage, `es_cm_frame`

```
raw samples ──► pedestal_sub ──► slice dispatch ──► cm_unit ×6 ──► in-order collect ──► corrected samples
(strip 0..127)  (128-entry table)  (round-robin)                   (round-robin)
```

**Input.** Samples arrive already unpacked, one per clock, 16 consecutive
samples per slice. Each sample carries its strip number on the link (0..127),
which is used for the pedestal lookup.

**Pedestal subtraction.** `pedestal_sub` subtracts the pedestal from the
12-bit ADC value. It keeps the difference as 12-bit two's complement, the
width of the memory words. Larger differences are clipped and flagged.

**Dispatch and collection.**

* Whole slices go to the six units in turn.
* Results are taken from the units in the same turn, so slices leave in the
  order they came in.
* Every output word carries:
  * the slice number (0..23) and the strip in the slice;
  * the corrected value;
  * the slice's common mode, rms and k;
  * the number of sort passes used;
  * the clip flag.

**Frame time.** A frame in which every slice needs all 12 passes takes about
1100 clocks (6.9 µs) from the first sample in to the last sample out. This is
below the 7.5 µs at which frames arrive (40 MHz readout). Frames of noise-like
slices finish sooner.

### Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ped_we`, `ped_addr`, `ped_data` | in | 1, 7, 12 | write one pedestal |
| `c1`, `c2` | in | 8 | criterion thresholds (ADC counts) |
| `in_valid`, `in_ready` | in/out | 1 | input handshake |
| `in_chan`, `in_adc` | in | 7, 12 | strip on the link, raw ADC value |
| `out_valid`, `out_ready`, `out_last` | out/in/out | 1 | output handshake, last strip of a slice |
| `out_slice`, `out_strip` | out | 5, 4 | slice in the frame, strip in the slice |
| `out_val` | out | 14 signed | sample − pedestal − common mode |
| `out_cm`, `out_rms`, `out_k` | out | 13 signed, 16, 5 | slice common mode, rms, averaged strips |
| `out_npass`, `out_clip` | out | 4, 1 | sort passes used, pedestal difference clipped |

Parameters: `N_UNITS` = 6, `N_SENSORS` = 4, `N_SLOTS` = 3. Sizes shared by
all modules are in `cmr_pkg`: 16 channels, 12-bit samples, 4-bit strip
address.

## Interpretations and departures

* **Jump criterion.** The published criterion is printed with both inequalities
  as "<". It is also described as locating position k+1 as the smallest
  sample with charge. Only "≥ c2" for the second test fits that description,
  and that is what is built.
* **k = 1.** The first test at k = 1 needs m₀, which is undefined; m₀ = m₁ is
  used.
* **No jump found.** In that case the mean of all 16 samples is used.
* **rms formula.** It is printed ambiguously. (m_k − m₁)·4/k is the reading
  used.
* **Offset.** Only "an offset to make the numbers positive" is specified. The
  group minimum is used, which also drives the skipping circuit.
* **Restored strip order.** The original places the restored list in the first
  bank. Here it goes to whichever bank does not hold the sorted list, because
  writing into the bank that is being read in sorted order would destroy
  unread words.
* **Timing.** A unit takes 245 clocks (1.53 µs) per full group, counting
  loading and output, against 1.45 µs reported for the original. A worst-case
  frame takes 6.9 µs against 6.1 µs. Both are below the 7.5 µs frame period.
* **Resolution.** The original reports a common-mode error of about 1.8 counts
  rms (high gain, 7 counts noise) and about 0.9 counts (low gain, 3 counts
  noise). Those figures come from simulated physics events. `tb_cm_resolution`
  uses a simpler hit model and the criterion as read above. It measures about
  7.3 and 2.2 counts, with a negative bias at high gain. The main cause is
  that the criterion may stop at k = 1 when the two lowest noise samples
  happen to be far apart. Treat the criterion as the part of this design most
  worth re-examining against real data.
* **Not included.** The rest of the readout chain is named in the original but
  not specified, so it is not in this RTL:
  * link deserialization and CRC check;
  * frame unpacking;
  * bunch-crossing identification;
  * charge reconstruction by deconvolution;
  * the final threshold and DAQ formatting.

  Neither is the proposed extension to a common mode that varies linearly
  across the group.

## Files

| file | content |
|------|---------|
| `rtl/cmr_pkg.sv` | sizes, memory word type, Gray functions, division factors |
| `rtl/lut_divider.sv` | table-based division by 1..16 |
| `rtl/gray_codec.sv` | offset removal + Gray encode, Gray decode + offset |
| `rtl/sort_bank.sv` | 16 × 16-bit bank, synchronous write, asynchronous read |
| `rtl/length_detect.sv` | min/max tracking and pass count (skipping circuit) |
| `rtl/bitsort_ctrl.sv` | two-bank bit-serial sort controller |
| `rtl/cm_select.sv` | gradual mean, criterion, rms |
| `rtl/cm_unit.sv` | one complete common-mode unit |
| `rtl/pedestal_sub.sv` | pedestal table and subtraction |
| `rtl/es_cm_frame.sv` | top: pedestal stage and six units |
| `tb/cm_ref_pkg.sv` | integer reference model and group generator used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cm_resolution` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog that
ends the run with a failure if it hangs. Example, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_es_cm_frame \
    -y rtl -y tb +libext+.sv rtl/cmr_pkg.sv tb/cm_ref_pkg.sv tb/tb_es_cm_frame.sv
./obj_dir/Vtb_es_cm_frame
```

Replace the top module and the last file name to run another testbench. All
run in well under a minute.

**What the testbenches check.** They compare outputs against the independent
reference model in `tb/cm_ref_pkg.sv` and check cycle counts where they are
fixed:

* 16 clocks per sort pass;
* 53 + 16·p clocks per group;
* done latency of `cm_select`;
* the worst-case frame under 1200 clocks.

**Mechanisms exercised.** The end-to-end test, at default parameters, counts
and requires:

* input stalls while all units are busy;
* output back-pressure;
* clipped pedestal differences;
* shortened and full-length sorts;
* both outcomes of the criterion.

**Changing the design.**

* The criterion is confined to the `crit` expression in `cm_select.sv`.
* The division factors are in `cmr_pkg::div_factor`.
* The number of units is the `N_UNITS` parameter of `es_cm_frame`.
