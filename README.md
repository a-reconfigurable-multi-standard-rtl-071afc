# Reconfigurable dual-mode channelizer on a QMF tree

A wideband software-radio receiver digitises a whole band of carriers at once and must then
pull out every narrowband channel. When the receiver has to serve two air interfaces with
different channel spacings, the usual answer is one channelizer per standard. This design
serves both with one structure: a binary tree of identical two-band analysis filter banks
(quadrature mirror filter, QMF, banks). Each stage halves the bandwidth and the sample
rate of every subband, so stage *s* holds 2^*s* subbands, each (FS/2)/2^*s* wide. Switching
standard means two things:

* **Stage selection (architecture level).** Channels are read from the stage whose subband
  width equals the channel spacing: 2^*s* = (FS/2) / spacing.
* **Filter truncation (filter level).** All banks use one fixed-coefficient low-pass
  "parent" filter, designed for the standard that needs the most stop-band attenuation. A
  standard with a looser specification uses only the central part of the same
  coefficients. The coefficients never change; only the number of taps in use does.

The configuration built here is the GSM/PDC receiver:

| | GSM | PDC |
|---|---|---|
| Sample rate FS / band | 25.6 MHz / 12.8 MHz | 25.6 MHz / 12.8 MHz |
| Channel spacing | 200 kHz | 25 kHz |
| Extraction stage | 6 | 9 (last stage) |
| Channels per frame | 64 | 512 |
| Channel sample rate | 400 kHz | 50 kHz |
| Parent filter taps used | 5 (truncated) | 9 (whole filter) |

The tree always has 9 stages and 511 banks. In GSM mode stages 7 to 9 are switched off.

## How far to trust it, and where it departs

* **The filter is a 9-tap demonstration filter.** The published GSM/PDC design this RTL
  follows calls for a 1400-tap parent filter (PDC, 90 dB blocker rejection), truncated to
  1100 taps for GSM (76 dB). Those coefficients are not available, so the tree uses a 9-tap parent filter
  and its 5-tap truncation. The structure is the same, but the stop-band rejection is
  nowhere near 76 or 90 dB. Channels leak noticeably into their neighbours. Another
  symmetric parent filter drops in by changing the term table in `qmf_pkg` (see
  "Changing the filter").
* Everything around the channelizer is outside this RTL: the RF front end and ADC, the
  per-channel sample-rate converters that bring each channel to a multiple of its baud
  rate, and baseband processing.
* Word widths, rounding, saturation, decimation phase, channel order, the mode write port,
  the flush on a mode change and the gating of unused stages are this design's own choices.
  Each is described below.
* Every module is checked bit-exactly against an independent reference model (see
  "Verification"). The top is simulated at its full size.

## The parent filter and its multiplier block

The parent filter h(0..8) is symmetric (h(8-k) = h(k)). Its coefficients have 16
fractional bits and are written in canonic signed digits. Two digit patterns recur across
the coefficients, `1 0 1` and `1 0 -1`, so two shared subexpressions are formed once:

    x2 = x + (x >> 2)        x3 = x - (x >> 2)

Every coefficient product is then a sum of at most three shifted copies of x, x2 or x3:

| tap | terms | integer value (×2^-16) |
|---|---|---|
| h0 = h8 | x2>>7 + x3>>12 | 652 |
| h1 = h7 | x>>4 − x3>>8 + x2>>14 | 3909 |
| h2 = h6 | −x3>>4 + x2>>10 − x>>15 | −2994 |
| h3 = h5 | x2>>2 + x3>>7 | 20864 |
| h4 | x>>1 | 32768 |

`cse_multiplier_block` builds these five products with shifts and adds only: 2 adders for
the subexpressions and 6 for the products. Symmetric taps share a product. In the
transposed direct form, 8 more adders accumulate the taps, 16 in all. A plain CSD
multiplier block would need 22. To keep every bit, the block scales its work by 4 (x2 is
formed as 4x + x) and carries 16 fractional bits. Products are therefore exact integers
x·c(k), with no rounding until the filter output.

The DC gain of this filter is 1.18 and the sum of |h| is 1.37. The tree carries 18-bit
words, and the 12-bit ADC samples are sign-extended into them. The 6 guard bits cover the
worst-case growth over 9 stages (1.37^9 ≈ 17). Each bank output is rounded (half up) to
an integer and saturated to 18 bits. With 12-bit input, saturation cannot occur.

## One bank, two bands, one coefficient set

The high-pass filter of a QMF pair is h1(n) = (−1)^n h0(n). The high band therefore uses
the same products as the low band, with the odd-index taps negated. `qmf_filter` keeps
two accumulation chains in transposed direct form. One collects the even-index taps (E),
the other the odd-index taps (O). At the output:

    y0 = E + O      (low band)
    y1 = E − O      (high band)

`qmf_node` adds decimation by two. It keeps the first sample after reset or a flush, then
every second one. For simplicity the filter computes every output and the node discards
half of them; a polyphase split would halve the adder activity.

### Changing the length without changing the structure

Truncation keeps the central 9 − 2·`trim` coefficients. `trim` = 0 gives the 9-tap parent
and `trim` = 2 gives taps h2..h6. In the transposed form, chain register *k* holds the
partial sum of taps k..8. To shorten the filter:

1. products of taps outside the window [trim, 8 − trim] are gated to zero at the chain
   inputs, and
2. the output is taken at chain position `trim` rather than 0.

The adders, registers and wiring stay the same in every mode. The first kept tap becomes
tap 0 of the short filter. So for odd `trim`, y1 is formed as O − E. This case is
supported, but the two modes use only even values.

The chain still holds partial sums from the old length after `trim` changes. The mode
controller therefore flushes the tree on every mode change (next section).

## The tree, its timing and the channel order

`qmf_tree` instantiates 2^(s−1) banks at stage s. Node j of stage s filters subband j of
stage s−1 and produces subbands 2j (low) and 2j+1 (high). All banks of a stage run in
lockstep. The tree is output as `stage_valid[s]` plus `stage_data[s][0 .. 2^s − 1]`, and
unused slots are zero. Each stage adds one register. The sample completed by input n
(n a multiple of 2^s) appears at stage s s clocks after input n is accepted.

**Channel order is tree order, not frequency order.** Decimating a high band mirrors its
spectrum, so the frequency ordering flips below every high-band branch. For subband j of
a stage (bits b1..bs, with b1 the first-stage branch as the MSB), the frequency slot f
(0 = lowest) is the Gray-code decode of j:

    f = j ^ (j >> 1) ^ (j >> 2) ^ ... ^ (j >> (s-1))

Also, slots whose path holds an odd number of high-band branches are spectrally inverted
within the slot. A downstream per-channel stage can undo that by negating every other
sample.

## Mode control and the top level

`mode_control` holds the mode. Reset selects GSM. A write (`cfg_we`, `cfg_mode`) that
changes the mode updates the settings one clock later:

* `sel_stage` becomes 6 (GSM) or 9 (PDC);
* `active_stages` is set to the same value, which cuts the input of deeper stages;
* `trim` becomes 2 (GSM) or 0 (PDC);
* a one-clock `clear` is raised.

`clear` empties every bank, restarts the decimation phases and drops any sample already
leaving the tree. An input sample offered during that clear cycle is discarded. A write of
the mode already in force changes nothing. The stage and truncation of each mode are
worked out from the frequencies in `qmf_pkg` (FS, channel spacings) with the relation
2^s = (FS/2)/spacing.

`stage_select` registers the selected stage's subbands. The top, `qmf_channelizer`,
connects:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_we`, `cfg_mode` | in | 1, `mode_e` | write a new mode (`MODE_GSM` / `MODE_PDC`) |
| `mode` | out | `mode_e` | mode in force |
| `adc_valid`, `adc_data` | in | 1, 12 | one signed IF sample per valid cycle |
| `ch_valid` | out | 1 | one-clock pulse per output frame |
| `ch_count` | out | 10 | channels in the frame: 64 or 512 |
| `ch_data[0:511]` | out | 18 each | channel samples in tree order; slots ≥ `ch_count` are 0 |

With `adc_valid` high on every cycle, the clock runs at FS = 25.6 MHz. There is no
back-pressure, and samples may arrive with gaps. A frame is completed by input n (n a
multiple of 64 in GSM or 512 in PDC). It appears stage + 1 clocks after that sample: 7
clocks in GSM and 10 in PDC.

## Files

| file | content |
|---|---|
| `rtl/qmf_pkg.sv` | frequencies, stage derivation, widths, CSE term table, mode type |
| `rtl/cse_multiplier_block.sv` | shared-subexpression shift-and-add products |
| `rtl/qmf_filter.sv` | two-chain transposed-form filter, length by `trim`, y0/y1 |
| `rtl/qmf_node.sv` | filter + decimation by two |
| `rtl/qmf_tree.sv` | full tree with stage gating |
| `rtl/mode_control.sv` | mode register, stage/truncation mapping, flush |
| `rtl/stage_select.sv` | stage multiplexer and output register |
| `rtl/qmf_channelizer.sv` | top level |
| `tb/qmf_ref_pkg.sv` | bit-true reference model (coefficient list, rounding, decimation) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Changing the filter

`CSE_TERMS` in `qmf_pkg` lists, for taps 0..HALF, up to `MAX_TERMS` terms
`{source, negate, shift}`, with source x, x2 or x3. To use another symmetric odd-length
parent filter:

1. set `PARENT_LEN`, `MAX_TERMS` and the table;
2. keep `FRAC` at least the largest shift;
3. widen `DATA_W` if the new filter's sum |h| raised to the number of stages needs more
   guard bits;
4. update `COEF` in `tb/qmf_ref_pkg.sv` so the reference model follows.

The mode truncations are `GSM_TRIM` and `PDC_TRIM`. The stages follow from the frequency
constants.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* `tb_cse_multiplier_block`: every product against x·c(k), for extreme and random inputs.
* `tb_qmf_filter`: y0 and y1 sample by sample for all five truncations, with random input
  gaps, a flush before each length, full-scale input that saturates, and the one-clock
  latency.
* `tb_qmf_node`: the decimation phase, the output count, both bands and the restart after
  a flush.
* `tb_qmf_tree`: a 4-stage tree. Every subband of every stage is checked on every pulse,
  along with the per-stage latency of s clocks and the pulse counts. Switching off the
  last stage must silence it.
* `tb_mode_control`: the stage and truncation of each mode, a clear only on a real
  change, and random writes.
* `tb_stage_select`: the multiplexer, held data, `ch_count`, and the drop during clear.
* `tb_qmf_channelizer`: the full-size top with its defaults (9 stages, 512 channels). It
  runs GSM → PDC → GSM, with a same-mode write in the middle of a stream. Every frame is
  compared with a reference tree, frame latency and frame counts are checked, and it fails
  if a mechanism (either switch direction, the same-mode write, frames from each filter
  length, stage gating) never occurred.
* `tb_channel_tone`: the full-size top with single tones at channel centres. The strongest
  output slot must be the Gray-coded channel index of the tone, in both modes.

The reference model (`qmf_ref_pkg`) starts from the list of integer coefficients and the
definition of each band. It shares no code with the RTL's shift-and-add structure.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert --top-module tb_qmf_channelizer \
        rtl/qmf_pkg.sv tb/qmf_ref_pkg.sv rtl/cse_multiplier_block.sv rtl/qmf_filter.sv \
        rtl/qmf_node.sv rtl/qmf_tree.sv rtl/mode_control.sv rtl/stage_select.sv \
        rtl/qmf_channelizer.sv tb/tb_qmf_channelizer.sv
    ./obj_dir/Vtb_qmf_channelizer

Compiling the full-size top takes a few minutes, because of the 511 banks. The simulation
itself takes seconds. The block testbenches need only the files below their module.
