# Low-power W-CDMA cell search engine

A W-CDMA handset that switches on knows neither where the base station's
slots and frames begin nor which of the 512 downlink scrambling codes that
cell uses. The standard supports a three-step search:

1. **Slot synchronisation.** Every 2560-chip slot starts with the same
   256-chip primary synchronisation code (PSC). Correlating it against every
   chip position and summing over many slots gives the slot boundary.
2. **Frame synchronisation and code-group identification.** With the PSC,
   every slot also carries one of 16 secondary synchronisation codes (SSC).
   Over the 15 slots of a frame these SSCs spell a code word of a comma-free
   code. The word gives the code group (64 groups), and its cyclic shift
   gives the frame boundary.
3. **Scrambling-code identification.** Each group holds 8 primary scrambling
   codes. Despreading the common pilot channel with each of them shows which
   one the cell uses.

This RTL implements that search as one engine for 2-times oversampled 4-bit
I/Q samples. It is built to cope with two problems of a cheap handset:

- **A large carrier-frequency error.** Correlations are never run over a
  full 256-chip symbol. Each symbol is split into four 64-chip partial
  symbols, and their results are combined by magnitude (partial symbol
  despreading), so a phase rotation within a symbol does little harm.
- **A sampling-clock error of up to about 10 ppm.** The sample-point
  reorder drops or repeats one sample whenever the presumed clock error adds
  up to one sample period. Random sampling per frame (RSPF) picks one of the
  two samples of each chip at random, and picks again every frame.

The design also uses two power-saving techniques, which are its main point:

- Every delay line is a pointer-based circular buffer, so no data shifts.
- Every magnitude `a^2 + b^2` is replaced by a sum of shifted absolute
  values. Multipliers are needed only where the result feeds a coherent sum.

## Data path at a glance

```
 r_i, r_q (4 bit, 2 samples/chip)
   |
 sample_reorder <- spr_controller (drop/stuff from spr_drift)
   |
 rspf (one sample per chip, random phase per frame)
   |  chip_i, chip_q, chip_en
   +--> stage 1: psc_detector x2 -> noncoherent_combiner -> s1_accumulator (SRAM 2560x15) -> max_selector  => h
   +--> stage 2: ssc_detector x2 -> coherent_combiner (PSC as phase ref) -> cfrs_symbol_detector -> cfrs_decoder => g, s
   +--> stage 3: scr_code_gen -> active_despreader x8 -> compare_vote -> majority_selector => k
```

The three stages are pipelined:

- Stage 1 runs all the time, in 15-slot periods.
- Stage 2 takes the newest slot boundary when it is free.
- Stage 3 takes the newest stage-2 result.

Each stage has its own control unit (`s1_ctrl`, `s2_ctrl`, `s3_ctrl`). All
chip positions refer to one free-running slot counter, which counts the
chips leaving RSPF.

Internal bit widths:

| point                                  | bits                       |
|----------------------------------------|----------------------------|
| input samples                          | 4 + 4                      |
| PSC / SSC detector outputs             | 10 per partial symbol      |
| non-coherent sum                       | 23, truncated to 11        |
| stage-1 accumulation (SRAM word)       | 15                         |
| coherent sum                           | 23, truncated to 13        |
| CFRS symbols                           | 15 x 4                     |
| despreader output                      | 21                         |
| vote counters                          | 10                         |

## Preprocessing

### Sample-point reorder

`sample_reorder` keeps the last four samples of each branch. A 5-way mux
selects one tap: "+2" is the undelayed input and "-2" the oldest. The mux
starts at "0".

- Moving one position towards "+" removes one sample from the stream (a drop).
- Moving one position towards "-" repeats one sample (a stuff).

`spr_controller` is a signed phase accumulator. Each sample adds `drift_inc`,
which is the presumed clock error of the search bin in samples per sample,
with 20 fractional bits (1 LSB is about 1 ppm). When the sum reaches +1 or
-1 sample, the mux moves one position and the sum is reduced by one. At the
end of the ±2 range, further corrections are ignored.

At 10 ppm and 7.68 Msample/s the ±2 range lasts about 26 ms, or 2.6
frames. One pass of the search takes three to four frames. In simulation at
about 9.5 ppm both directions still found the right group and code. Late in
the slow-clock run, however, the range was used up. A repeated stage-2 pass
then worked with a slot boundary one chip off and matched only 8 to 10 of
the 15 symbols. Stage 3 did not use that pass. For longer runs, restart the search with
`search_restart`. Choosing the bin, meaning which drift to try next, is left
to whatever drives `spr_drift`.

### Random sampling per frame

`rspf` collects the two samples of each chip (serial to parallel) and passes
on one of them. The choice is set by a 16-bit LFSR. The LFSR steps at the
start of each 15-slot stage-1 period. The engine has no better frame
reference at that point, so this period stands in for the frame.

## Stage 1: slot synchronisation

### Hybrid Golay / matched-filter PSC detector

The PSC is the 16-chip inner sequence `a` repeated with the signs of a
16-element outer code.

`egc16` is an efficient Golay correlator for `a`. It has four
add/subtract butterflies with delays of 8, 1, 4 and 2 chips and all weights
+1. It gives the correlation with `a` at every chip using 6 adders and 15
words of delay. The delay order matters: the more obvious order 8, 4, 1, 2
correlates with a different Golay sequence. The variant with `SEL_B = 1`
swaps the first butterfly's outputs. That variant correlates with `b`, the
SSC inner sequence, which is `a` with its second half negated.

`psc_detector` sends the EGC output through 15 chained 16-chip pointer FIFOs
and adds taps with the outer-code signs. It produces the four 64-chip
partial correlations at every chip. There is one detector per branch, I and
Q. `ptr_fifo` is the delay element used everywhere. Its one pointer reads
the oldest word and overwrites it, and its output is 0 until it has been
filled once.

### Magnitude without multipliers

`mag_approx` computes `alpha|a| + beta|b|`. Here `alpha = 2^d` for
`2^(d-1) <= |a| < 2^d`, and likewise `beta` for `|b|`. A priority encoder
finds `d` and a left shift does the multiply. The result is a monotone,
roughly square-law stand-in for `a^2 + b^2`. It is good enough because the
values are only compared with each other, never used as absolute energies.

### Accumulation and decision

`noncoherent_combiner` adds the approximate magnitudes of the four partial
symbols. Each partial symbol contributes one magnitude, with I from one
detector and Q from the other. The combiner then drops 8 LSBs and saturates
the result to 11 bits.

`s1_accumulator` adds that value into the SRAM word of its chip position,
for 2560 slot-boundary hypotheses over 15 slots. In the first slot of a
period it writes without reading. It is a read-modify-write pipeline of two
clocks, so chips must be at least two clocks apart.

In the last slot, `max_selector` keeps the largest sum. On a tie, the
earlier chip wins. The winner's chip index `h` is the end of the PSC, that
is, the 256th chip of the slot.

## Stage 2: code group and frame boundary

From `h` the controller derives three positions in every slot:

- the slot start, at `h - 255`;
- the start of the SSC window, at `h - 240` (the 16th chip of the SSC, the
  first one the EGC can correlate);
- the capture of the PSC partial correlations, just after chip `h`.

`ssc_detector` runs the EGC for `b`. Every 16 chips it adds the EGC output
into 16 accumulators, one per SSC, with the signs of that SSC's outer code.
The signs come from `ssc_code_rom`: `z(p) · H16[k](p)`. The accumulators are
restarted every 64 chips, which gives four partial symbols per SSC.

`coherent_combiner` uses the PSC partial correlations of the same window as
the channel's phase reference. It forms
`sum_l (sI[k][l]·pI[l] + sQ[k][l]·pQ[l])` for the 16 codes, with one
multiply-add per clock (64 clocks per slot). The 23-bit result is truncated
to 13 bits.

`cfrs_symbol_detector` keeps the index and value of the best SSC of each
slot. After 15 slots, `cfrs_decoder` compares the 15 symbols with every code
word in every cyclic shift, one hypothesis per clock (960 clocks). It keeps
the (group, shift) pair with the most agreeing symbols. The shift gives the
slot number of the first observed slot, which locates the frame boundary.

**Codebook caution.** `cfrs_rom` is not the codebook of the W-CDMA standard.
It is a stand-in of the same shape: 64 words of 15 symbols, 4 bits each.
Word `g` has the symbols `m1·x + m2·x^2 + i` over GF(16), where `x = 2^i`,
`m1 = g mod 15 + 1` and `m2 = g div 15 + 1`. It is comma-free, with a
minimum distance of 10 between any two (word, shift) pairs. To receive real
signals, replace `cfrs_rom` (or `cs_pkg::cfrs_symbol`) with the standard's
table. Nothing else depends on its contents.

## Stage 3: scrambling code

`scr_code_gen` produces the eight primary codes `n = 16·(8g+k)` of group
`g`. It uses one shared y register and eight x registers of the W-CDMA Gold
code. The x start states are not stored. After `load`, the generator
computes them by stepping one register by 16 chips per clock, up to
512 + 8 clocks.

`s3_ctrl` waits until the slot counted as slot 0 begins (from stage 2's `s`
and `h`), then issues `frame_start`. That signal restarts the codes and the
despreaders and clears the votes.

Each `active_despreader` multiplies the chips by its conjugate code, which
only changes signs. It sums 64 chips, adds the shift-based magnitude of four
such sums per 256-chip pilot symbol, and saturates the total to 21 bits.

For each symbol, `compare_vote` gives one vote to the strongest despreader.
On a tie, the lower index wins. After 150 symbols (`NVOTE`, one frame),
`majority_selector` reports `k` and its number of votes. The engine's result
is `s3_code_idx = 8g + k`.

## Timing and interface of the top

- `sample_vld` marks a sample and may be high on every clock. The intended
  clock is 15.36 MHz, which is four clocks per chip.
- `spr_drift` is the signed drift of the current bin, in units of 2^-20
  sample per sample.
- `search_restart` clears the controllers and the reorder position.
- `s1_done`, `s2_done` and `s3_done` are single-clock pulses. They arrive
  with `s1_h`/`s1_peak`, `s2_group`/`s2_slot`/`s2_match` and
  `s3_group`/`s3_code`/`s3_code_idx`/`s3_votes`.
- `frame_start`, `spr_sel`, `spr_drop`, `spr_stuff` and `rspf_phase` are
  made visible for monitoring.
- One full pass takes about three to four frames (30 to 40 ms of signal):
  one stage-1 period, a wait for the slot start plus 15 slots in stage 2,
  and a wait for the frame start plus one frame of votes in stage 3.

## What is this design's own choice

The following were chosen here. They are not fixed by the original
architecture:

- The truncation points: 8 LSBs dropped in both combiners.
- The control timing of all three stages.
- The pipelined scheduling of the stages.
- The vote length of 150 symbols.
- Tie rules: the earliest or lowest index wins everywhere.
- The RSPF random generator.
- The output zeroing of the FIFOs before they fill.
- The use of the stage-1 period as the RSPF frame.
- The computed code start states.
- The computed (not listed) ROM contents.

Parts that are not built:

- Frequency-offset compensation and multiple timing candidates. These are
  only alternatives to the chosen method.
- The logic that steps through clock-error bins.
- Soft-decision use of the SSC weights `w_i`. They are stored, but the
  decoder uses hard symbols.

The SRAM is an inferred array. A real chip would use a 2560-word macro.

## Files and simulation

- `rtl/cs_pkg.sv`: shared constants, types, the PSC/SSC sign tables and the
  GF(16) helpers. Read it first.
- Every other `rtl/<name>.sv` holds one module.
- Every `tb/tb_<name>.sv` is a self-checking testbench. It prints
  `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
  hangs.

To simulate one testbench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/cs_pkg.sv tb/tb_egc16.sv --top-module tb_egc16
./obj_dir/Vtb_egc16
```

What the testbenches check:

- The unit testbenches compare each block with a reference model written
  independently in the testbench. Examples: direct 256-chip correlations
  for the PSC and SSC detectors, the Gold code built from its two
  m-sequences, and GF(16) arithmetic from log tables for the codebook.
- `tb_cell_search_top` runs the whole engine at its default size. It
  generates a downlink with PSC, SSC and a scrambled pilot for a chosen
  group, code and frame offset, adds noise and a clock error, and runs two
  searches: one with a fast clock (the reorder must drop samples) and one
  with a slow clock (it must stuff). It checks the slot boundary, group,
  frame offset and code of each search. It also requires that every
  mechanism was exercised: drop, stuff, RSPF phase change, all three stage
  results and frame-start alignment. It runs in under a second of
  simulator time on a desktop.
- `tb_cs_workload_10ppm` is the same end-to-end test at about 9.5 ppm
  clock error, with codes and frame offsets at the edges of their ranges.
  It checks only the first stage-2 pass of each run and reports the later
  ones (see the reorder range above).
- `tb_s3_ctrl` lowers `NVOTE` to 5 so that the vote ends quickly.
  `tb_egc16` tests both EGC variants. Other testbenches that pass a
  parameter list pass the block's own sizes.
