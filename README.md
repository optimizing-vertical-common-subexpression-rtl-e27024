# Low-complexity FIR channel filters by coefficient partitioning

A software-radio channelizer pulls narrow channels out of a wideband signal
with a bank of long FIR filters running at the wideband rate. With fixed
coefficients, every multiplier becomes a shift-and-add network, and the cost
of that network is the number of full adders in it. That number depends on
the number of adders and also on their *width*: an adder that sums `x` and
`x >> 9` is nine bits wider than one that sums `x` and `x >> 0`.

This RTL implements channel filters whose shift-and-add multipliers are
generated by combining three known techniques so that the adders stay short:

1. **Vertical common subexpressions (VCS).** Coefficients `h(k)` and
   `h(k+1)` (or `h(k+2)`) often have a nonzero CSD digit at the same bit
   position. In a direct-form filter those two digits multiply `x[n-k]` and
   `x[n-k-1]` by the same power of two, so they are replaced by one term on
   `x[n-k] + x[n-k-1]` (or the difference, or the `k+2` versions). The sum is
   formed once per input sample and delayed, not recomputed per tap.
2. **Pseudo floating-point (PFP) coding.** Each tap's term list is written as
   `2^shift * (span part)`: the span part is added relative to the leading
   term, and the final power of two is wiring.
3. **Coefficient partitioning.** The span part is split in half. The MSB
   half and the LSB half are each summed relative to their own leading term,
   so neither half's adders see the full span; only the last adder of the tap,
   which joins the halves, is as wide as the whole coefficient.

## Worked example

The smallest case, which is also the default configuration, has two 12-bit
coefficients

    h(0) = 2^-4 - 2^-6 - 2^-9 + 2^-11   (= 186 / 4096)
    h(1) = 2^-4 - 2^-6 - 2^-9 + 2^-12   (= 185 / 4096)

The digits at 2^-4, 2^-6 and 2^-9 line up, so with `x2 = x1 + x1[-1]`

    y = 2^-4 (x2 - 2^-2 x2 - 2^-5 x2 + 2^-7 x1)  +  2^-12 x1[-1]

The span part (span 7) is cut after 3 positions:

    MSB half:  x2 - 2^-2 x2
    LSB half:  -2^-5 (x2 - 2^-2 x1)

so tap 0 costs one adder for `x2` (shared by every tap that uses it), one
adder per half, and one adder joining them, three adders deep. Tap 1 keeps
only `2^-12 x1[-1]` and needs no multiplier at all; it is one more input of
the adder that sums the taps.

In integer form (units of 2^-12) the hardware computes
`S_hi = 4*x2 - x2`, `S_lo = 4*x2 - x1`, `T = 32*S_hi - S_lo`,
`y = 2*T + x1[-1] = 186 x[n] + 185 x[n-1]`.

## How the multipliers are generated

The multipliers are fixed, so the whole method runs during elaboration, in
constant functions, and the result is hardwired:

* `cpm_fir.make_plans` converts every coefficient to CSD (non-adjacent form),
  then walks the taps in order. For tap `k`, each remaining digit, MSB first,
  is paired with a digit at the same position in `h(k+1)` if there is one
  (giving `x1 + x1[-1]` for equal signs, `x1 - x1[-1]` for opposite signs),
  else in `h(k+2)` (`x1 +/- x1[-2]`); the partner digit is removed from the
  later coefficient. Unpaired digits stay terms on `x1`.
* `cpm_pkg::plan_tap` codes each tap's terms as order `imax`, lowest position
  `imin` and span `M = imax - imin`, puts the terms within `floor(M/2)` of the
  order into the MSB sub-filter and the rest into the LSB sub-filter, and
  records each sub-filter's terms relative to its own leading term, the
  inner shift `gap` between the halves, and the signs.

The result for each tap is a `cpm_pkg::tap_plan_t`:

| field | meaning |
|---|---|
| `hi[]`, `lo[]` | terms of each half: enable, subtract, operand, offset below the half's leading term |
| `span_hi`, `span_lo` | span of each half, which sets its adder width |
| `gap` | inner shift applied to the MSB half before the joining adder |
| `lo_neg` | the LSB half is subtracted |
| `tap_neg`, `imin` | sign and power-of-two weight of the whole tap, applied as wiring in the tap-summing adder |

A tap with nothing left after pairing (`nonzero = 0`) gets no multiplier.

All arithmetic is exact. The right shifts of the method are done as left
shifts of the more significant operand, so no bit is ever dropped, and the
filter output is the full-precision convolution in units of `2^-B`. Each
adder is sized to what it can hold: a half's adders are `OW + span + 1` bits,
the joining adder `OW + M + 2` bits (`OW = DW + 1`).

## Modules

| module | role |
|---|---|
| `cpm_pkg` | operand encoding, plan types, `plan_tap` (PFP coding and partitioning), the example plan |
| `vcs_gen` | forms `x1`, `x1 +/- x1[-1]`, `x1 +/- x1[-2]` once per sample |
| `cpm_mult` | one tap's multiplier: two half-span adder chains and the joining adder, built from a plan |
| `cpm_fir` | channel filter: runs the method on `COEFS`, tapped delay line of operands, one `cpm_mult` per tap, registered tap-summing adder |
| `downsampler` | keeps one sample in every `R` |
| `cpm_channelizer` | top: `NCH` channel filters on one input, each followed by a downsampler |

## Interfaces and timing

All blocks use one clock `clk` and an asynchronous active-low reset `rst_n`
that clears all sample history. Samples are qualified by a valid bit; at most
one sample is taken per clock, and a low valid simply holds the pipeline.

* `cpm_fir`: `y_out` for the sample taken at one edge is registered at that
  same edge, so it appears with `y_valid` one clock later. One output per
  input. `y_out` is `YW = DW + B + clog2(N+1) + 2` bits, signed, units of
  `2^-B`.
* `downsampler`: counts valid inputs modulo `R`, passes the one at phase 0
  (the first after reset, then every `R`-th), one clock later.
* `cpm_channelizer`: channel outputs `y_out[c]` appear with `y_valid` two
  clocks after input sample `m*R`; all channels decimate in step.

The combinational path from the input through a VCS adder, a tap multiplier
and the tap-summing adder is not pipelined. For long filters the tap sum is a
long adder chain as written; a synthesis tool will rebalance it, but a
design meant for a high clock rate would add pipeline registers there.

## Parameters

| parameter | default | notes |
|---|---|---|
| `DW` | 8 | input width |
| `B` | 12 | coefficient fractional bits; `COEFS` entries are `B+1`-bit two's complement, value `COEFS[k] / 2^B` |
| `N` | 2 | taps per channel filter |
| `COEFS` | `{185, 186}` | `COEFS[k] = h(k)`, packed, index 0 in the low bits; in the top one set per channel |
| `NCH` | 1 | channels |
| `R` | 350 | decimation factor |

The defaults are the worked example above. The target application, D-AMPS
channel filters at a 34.02 MHz wideband rate with 30 kHz channels, uses
260 to 1180 taps of 16-bit coefficients and decimation by 350; such a filter
is built by setting `N`, `B = 16` and a coefficient set, which is not
included here. `MAX_TERMS = 12` in `cpm_pkg` bounds the terms of one tap and
covers coefficients up to 22 bits.

## Where this departs from the method as published, or fills gaps

* The published worked example writes the `[1 1]` subexpression once as a
  difference, `x1 - x1[-1]`, while its equations only add up with a sum. The
  sum is built: equal-sign digits use `x1 + x1[-1]`, opposite-sign digits
  `x1 - x1[-1]`.
* The order in which subexpressions are picked (MSB first, neighbour `k+1`
  before `k+2`, greedy) is this design's choice; the method lists the four
  patterns without a priority.
* The filter is direct form with a tapped delay line carrying the operands.
* Rounding or truncation is not applied anywhere.
* Frequency translation of channels ahead of the filters, and the choice of
  coefficients for each channel, are outside this RTL.
* Reset, valid handshakes, latency and the decimation phase are this
  design's own.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb_vcs_gen` | all five operands against a model, with random gaps in valid |
| `tb_cpm_mult` | the example plan against `92*x2 + x1` and its adder widths (12, 12 and 18 bits), and a plan with every operand kind and a negative leading digit against the signed-digit sum, over random and extreme operands |
| `tb_cpm_fir` | the example filter and a 16-tap, 16-bit filter (full-scale, zero, equal and opposite neighbours) against direct convolution, latency 1; also that every operand kind and an LSB half occur |
| `tb_downsampler` | one in `R = 5` kept, exact timing, with gaps |
| `tb_cpm_channelizer` | 3 channels x 12 taps, `R = 7`, against convolution plus decimation; counts operand kinds, LSB halves, negative taps, emptied taps, input stalls and decimated outputs, and fails if any never occurs |
| `tb_cpm_channelizer_full` | the top at its defaults: 3500 samples, ten decimated outputs, each checked |
| `tb_damps_bank` | 4 channels x 260 taps, 16-bit, `R = 350`: every decimated output of every channel against convolution, same mechanism counts as `tb_cpm_channelizer` |
| `tb_damps_filter` | a 1180-tap, 16-bit filter with a generated symmetric coefficient set whose end-coefficients are small, against convolution; reports how many terms the subexpressions removed (3256 terms for 5096 CSD digits) and the total multiplier adder width with and without partitioning (34611 against 41757 bits) |

To run one with Verilator:

    verilator --binary --timing -y rtl -y tb +libext+.sv rtl/cpm_pkg.sv \
        tb/tb_cpm_fir.sv --top-module tb_cpm_fir -o sim
    ./obj_dir/sim

The two D-AMPS-sized testbenches take about a minute each to build.
The simulator has no X state, so every register that is read is reset.
