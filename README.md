# Low-power multi-standard decimation filter (GSM / DECT / UMTS)

A software-defined-radio receiver that handles GSM, DECT and UMTS with one
front end digitises the baseband with an oversampling sigma-delta modulator.
This RTL is the digital filter behind that modulator. It lowers the sample
rate by 4·M in three decimating stages and selects the channel of the active
standard. Most of its power goes into clocking and switching activity, so the
design makes three choices to cut it:

* **Divided and gated clocks.** Only the first stage sees the fast clock.
  Every later stage is clocked only on the cycles on which it has work.
  Those clocks are derived from the first stage's sample counter and
  switched off by clock-gating cells at all other times.
* **A partitioned channel selector.** The last stage holds two separate
  filters. One has fixed coefficients for UMTS. The other has loadable
  coefficients and serves GSM and DECT, whose filters are about twice as
  long. Only the filter of the selected standard is ever clocked.
* **Cheap arithmetic in the direct-form filters.** Constant coefficients
  are recoded into mixed radix-2/radix-4 Booth digits when the design is
  elaborated. Run-time coefficients use radix-4 Booth partial products. In
  every filter, the partial products of all taps are summed together in one
  Wallace tree of carry-save adders, followed by a single carry-propagate
  adder.

This is the "clock-tree distribution + two-way selector partitioning +
optimised operators" variant of the architecture, with clock gating of the
idle stages.

## Signal path and rates

```
 sigma-delta   +-----------------+  fs/M  +----------+ fs/M  +-----------+ fs/2M  +---------------+ fs/4M
 modulator --->| CIC integrators |------->| CIC combs|------>| half-band |---+--->| UMTS selector |---+--> out
  (+/-1, fs)   |  N=5, /M        |        |  N=5     |       |  11 taps  |   |    |  17 taps      |   |
               +-----------------+        +----------+       +-----------+   |    +---------------+   |
                 free-running clk          gated clk          gated clk      +--->| GSM/DECT sel. |---+
                                                                                  |  33 taps, load|
                                                                                  +---------------+
```

| stage | module | input rate | output rate | word |
|---|---|---|---|---|
| CIC integrators + ÷M down-sampler | `cic_integrator` | fs | fs/M | 22 bits (IN_W + N·log2 M) |
| CIC combs, scaling | `cic_comb` | fs/M | fs/M | 16 bits |
| half-band, ÷2 | `halfband_filter` (`const_fir_dec2`) | fs/M | fs/2M | 16 bits |
| UMTS selector, ÷2 | `umts_selector` (`const_fir_dec2`) | fs/2M | fs/4M | 16 bits |
| GSM/DECT selector, ÷2 | `gsm_dect_selector` | fs/2M | fs/4M | 16 bits |

With the defaults (M = 16) the chain delivers one output per 64 input
clocks. The CIC gain is M^N = 2^20. The comb drops the low 6 bits, so a
full-scale ±1 input gives ±2^14 at the half-band input. This leaves 6 dB of
headroom for the half-band and selector gains, which are close to 1. The
filters scale their Q1.15 products by 2^-15, rounding down (floor), and
saturate to 16 bits.

The CIC uses the usual Hogenauer form. The integrators wrap around in
two's complement, and the wrap cancels in the combs. The integrators are
pipelined, which delays the CIC response by N input samples in total. CIC
output k is therefore the N-fold length-M moving sum of the input, taken at
input k·M + M − 1 − N.

Both ÷2 filters are polyphase. The first sample of each pair waits in a hold
register. When the second sample arrives, the even and odd delay lines shift
together, so the delay lines and the output run at half the input rate.
Output m is `sum_k h[k]·x[2m+1−k]`, with the input counted from 0 after
reset. The output register is loaded on the same edge that accepts the
second sample. To make that possible, the products are formed from the
window the delay lines are about to hold.

## Clocking: divided clocks made by gating

This is the part that needs the most care when the design is changed.

Every stage after the integrators has an output `clk_req`. It is high on
exactly those cycles on which at least one of the stage's flip-flops may
change:

```
clk_req = in_valid | out_valid            (comb, half-band, UMTS)
clk_req = in_valid | out_valid | coef_we  (GSM/DECT selector)
```

The `out_valid` term is needed because a stage must be clocked once more to
clear its one-cycle output strobe. The coefficient-write term is needed so
that coefficients can be loaded while the GSM/DECT filter carries no
traffic. In the top level, each stage's `clk_req` drives the enable of its
own `clk_gate` cell. The stage is clocked by that cell's output. Nothing
else in the stage changes on ungated cycles, so gating is invisible to the
function: every stage also works on a free-running clock, and that is how
the unit testbenches run them.

The resulting clocks are the divided clocks of the architecture. The
integrator's modulo-M sample counter sets the timing of all of them. The comb
clock pulses on 2 of every M cycles: one sample, one strobe clear. The
half-band clock pulses on 3 of every 2M cycles. The active selector's clock
pulses on 3 of every 4M cycles. The inactive selector receives no samples, so
its clock never runs.

`clk_gate` is the standard glitch-free cell: a latch that is transparent
while `clk` is low, followed by an AND gate. The enable must settle before
the rising edge, like any flip-flop input. Since the enables come from
flip-flops of the same clock tree, they do. A library ICG cell can replace
`clk_gate` one for one. Lint and synthesis report the latch, which is
intended.

**Reset is asynchronous (active low), on purpose.** A stage whose clock is
gated off cannot see a synchronous reset. In simulation, drive `rst_n` from 1
to 0: a signal that starts at 0 has no falling edge. Without that edge, a
stage whose clock stays off keeps its random power-up state.
`tb_decim_chain_top` shows how.

## Arithmetic of the direct-form filters

### Fixed coefficients: mixed-radix Booth recoding (`const_fir_dec2`)

At elaboration time, a constant function splits the bits of each 16-bit
coefficient into groups of one bit and groups of two bits:

* a one-bit group at bit i is a radix-2 Booth digit `c[i-1] - c[i]`, in −1..1;
* a two-bit group at bit i is a radix-4 Booth digit
  `-2c[i+1] + c[i] + c[i-1]`, in −2..2.

Any way of cutting the bits into such groups represents the coefficient
exactly, because the Booth digits telescope. A small dynamic programme picks
the cut with the fewest non-zero digits, preferring the two-bit group on a
tie. For example, 2 becomes a single radix-4 digit +1 at bit 1, where plain
radix 4 needs −2 + 4. Plain radix 4 is never better than plain radix 2, so
one radix per coefficient would always choose radix 4. The mix of group
sizes inside a coefficient is what saves partial products. With the built
coefficients:

| filter | taps | partial products (mixed) | plain radix 4 | one per bit |
|---|---|---|---|---|
| half-band | 11 (4 zero) | 31 | 37 | 176 |
| UMTS | 17 (2 zero) | 68 | 74 | 272 |

Each non-zero digit becomes one partial product. The product is the tap
sample, sign-extended and shifted by the digit's weight. For a negative
digit it is bit-inverted. Inverting a shifted word gives −v − 1, so one extra
constant operand adds the number of negative digits back. All partial
products of all taps go into one `csa_tree`, and a single adder turns the
tree's sum and carry vectors into the result. Zero coefficients produce no
hardware. To change the filter, change the coefficient table; the recoding
and the tree adapt.

### Loadable coefficients: radix-4 Booth (`gsm_dect_selector`, `booth_r4_pp`)

The GSM/DECT coefficients are registers, so they cannot be recoded in
advance. Each tap has a radix-4 Booth generator that produces 8 partial
products for a 16-bit coefficient. A multiple of x or 2x is inverted before
the shift when its digit is negative. The missing +1s are collected in one
"negation bits" word per tap. All 33 × 9 = 297 operands are reduced by one
Wallace tree of 13 levels, followed by one carry-propagate adder.

### Wallace tree (`csa_tree`)

Level by level, the operands are taken in threes and replaced by a
full-adder row: the sum is `a^b^c` and the carry is the majority, shifted
left by one. Operands that do not fill a group of three pass through. This
continues until two words remain. Only 3:2 compressors are used.

## Switching standards and loading coefficients

* `std_sel` (`dec_pkg::std_e`: GSM = 0, DECT = 1, UMTS = 2) steers the
  half-band output to one selector filter. Switch between bursts. Each
  selector keeps its delay line and polyphase phase while it is idle, and
  continues from them when selected again.
* After reset, the GSM/DECT filter holds the GSM set. For DECT, write the 33
  DECT coefficients (`coef_we`, `coef_addr`, `coef_data`, one per clock;
  `dec_pkg::DECT_COEF`) before selecting DECT, and write the GSM set back
  before returning to GSM. A write takes effect from the next output on.
* `out_valid` pulses once per channel sample. `out_data` comes from the
  selector that produced it.
* `stage_clk_en` exposes the four gate enables {GSM/DECT, UMTS, half-band,
  comb}, so the gating can be observed.

## Parameters and coefficient sets

| parameter | default | where |
|---|---|---|
| `IN_W` | 2 (±1 from the modulator) | `dec_pkg`, top |
| `DATA_W` | 16 | inter-stage samples |
| `COEF_W`, `FRAC_W` | 16, 15 (Q1.15) | `dec_pkg` |
| `CIC_N` | 5 (modulator order 4, plus 1) | top |
| `CIC_M` | 16, a power of two | top |
| half-band / UMTS / GSM / DECT taps | 11 / 17 / 33 / 31 (padded to 33) | `dec_pkg` |

The coefficient sets in `dec_pkg` are Hamming-windowed sinc filters,
normalised to unity DC gain and rounded to Q1.15:
`h[n] = round(2^15 · w[n]·2fc·sinc(2fc(n−(L−1)/2)) / Σ)`, with
`w[n] = 0.54 − 0.46·cos(2πn/(L−1))` and fc relative to the filter's input
rate. The values are:

* half-band: L = 11, fc = 0.25, odd-offset taps forced to 0, centre tap 0.5;
* UMTS: L = 17, fc = 0.20;
* GSM: L = 33, fc = 0.08;
* DECT: L = 31, fc = 0.11.

The GSM and DECT filters are about twice the UMTS length, as the
partitioning assumes.

## How far to trust it, and where it departs from the published architecture

Taken from the architecture:

* the three-stage cascade: CIC, then half-band, then channel selector;
* the rates fs, fs/M, fs/2M and fs/4M;
* the polyphase ÷2 filters;
* the two-way split of the selector (fixed UMTS filter, configurable GSM/DECT
  filter);
* clock gating of idle stages;
* clocks derived by division from the CIC;
* mixed radix-2/radix-4 Booth for the fixed coefficients;
* radix-4 Booth for the run-time ones;
* one Wallace tree per filter, followed by a carry-propagate adder.

This design's own choices, because no values were published:

* all word widths;
* the CIC order and M (one M for all three standards);
* every coefficient and filter length;
* how the mixed-radix groups are chosen;
* floor scaling and saturation;
* the `clk_req` enables;
* the latch-and-AND gating cell;
* the asynchronous reset;
* the coefficient write port and its GSM reset contents.

Consequently the filters are functional placeholders. They are not
specified to meet any standard's adjacent-channel masks. Replace the tables
in `dec_pkg` with real designs before using the chain in a receiver.

Not included:

* the sigma-delta modulator: analog, and only the source of the samples;
* the MAC-unit variants of the filters (time-multiplexed radix-4 Booth
  multiply-accumulate with carry-save accumulation);
* the variant that splits GSM and DECT into two fixed-coefficient filters;
* the baseline designs without these optimisations.

These were alternatives in the architecture study. They are not part of the
configuration built here.

No timing, area or power analysis has been done. After generic synthesis the
top has about 1.7 k flip-flop bits, most of them the 33 coefficient
registers and the delay lines of the GSM/DECT filter.

## Verification

Each testbench compares the hardware with a reference computed directly from
the definitions, using 64-bit integers: moving sums, binomial differences and
convolution sums. Each ends with `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_cic_integrator` | an output exactly every M accepted samples (with input gaps); value = N-fold running sum delayed by N, mod 2^22 |
| `tb_cic_comb` | output = N-th difference, scaled; `out_valid` one cycle after each sample; `clk_req` low when idle |
| `tb_halfband_filter`, `tb_umts_selector` | every 2nd sample produces an output one cycle later; values vs. direct convolution; full-scale runs force saturation |
| `tb_gsm_dect_selector` | GSM reset set, loaded DECT set, then random coefficients including −32768 and 32767 written while data flows |
| `tb_csa_tree` | sum + carry = Σ operands for 1, 2, 3, 7 and 40 operands |
| `tb_clk_gate` | enable changes in the low phase act at the next edge; changes in the high phase never reach `gclk`; pulse count |
| `tb_decim_chain_top` | default parameters, sigma-delta-coded sine in; segments GSM → UMTS → DECT → GSM with coefficient loads; every output value, exact 64-cycle output spacing, the idle selector never clocked, comb/half-band clock duty, and a count of each mechanism |

`tb_ref_pkg` holds the shared reference arithmetic.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dec_pkg.sv tb/tb_ref_pkg.sv tb/tb_decim_chain_top.sv \
    --top-module tb_decim_chain_top
./obj_dir/Vtb_decim_chain_top
```

Substitute any other testbench name for a single block. The full-chain test
runs in a few seconds at the default parameters. `rtl/dec_pkg.sv` must come
first, because every module reads its widths and tables.

## Files

`rtl/`:

* `dec_pkg`: types, defaults and coefficient tables;
* `decim_chain_top`: the chain and its clock gates;
* `cic_integrator`, `cic_comb`: the CIC stage;
* `halfband_filter`, `umts_selector`: wrappers of `const_fir_dec2`, the
  fixed-coefficient polyphase filter;
* `gsm_dect_selector`, `booth_r4_pp`: the loadable-coefficient filter;
* `csa_tree`: the Wallace tree;
* `clk_gate`: the clock-gating cell.

`tb/`: one `tb_<module>` per block, plus `tb_ref_pkg`.
