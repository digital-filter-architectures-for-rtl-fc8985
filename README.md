# Multi-standard decimation filters for a sigma-delta receiver

A sigma-delta A/D converter in a wireless receiver delivers a 1-bit stream at
a rate far above the channel bandwidth (64 MHz here). Its quantisation noise
is pushed up to high frequencies. Before the baseband DSP can use the signal,
that noise and all out-of-band signals must be filtered off and the rate
brought down to roughly the channel's Nyquist rate. One FIR filter doing this
in a single step would need a very high order, because the transition band is
narrow compared with the input rate. The designs here therefore split the
decimation into several cheap stages. Multiplier-less CIC (cascaded
integrator-comb) filters take the first, large rate reduction. Short FIR
filters then clean up what the CICs leave behind: the droop in the pass band
and the aliasing in the transition band.

Two decimators are provided. They sit side by side in one top level, sharing
only the clock and reset:

* **Architecture I: two-stage decimator with a MAC unit** (`decim_arch1`).
  A fifth-order CIC decimates by 16. A corrector FIR filter then decimates
  by 2. The FIR uses one multiply-accumulator for all of its taps, with the
  data and coefficients held in RAM. The coefficients can be loaded at run
  time. Overall decimation is 32.
* **Architecture II: cascaded multistage chain for two standards**
  (`decim_chain_arch2`). Every stage decimates by 2. The first CIC stage is
  shared. After it the chain splits into a 3-stage path (total /8) and a
  5-stage path (total /32). Both paths end in two half-band filters. These
  use canonic-signed-digit (CSD) shift-and-add networks in place of
  multipliers.

A third, small unit sits next to them: a serial binary-to-CSD converter
(`csd_converter`). It is the hardware form of the conversion rule that gives
the half-band coefficients their CSD digits.

```
                    Architecture I
 sd bit ─► ±LEVEL map ─► CIC N=5 /16 (HDF) ─► corrector FIR /2 (1 MAC) ─► DATA_OUT (24 b)
  64 MHz                   4 MHz, 16 b                                     2 MHz

                    Architecture II
 sd bit ─► ±LEVEL map ─► CIC5 /2 ─┬─► HB10 /2 ─► HB14 /2 ───────────────────────► out8  (8 MHz, 16 b)
  64 MHz                  32 MHz  └─► CIC5 /2 ─► CIC5 /2 ─► HB10 /2 ─► HB14 /2 ─► out32 (2 MHz, 16 b)
```

## Clocking and data flow

Everything runs on one clock, `clk`. Reset `rst_n` is asynchronous and active
low. A sample rate is not a separate clock. It is a `valid` strobe that
enables the registers of that rate. `sd_valid` marks an input bit. Each
decimating stage produces its own `out_valid` for the next one. The
integrators run on the input strobe. The decimation registers and combs run
on the stage's decimated strobe (CK_DEC in the classic CIC description). With
`clk` at 64 MHz and `sd_valid` high on every clock, the design runs at the
rates shown above. A slower input simply leaves gaps between strobes.

Every stage accepts at most one sample per clock. Only the corrector FIR
puts a limit on the input rate (see below).

## Input mapping

The modulator's bit is turned into a 14-bit two's-complement word:
+4182 for a 1 and −4182 for a 0 (`sd_input_map`, one register stage). 4182
is 0x1056, a little over a quarter of the 14-bit range. This leaves the CICs
headroom for the modulator's overshoot. `LEVEL` and the width are parameters.

## CIC stages

A CIC decimator of order N, rate change R and differential delay M has the
transfer function ((1 − z^−RM)/(1 − z^−1))^N. This is N cascaded moving sums
of length RM, with a DC gain of (RM)^N. It is built from N integrators
(`y += x`) at the input rate, a decimation register that keeps every R-th
integrator value, and N combs (`y = x − x delayed by M`) at the output rate.
No multipliers are needed.

The integrators overflow on any non-zero DC input. This is harmless as long
as every integrator and comb is at least IN_W + N·log2(RM) bits wide and all
use two's-complement wrap-around: the overflows cancel exactly in the combs.
All CIC stages here use that full width in every stage, with no pruning of
low-order bits:

| stage                 | IN_W | N | R  | ACC_W | output                        |
|-----------------------|------|---|----|-------|-------------------------------|
| Arch. I HDF           | 14   | 5 | 16 | 34    | round half-up + saturate → 16 |
| Arch. II first CIC    | 14   | 5 | 2  | 19    | top 16 bits                   |
| Arch. II /32 CICs     | 16   | 5 | 2  | 21    | top 16 bits                   |

The integrators are chained through their registers, so the cascade is
pipelined. The decimated output equals the ideal filter's output delayed by
N − 1 input samples. A stage's `out_valid` pulses 2 clocks after the
`in_valid` of the R-th input: one clock for the decimation register, one for
the combs.

There are two versions:

* `hdf_cic` (Architecture I) puts a multiplexer in each integrator's
  feedback path. When `int_en[k]` is low, the stage forgets its history
  (`reg <= x`). When `comb_en[k]` is low, that comb's delay register is held
  at zero, so the comb passes its input straight through. Index 5 is the
  first stage and index 1 the last. Holding all enables low for a while and
  then raising them flushes the filter without a reset. For normal operation
  tie all of them high. The 34-bit result is rounded to 16 bits. With R = 16
  the DC gain is 16^5 / 2^18 = 4, so a full ±4182 input comes out as
  ±16728.
* `cic_decimator` (Architecture II) is the plain adder-plus-register and
  subtracter-plus-register form, with no multiplexers. It is built from
  `cic_integrator` and `cic_comb`. It keeps the top 16 bits, which is a
  truncating division. For the first stage (14 bits in, 16 out) this gives a
  gain of 4. For the later stages (16 in, 16 out) the gain is 1.

## Corrector FIR with a single MAC (Architecture I)

This is the most involved block. It is a transversal FIR filter that
decimates by 2. One arithmetic unit is time-shared over all taps.

**Storage.** `fir_data_ram` is a 64-word × 16-bit circular buffer. Each new
HDF output is written to it. It has one write port and two combinational
read ports. `fir_coef_ram` holds 32 words × 20 bits. It is written over the
control bus (`coef_we`, `coef_addr`, `coef_wdata`) and can be read back
(`coef_rdata`, combinational from `coef_addr`). Reset clears it, so the
filter outputs zero until it is loaded.

**Sequencer** (`corrector_fir`). After every second input sample it issues
the terms of one output, one term per clock, newest sample first:

* `esym = 1` (symmetric coefficients): NTAPS/2 = 16 terms. Term j reads
  x(n−j) on port A and x(n−31+j) on port B, and uses coefficient j. A
  linear-phase 32-tap filter thus costs 16 clocks. Only coefficient
  addresses 0–15 are used.
* `esym = 0`: 32 terms, with term j = x(n−j)·c(j). Port B is forced to zero.

Right after reset the buffer holds fewer than 32 samples. The sequencer
masks the missing older samples to zero, so the first outputs are those of a
filter started from rest. This makes the output independent of the RAM's
power-up contents.

**MAC pipeline** (`fir_mac`). There are five register stages. The stages
are: data registers; pre-adder (a + b, 17 bits); multiplier input registers
(17-bit sum, 20-bit coefficient); 17 × 20 product (37 bits); 43-bit
accumulator. The coefficient must reach the multiplier input in the same
clock as its pre-added data pair. For this, the sequencer drives the
coefficient RAM address two clocks behind the data address. `first` and
`last` tags travel down the pipeline with each term. The accumulator loads
on `first` and adds otherwise. On `last`, bits 42..3 of the sum go into the
40-bit output register. A new output can therefore start on the clock after
the previous output's last term.

**Output formatter** (`output_formatter`). It divides the 40-bit value by
2^7 with round-half-up and saturates it to 24 bits. `clipped` flags a
saturated word. `data_out` appears 7 clocks after the last term.

**Scaling.** Scale the coefficients so that 1.0 = 2^18, e.g. 20-bit signed
coefficients with magnitude below 2.0. Then `data_out` = y · 2^8, where y
is the filter output in the 16-bit input scale. That is 16 integer bits and
8 fraction bits.

**Throughput.** An output request arrives every two input samples. Plain
mode needs 32 clocks per output, so the input may arrive at most every 16
clocks. With one input bit per clock into the /16 CIC, there is one FIR
input every 16 clocks, which just fits. Symmetric mode has twice that
margin. A request that arrives while the previous output is still being
issued is dropped, and `overrun` pulses for one clock.

**Loading coefficients.** The bus can be written at any time. A write during
a computation affects only the terms issued after it. To change filters
cleanly, write while the input is stopped, or accept one mixed output.

## Half-band filters with CSD multipliers (Architecture II)

A half-band filter has its cut-off at a quarter of the input rate. Its
impulse response is symmetric, and every second tap is zero except the
centre tap. An order-L filter (L + 1 taps) therefore has only ceil(L/4) + 1
distinct non-zero coefficients. `halfband_decimator` keeps a delay line of
L + 1 samples. It adds the symmetric sample pairs first and multiplies each
sum by its coefficient:

    y = h(c)·x(c) + Σ over odd k of h(c−k)·(x(c−k) + x(c+k)),   c = L/2

It computes y only for every second input, which is the decimation by 2.
The result is rounded half-up to 16 bits and saturated. `out_valid` comes 2
clocks after the even-numbered input. The group delay is L/2 input samples.

**Coefficients** (`decim_pkg::hb_tap`). Each filter is a Hamming-windowed
sinc with cut-off at fs/4, w(n) = 0.54 − 0.46·cos(2π(n+1)/(L+2)) for tap n.
The taps are normalised to unity DC gain and rounded to 8-bit signed values
with 7 fraction bits. The largest side tap was nudged by 1 LSB where needed,
so that the taps sum to exactly 128:

| order | centre | ±1 | ±3  | ±5 | ±7 |
|-------|--------|----|-----|----|----|
| 10    | 64     | 38 | −7  | 1  | –  |
| 14    | 64     | 40 | −10 | 3  | −1 |

**CSD multipliers.** In canonic signed digit form each digit is −1, 0 or +1
and no two adjacent digits are non-zero. This gives the fewest non-zero
digits of any signed-digit form: at most (n+1)/2 for n digits, and about a
third fewer than plain binary on average. `decim_pkg::to_csd` converts each
constant at elaboration time. `csd_const_mult` then builds the product as a
sum of shifted copies of the input, added for +1 digits and subtracted for
−1 digits. For example, 38 = 2^5 + 2^3 − 2^1 takes three terms. No
multiplier is generated.

**The conversion rule.** Scan the binary number from the LSB upwards with
one bit of carry state. At each position the pair (b[i+1], b[i]) and the
carry decide the digit and the next carry:

| carry | b[i+1] b[i] | digit | next carry |
|-------|-------------|-------|------------|
| 0     | 0 0         | 0     | 0          |
| 0     | 0 1         | +1    | 0          |
| 0     | 1 0         | 0     | 0          |
| 0     | 1 1         | −1    | 1          |
| 1     | 0 0         | +1    | 0          |
| 1     | 0 1         | 0     | 1          |
| 1     | 1 0         | −1    | 1          |
| 1     | 1 1         | 0     | 1          |

`to_csd` applies this rule in a loop. `csd_converter` applies it in
hardware, one bit per clock. The caller presents b[i] and b[i+1], with
`start` on the LSB, and gets `dig_nz`/`dig_neg` one clock later. For an
n-bit two's-complement value, feed the sign bit as b[n] (sign extension);
the n digits then give the value modulo 2^n.

## Top level

`multistandard_decimator` has no parameters. Its ports are those of the two
architectures, with `a1_` and `a2_` prefixes, plus the `csd_` converter
ports:

| port group | signals |
|---|---|
| Arch. I input/control | `a1_sd_valid`, `a1_sd_bit`, `a1_int_en[5:1]`, `a1_comb_en[5:1]`, `a1_esym` |
| Arch. I coefficient bus | `a1_coef_we`, `a1_coef_addr[4:0]`, `a1_coef_wdata[19:0]`, `a1_coef_rdata[19:0]` |
| Arch. I outputs | `a1_hdf_valid/a1_hdf_data[15:0]` (CIC output), `a1_out_valid/a1_data_out[23:0]`, `a1_clipped`, `a1_overrun` |
| Arch. II | `a2_sd_valid`, `a2_sd_bit`, `a2_path_en[1:0]` ([0] enables the /8 path, [1] the /32 path), `a2_cic1_*`, `a2_out8_*`, `a2_out32_*` (16-bit) |
| CSD converter | `csd_start`, `csd_bit_valid`, `csd_b_i`, `csd_b_i1`, `csd_dig_valid`, `csd_dig_nz`, `csd_dig_neg` |

A disabled Architecture II path receives no strobes, so its registers stop
toggling. Its last output stays on the port.

Only one receive channel is built per architecture. An I/Q receiver
instantiates the chosen architecture twice.

## Where this design departs from, or adds to, its source

The filter structures, orders, decimation factors, the 5-stage CICs, the
shared first comb, the RAM-based single-MAC corrector with its pre-adder and
symmetric mode, the 17 × 20 multiplier, the 43-bit accumulator, the 40-bit
output register, the 24-bit `DATA_OUT`, the 8-bit half-band coefficients,
the CSD conversion rule and the ±4182 input level all follow the original
design. The following points are this implementation's own choices:

* **Register widths.** The source builds the Architecture II integrators
  and combs with 14-bit adders. A 14-bit register cannot hold the 5-bit
  growth of a fifth-order /2 CIC, so all CIC stages here use the full
  Hogenauer width (19 and 21 bits). The source's pruned widths for the
  Architecture I CIC (66 bits at the input, down to 19 at the last comb)
  belong to a much wider input word. They are not used: all 34 bits are
  kept. The shifter that the source places in front of those integrators
  is not described, so the mapped 14-bit input enters directly.
* **Half-band orders.** The /8 and /32 paths both end in an order-10 and an
  order-14 half-band filter. The source also calls the second one
  "16th order". A 16th-order half-band filter has zero end taps, so it is
  the same filter.
* **Coefficients.** The half-band coefficients above were designed for
  this implementation. The source's own coefficient values and its
  pass-band ripple (0.001) and stop-band (−60 dB) targets were not
  reproduced. 8-bit windowed half-band filters of these orders give much
  less attenuation than −60 dB: the /8 path rejects a 7 MHz tone by only
  about 40 dB (see "Frequency response" below). A user who needs the
  specification must
  substitute longer or wider coefficients in `hb_tap` (the multipliers
  adapt automatically). The corrector FIR has no built-in coefficients:
  they are loaded over the bus.
* **Architecture I output width.** It is 24 bits. The source's summary
  table gives 16-bit output words for both architectures. Take bits
  [23:8] for a 16-bit result.
* **Architecture I decimation.** The CIC decimates by 16 and the FIR by 2,
  for 32 in total. The source's specification table lists 8 for this
  architecture. No split of 8 was given, so 32 was kept.
* **Enable polarity.** `int_en`/`comb_en` high means normal operation. The
  source names the signals but gives no polarity.
* **Not modelled.** The source's corrector diagram shows a control input
  named F-OAD on one of the two data registers in front of the pre-adder.
  Its function is not described, so it has no counterpart here: both data
  registers load on every issued term.
* **Clocking.** There is one clock with enables in place of separate
  CK_IN, CK_DEC and FIR output clocks. Reset behaviour is this design's
  choice.
* **Number of taps.** The corrector FIR has NTAPS = 32 and a 64-word data
  RAM. The source does not give its length.

The analog front end (amplifier, sigma-delta modulator, mixer, oscillator,
DAC) is outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
The reference values come from `tb/decim_model_pkg.sv`. This package computes
the same filters directly from their definitions: CIC impulse responses by
repeated convolution, half-band and FIR outputs as plain dot products, and
the same rounding and saturation. It shares no code with the RTL. A
behavioural first-order sigma-delta modulator (`tb/sigma_delta_model.sv`)
turns a sine wave into the input bit stream.

* `multistandard_decimator_tb` runs the whole top level at its default
  sizes, one input bit per clock. It has three phases:
  1. Symmetric mode with both Architecture II paths enabled.
  2. After a reset, plain mode with 32 distinct coefficients and only the /8
     path enabled.
  3. A flush of the Architecture I CIC through its enables.

  Before phase 1, the CSD converter converts all half-band coefficients. All
  outputs are compared word for word with the model. Output counts are
  checked against the decimation factors. The testbench counts each
  mechanism (coefficient writes and read-back, symmetric and plain MAC
  runs, flush, path disable, CSD conversion) and fails if one never
  happened. It takes well under a minute.
* The block testbenches also check latencies in clocks: 2 clocks per CIC and
  half-band stage and the 5-stage MAC pipeline. They also cover the
  overrun and saturation flags, the contents of both RAMs and every row of
  the CSD rule.

### Frequency response

`decimation_response_tb` measures what the filters do to real signals. A
second-order sigma-delta modulator in the testbench turns tones from
0.125 MHz to 11.7 MHz (at a 64 MHz input rate) into the bit stream. The
testbench correlates each decimated output with the aliased tone frequency
and compares the amplitude with the analytic response of the stages: the
CIC sinc^5 terms and the DTFT of the half-band and FIR taps. Pass-band
tones must match to 0.3 dB. Stop-band tones must stay below the analytic
value + 3 dB, or below −60 dB, whichever is higher. The corrector FIR holds a
32-tap Hamming low-pass with its cut-off at 0.2 of its input rate. Typical
results, in dB relative to the DC gain:

| tone (MHz) | Arch. I /32 | Arch. II /8 | Arch. II /32 |
|-----------:|------------:|------------:|-------------:|
| 0.125      | −0.06       | 0.00        | +0.04        |
| 0.75       | −5.6        | +0.10       | −1.2         |
| 1.25       | −71         | +0.15       | −26          |
| 3.25       | −66         | −1.2        | −80          |
| 4.375      | −90         | −10.6       | −88          |
| 7.03       | −100        | −39.8       | −72          |

The /8 path's weak point is the band above 4 MHz. There the two short
half-band filters, with 8-bit coefficients, are the only protection against
aliasing. This is where longer coefficients would go first.

### Running a testbench

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/decim_pkg.sv tb/decim_model_pkg.sv tb/multistandard_decimator_tb.sv \
    --top-module multistandard_decimator_tb
./obj_dir/Vmultistandard_decimator_tb
```

Replace the testbench name to run another one. The testbenches initialise
everything they read and do not depend on power-up values, so
`+verilator+rand+reset+2` may be added to randomise the initial state.

## Changing the design

* Input level and widths: `LEVEL` and `IN_W` of `decim_arch1` and
  `decim_chain_arch2`.
* CIC order, rate and delay: `N`, `R` and `M` of `cic_decimator` and
  `hdf_cic`. The widths follow automatically. Recheck the output scaling,
  which is (RM)^N / 2^(ACC_W − OUT_W).
* Half-band filters: `ORDER` of `halfband_decimator`. Add the taps for any
  new order to `decim_pkg::hb_tap`. Keep the even taps (other than the
  centre) zero, and make the taps sum to 2^HB_COEF_FRAC for unity gain.
* Corrector FIR: `NTAPS`, `COEF_W`, `DATA_DEPTH` (at least NTAPS + 2) and
  `FMT_SHIFT` of `corrector_fir`. Keep 2·(CIC decimation) ≥ NTAPS clocks per
  output if the input arrives every clock, or `overrun` will fire.
