# Multirate decimation filter for a cross-correlation noise thermometer

A noise thermometer measures temperature through the thermal (Johnson)
noise of a resistor, V² = 4kT·Re(Z)·Δf. The noise is amplified in two
independent channels and the two signals are cross-correlated, so that the
amplifier noise, uncorrelated between channels, averages away. Before the
correlation each channel has to be band-limited and brought down to a
manageable rate. This RTL is that front-end: per channel, 8-bit samples at
40 MS/s go in, 12-bit samples at 625 kS/s come out, band-limited to about
300 kHz.

The filter is built from three decimating stages, cheapest first:

```
 ADC 8 bit      CIC, N=3, R=16, M=1     HB1 (5th-order IIR)     HB2 (two HB1-type sections)
 40 MS/s  ───►  no multipliers  ──12b─► 2.5 → 1.25 MS/s  ──12b─► 1.25 MS/s → 625 kS/s ──12b─►
                40 → 2.5 MS/s
```

The CIC takes the large factor of 16 with adders only. The two half-band
stages are polyphase IIR filters built from all-pass sections whose
coefficients have only one or two one-bits, so every "multiplication" is one
or two shifted additions.

## Files

| file | contents |
|---|---|
| `rtl/nt_filter_pkg.sv` | word widths, fixed-point types, coefficients, shift-add product, rounding/saturation |
| `rtl/cic_decimator.sv` | third-order CIC decimator |
| `rtl/hb_allpass.sv` | second-order all-pass section, the building block of the half-band filters |
| `rtl/hb_decimator.sv` | two-path polyphase half-band filter with decimation by 2 |
| `rtl/hb_section.sv` | the same two-path filter at the full rate, without decimation |
| `rtl/hb1.sv` | first half-band stage |
| `rtl/hb2.sv` | second half-band stage (two cascaded sections) |
| `rtl/decimation_channel.sv` | one complete channel, CIC → HB1 → HB2 |
| `rtl/nt_fpga_top.sv` | top level: two channels side by side |
| `tb/nt_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_filter_response` |

## The CIC stage

`cic_decimator` implements H(z) = ((1 − z^−RM)/(1 − z^−1))^N with N = 3,
R = 16, M = 1. Three integrators run on every input sample; every 16th
integrator result goes to three comb sections (y = x − x delayed by M) that
run at 2.5 MS/s, so the combs need one delay register each instead of 16.

All CIC registers are 20 bits and simply wrap. The integrators overflow
constantly (any DC input makes the third one grow cubically). The comb
differences are still exact, because the true output always fits in
B_in + N·log2(RM) = 8 + 3·4 = 20 bits, and modular subtraction recovers it.
The DC gain (RM)^N = 4096 = 2^12, so the top 12 bits of the last comb give
an output with gain 16: a full-scale 8-bit input becomes a full-scale
12-bit output. The lower 8 bits are truncated.

The integrator chain has no pipeline registers: each integrator adds the
new value of the one before it within the same clock, so the
implementation matches the transfer function exactly, with no extra delay.

## The half-band stages

This is the least obvious part of the design.

### The all-pass building block (`hb_allpass`)

Each half-band filter is the average of two all-pass branches. A branch is
a second-order all-pass section

    A(z) = (c + z^−D) / (1 + c·z^−D)          y[n] = x[n−D] + c·(x[n] − y[n−D])

written in the form on the right, which needs one coefficient product per
sample. `D` is 2 when the section runs at the filter's own input rate and 1
when it runs at half that rate inside a polyphase decimator. The product
`c·v` is formed as a sum of shifted copies of `v`, one per one-bit of the
coefficient (`coef_mult` in the package), at full precision, then truncated
to the word grid.

The coefficients, as binary fractions:

| filter | a | b |
|---|---|---|
| H1 (first stage) | 0.001b = 0.125 | 0.1001b = 0.5625 |
| H2, first section | 0.001b = 0.125 | 0.1001b = 0.5625 |
| H2, second section | 0.01001b = 0.28125 | 0.11b = 0.75 |

None has more than two one-bits, so no section needs more than two adders
for its product.

### Two paths and polyphase decimation (`hb_decimator`)

A two-coefficient half-band low-pass filter is

    H(z) = ½ · [ A_a(z²) + z^−1 · A_b(z²) ]

Both branches are functions of z², so when the output is decimated by two
each branch only ever sees every second input sample. `hb_decimator` uses
this. A commutator sends the input samples alternately to the two branches.
Even samples (0, 2, 4, … counted from reset) go to branch a, and odd samples
to branch b. Each branch is a `D = 1` all-pass section that advances only on
its own samples. When an even sample arrives, the stage outputs
½·(A_a{x[2m]} + A_b{x[2m−1]}). The branch-b value comes from a register that
holds the previous odd sample's branch-b result. Both all-pass sections
therefore run at half the input rate. The ½ is an arithmetic right shift.

### The second stage: two sections in cascade (`hb2`)

H2 is the product of two such half-band filters with different coefficient
sets, which gives a much sharper transition band. The product of two
two-path filters is not itself a two-path filter, so only one of the two can
use the polyphase decimation trick. In `hb2` the (a0, b0) section
(`hb_section`) runs undecimated at 1.25 MS/s. Its all-pass sections use
D = 2, and its branch b is fed through a one-sample delay. The (a1, b1)
section follows as an `hb_decimator`. The two sections are joined at the full
internal word width.

### Number format

The half-band stages compute in a 24-bit two's-complement word
(`hb_word_t`):

    | 4 guard bits | 12-bit sample | 8 fraction bits |

- The fraction bits keep the truncation of the coefficient products well
  below one output LSB. The testbenches see errors of a small fraction of an
  LSB against floating-point models.
- The guard bits cover the internal growth of the all-pass recursions. An
  all-pass section with coefficient c can reach (1 + 2c) times its input
  peak, so 2.5× for c = 0.75.

Each stage output is rounded half-up and saturated to 12 bits. Saturation
does happen: the IIR step response overshoots, so a full-scale square wave
drives the half-band outputs past full scale. The testbenches provoke this
on purpose.

## Interface and timing

Everything runs on one clock, the 40 MHz ADC sample clock. A stage passes a
sample to the next with a one-clock `valid` strobe. There is no
back-pressure: every stage accepts a sample whenever it is offered. Reset is
synchronous and active low, and clears all state to zero.

| module | output strobe | latency |
|---|---|---|
| `cic_decimator` | after every 16th accepted sample | 1 clock |
| `hb_decimator`, `hb1` | after every even accepted sample | 1 clock |
| `hb_section` | after every accepted sample | 1 clock |
| `hb2` | after every even accepted sample | 2 clocks |
| `decimation_channel` | after samples 64j + 15 (j = 0, 1, …) | 4 clocks |

`nt_fpga_top` has one `adc_valid` for both channels, because both ADCs sample
together. It has per-channel `adc_data[2]`, `out_valid[2]` and `out_data[2]`.
With a common input strobe the two output strobes coincide. The interface
to the PC (and so to the correlation) connects to these outputs and is not
part of this RTL.

The inputs may have gaps (`in_valid` low). The filters then simply wait, and
their response is defined in samples, not clocks.

`cic_decimator`, `hb_decimator` and `hb_section` carry concurrent assertions
on these strobe rules. Every output must follow an accepted input. In the
decimator it must follow an even one, and two outputs never come on
consecutive clocks.

## What the filter achieves

The specification the coefficients were chosen for is: pass band 300 kHz
with at most 0.1 dB loss, stop band from 400 kHz with at least 60 dB
attenuation. `tb_filter_response` measures the channel with tones of
amplitude 120 (at 40 MS/s) and compares the result with the transfer
functions evaluated in floating point:

| tone | measured | transfer function |
|---|---|---|
| 100 kHz | −0.07 dB | −0.07 dB |
| 200 kHz | −0.28 dB | −0.28 dB |
| 250 kHz | −0.54 dB | −0.55 dB |
| 300 kHz | −3.28 dB | −3.28 dB |
| 400 kHz | −61.3 dB | −61.6 dB |
| 500 kHz | −77.8 dB | −98.2 dB (below the output LSB) |
| 1 MHz | −69.5 dB | −73.4 dB (below the output LSB) |
| 2.209 MHz | −54.7 dB | −54.7 dB |

The hardware matches the transfer functions. The transfer functions do not
fully meet the stated specification:

- **Pass band.** The loss at 300 kHz is 3.3 dB: 2.7 dB from H2's transition
  band and 0.6 dB from CIC droop. The 0.1 dB limit holds only up to about
  118 kHz.
- **Stop band.** At 400 kHz the filter is 61.5 dB down, as required. Around
  2.2 MHz, however, both half-band stages are in the periodic image of their
  pass band, and only the CIC attenuates. The worst case there is 54.7 dB.

Both points follow from the coefficient set and the CIC order, not from
this implementation. Changing the coefficients is a matter of the
`H*_A/B` constants in `nt_filter_pkg` (or the `COEF_*` parameters of `hb1`
and `hb2`). The guard bits must then still cover 1 + 2c.

## Design choices not fixed by the filter description

The stage structure, rates, CIC parameters, the 8/20/12-bit widths and the
coefficients come from the filter design. The following are choices of this
implementation:

- a single 40 MHz clock with valid strobes, instead of one clock per rate;
- no pipelining inside the stages;
- the cut from 20 to 12 bits at the CIC output is a truncation;
- the 24-bit internal half-band word and the truncating coefficient
  products;
- rounding and saturation at the 12-bit output of each half-band stage;
- the commutator phase: the first sample after reset goes to branch a;
- in HB2, the (a0, b0) section runs first and undecimated, and the
  (a1, b1) section decimates;
- two's-complement ADC samples and a common strobe for both ADCs.

The original was targeted at a Xilinx Virtex XCV800. The RTL here is generic
and has not been mapped to that device. Generic synthesis gives the two
channels about 300 flip-flop bits, plus about 1 kbit of small delay-line
arrays that an FPGA would put in registers or LUT RAM.

Not included: the analog front-end and ADCs, the PCI/PC interface, and the
cross-correlator.

## Verification

Each testbench is self-checking. It compares against models written
independently of the RTL (`tb/nt_ref_pkg.sv`). The half-band models run the
transfer functions at the full rate in double precision and keep every
second output, so they share nothing with the polyphase structure. The CIC
model is a direct 46-tap FIR convolution.

| testbench | what it checks |
|---|---|
| `tb_cic_decimator` | bit-exact output against the FIR model; one output per 16 samples, 1 clock after the 16th; DC runs that wrap the integrators; input gaps |
| `tb_hb_allpass` | D = 1 and D = 2 sections against the real recursion, within 1/16 LSB |
| `tb_hb_decimator` | polyphase output against the full-rate transfer function; strobe timing; input gaps |
| `tb_hb1`, `tb_hb2` | 12-bit output within 1 LSB; saturation happens; pass-band gain and attenuation at 3/8 of the input rate; timing |
| `tb_decimation_channel` | whole channel within 2 LSB; 1 output per 64 samples, 4 clocks after sample 64j + 15; saturation; input gaps |
| `tb_nt_fpga_top` | both channels at default sizes, each against its own model. Counts outputs, integrator wrap-arounds and saturations, and fails if any count is zero. Checks the 100 kHz and 250 kHz gains and the 500 kHz attenuation |
| `tb_filter_response` | the frequency-response table above |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog if it hangs. All of them run at the default sizes in well
under a second of simulation time.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/nt_filter_pkg.sv tb/nt_ref_pkg.sv tb/tb_nt_fpga_top.sv \
    --top-module tb_nt_fpga_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run another test. The
`-y rtl` option lets Verilator find the modules used. `tb_filter_response`
does not need `tb/nt_ref_pkg.sv`.
