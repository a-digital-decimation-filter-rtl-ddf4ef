# Decimation filter for a 3-bit sigma-delta modulator

A second-order sigma-delta modulator oversampled 32 times can reach about
80 dB of dynamic range over a 500 kHz band, enough for a Bluetooth receiver,
with only a 3-bit quantizer. What it delivers, though, is a 32 Msps stream of
3-bit codes whose quantization noise has been pushed to high frequencies. This
design turns that stream into 1 Msps, 16-bit samples: it removes the noise
above 500 kHz and decimates by 32 in the same pass.

The work is split over two filters:

```
 mod_din[2:0] --\
                 mux -> reg -> CIC, 5 stages, /16 -> FIR, 31 taps, /2 -> dout[15:0]
 ext_din[2:0] --/         32 Msps          2 Msps              1 Msps
   (sel_ext)
```

* A **CIC filter** (cascaded integrator-comb) does the heavy decimation,
  32 Msps to 2 Msps, with adders and registers only: no multipliers and no
  coefficients. Its response is a sinc^5 with nulls at every multiple of
  2 MHz, which is where the noise that would fold into the band sits.
* An **FIR filter** running at 2 Msps sets the sharp band edge at 500 kHz,
  corrects the CIC's passband droop and decimates by 2 to 1 Msps.

The 3-bit input comes from an on-chip modulator (`mod_din`) or, as a backup,
from an external source (`ext_din`); `sel_ext` chooses. The modulator itself
is not part of this RTL. For testing the two filters apart, `obs_cic` puts the
CIC output, the node between them, on the output pins instead.

## Requirements and what the design achieves

| Requirement | Target | This design |
|---|---|---|
| Input / output rate | 32 Msps in, decimate by 32, 1 Msps out | one sample per 32 MHz clock in, one out every 32 clocks |
| 3 dB bandwidth | 500 kHz | about 497 kHz (computed); -1.5 dB measured at 480 kHz |
| Passband ripple | < 2 dB | 0.06 dB from DC to 420 kHz (measured -0.02 to +0.04 dB) |
| Stopband attenuation | > 50 dB | 55 dB at 640 kHz, 69 dB at 700 kHz, > 89 dB at 1.3 and 2.6 MHz (measured) |
| Dynamic range | 80 dB | 77.3 dB SNR measured for a tone 6 dB below full scale from an ideal modulator model, about 83 dB of range |
| Pin count | at most 15 signal pins | **not met**: 27 signal ports (see below) |
| Area, power | 0.56 mm² core, < 25 mW in 0.35 µm CMOS | not evaluated; depends on the cell library |

Where the stopband starts was not fixed by the requirements; 640 kHz was
chosen. Everything from 640 kHz up to 16 MHz, the CIC sidelobes included, is
at least 50 dB down.

## Why five CIC stages

The FIR filter runs at 2 Msps, so its response at 2 MHz - f equals its
response at f. Near 1.36-1.46 MHz, the mirror image of the 540-640 kHz
transition band, the FIR attenuates little, and the CIC has to supply most
of the 50 dB. At those frequencies a CIC with 3 stages (the usual rule for a
second-order modulator) gives 24-29 dB, with 4 stages 32-39 dB and with 5
stages 40-48 dB. Only with 5 stages did a 31-tap FIR reach 50 dB everywhere
above 640 kHz. The FIR length is capped near 31 because the serial FIR
described below has 32 clocks per output.

## CIC filter (`cic_decimator`)

Transfer function `H(z) = ((1 - z^-16) / (1 - z^-1))^5`, DC gain 16^5 = 2^20.

* **Integrators** (`cic_integrator_section`): five accumulators at 32 MHz. Each
  stage adds the registered output of the stage before, so the critical path
  is one 23-bit adder; the cost is a pure delay of 4 samples.
* **Decimation**: a 4-bit counter passes one integrator value in 16 to the
  combs.
* **Combs** (`cic_comb_section`): five differentiators `y = x[m] - x[m-1]`.
  They run one after the other on successive clock cycles with a valid bit
  carried along, so each subtraction also has a full clock cycle.

**Word length and wrap-around.** All CIC registers are 23 bits:
3 input bits + 5 · log2(16) bits of growth. The integrators overflow
constantly and are meant to: in two's-complement arithmetic the combs remove
the wrap-around exactly, as long as the final result fits in 23 bits, which it
always does (the extreme inputs -4 and +3 give -2^22 and 3 · 2^20). Do not add
saturation to the integrators, and do not narrow them without pruning
analysis.

## FIR filter and decimation by 2 (`fir_decimator`)

Only every second FIR output survives the decimation, so only those are
computed. A new CIC sample arrives every 16 clocks and an output is due
every 32, which leaves 32 clocks per output. The filter therefore uses **one
multiplier and one accumulator**, doing one tap per clock:

* Samples go into a 32-word circular buffer at a write pointer.
* On every second sample the newest address is latched as `base`, and for
  taps k = 0 to 30 the product `COEFS[k] * buf[base - k]` is added to the
  accumulator.
* On the last tap the sum is rounded (half up), shifted right by 21 bits,
  saturated to 16 bits and registered on `dout` with a one-cycle
  `out_valid`.

Because the buffer holds 32 words and the filter reads 31, the sample that
arrives halfway through a convolution overwrites only the one that is no
longer needed. An assertion flags any input rate too high for the serial
schedule (a convolution starting before the previous one ends).

**Coefficients** (`decim_pkg::FIR_COEFS`): 31 symmetric (linear-phase)
14-bit integers scaled by 2^13. They come from a least-squares design at
fs = 2 MHz. The target is 1/|H_cic(f)| from 0 to 420 kHz (droop
compensation) and 0 from 640 kHz to 1 MHz, with equal weights. The values
were rounded to integers; their sum is 8174, a DC gain of 0.998. To change
the response, redesign against the same target, keep the sum near 8192, and
keep the sum of absolute values below 2^15 (the accumulator assumes it is
19926).

**Arithmetic**: 23 × 14-bit products into a 39-bit accumulator, so nothing
overflows before the final scaling. Output scaling: a constant -4 input gives
-16348 and +3 gives 12261. That leaves one bit of headroom for the FIR's
overshoot; beyond it the output saturates. The FIR can overshoot only with
inputs that the CIC in front of it cannot produce.

## Interface and timing (`decim_filter_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 32 MHz sample clock, the only clock |
| `rst_n` | in | 1 | active-low synchronous reset, clears every register |
| `sel_ext` | in | 1 | 1 selects `ext_din`, 0 selects `mod_din` |
| `mod_din` | in | 3 | sample from the on-chip modulator, two's complement (-4..3) |
| `ext_din` | in | 3 | external backup sample, same format |
| `obs_cic` | in | 1 | 1: `dout`/`dout_valid` show the CIC output instead |
| `dout` | out | 16 | output sample, two's complement |
| `dout_valid` | out | 1 | high for one clock per output, every 32 clocks |

The slower parts of the chain use valid strobes as clock enables, not
divided clocks. Edges are counted from the first rising edge with reset
released (edge 0):

* The selected input is registered once, so the sample present before edge t
  enters the CIC on edge t+1.
* CIC output j is registered on edge 16j+19. It covers inputs up to the one
  sampled on edge 16j+9.
* FIR output m uses CIC outputs up to 2m+1. It is registered on edge 32m+67,
  with `dout_valid` high in the following cycle.

**Observation mode.** With `obs_cic` high, `dout` carries bits 22..7 of CIC
output j, a full-scale -4 input giving -32768, and `dout_valid` pulses after
edge 16j+19 (2 Msps). The FIR keeps running, and its outputs reappear as soon
as `obs_cic` drops. The selection is a multiplexer between two registered
sources, so it adds no latency. It can change at any time; the strobes then
follow the newly selected source.

The decimation phases are fixed by reset. Outputs begin before the filters
have filled: outputs that depend on the first 76 input samples or the first
31 CIC outputs after reset are start-up transients of the zero-initialised
state.

**Pins.** The requirements allow 15 signal pins; these ports need 27.
Meeting the limit would take a serial output or a narrower output plus a
shared input bus. Nothing in this RTL does that: add it at the pad level if
needed.

## Files

| File | Contents |
|---|---|
| `rtl/decim_pkg.sv` | rates, word lengths, output scaling, FIR coefficients, shared types |
| `rtl/cic_integrator_section.sv` | integrator cascade |
| `rtl/cic_comb_section.sv` | comb cascade |
| `rtl/cic_decimator.sv` | CIC filter: integrators, ÷16, combs |
| `rtl/fir_decimator.sv` | serial FIR with ÷2 |
| `rtl/decim_filter_top.sv` | input selection and the filter chain |
| `tb/tb_ref_pkg.sv` | reference arithmetic (CIC impulse response, wrap, round and clamp) |
| `tb/sd_modulator_model.sv` | behavioural second-order 3-bit modulator, stimulus only |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_filter_response` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

* `tb_cic_integrator_section`, `tb_cic_comb_section`: each cascade is checked
  against a separately written 64-bit model (running sums; binomial
  differences), including wrap-around, back-to-back samples and latency.
* `tb_cic_decimator`: checked against a direct convolution with the CIC
  impulse response, computed by polynomial multiplication. Also checks the
  output timing, and that the full-scale extremes are reached.
* `tb_fir_decimator`: checked against a 64-bit convolution with explicit
  rounding and clamping. Covers random, DC and saturating inputs, and checks
  the 31-clock latency.
* `tb_decim_filter_top`: the whole chain at its default size for 72 000
  clocks (about 2000 outputs). It drives modulator-coded tones on both inputs,
  full-scale DC and source switches. Every output is compared bit for bit
  with the reference and its edge is checked, including 500 CIC outputs
  seen in observation mode. The test also checks passband gain, SNR,
  stopband rejection and DC gain. It counts the source switches, observation-mode
  switches, CIC and FIR strobes and integrator wrap-arounds.
* `tb_filter_response`: feeds nine modulator-coded tones from 100 kHz to
  2.6 MHz through the full chain and checks them against the ripple, corner
  and stopband limits in the table above.

Each one runs in well under a second. To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/decim_pkg.sv tb/tb_ref_pkg.sv tb/tb_decim_filter_top.sv --top-module tb_decim_filter_top
./obj_dir/Vtb_decim_filter_top
```

What has not been checked: gate-level behaviour, timing closure at 32 MHz
in a real library, area and power. The modulator model is ideal and only
stands in for the real modulator. It is stable only for inputs up to about 2.5 quantizer
steps, so the dynamic range figure above is taken from a tone 6 dB below full
scale, and the range with a real modulator depends on that modulator.

## Choices beyond the requirements

The structure is as required: two filters, a CIC with integrators before the
decimation and the same number of combs after it, an FIR with the final ÷2,
and the backup 3-bit input. The following were choices of this design:

* 3-bit input read as two's complement (-4..3).
* CIC: 5 stages, differential delay 1, 23-bit full-precision registers,
  pipelined integrators and combs.
* FIR: 31 taps, serial architecture, the coefficients, 14-bit coefficient
  width, round-half-up and saturation.
* 16-bit output scaled so that DC full scale uses half the range.
* A single clock with clock enables, an input register after the source
  multiplexer, and a synchronous active-low reset.
* Off-chip access to internal nodes as the `obs_cic` output switch, limited
  to the CIC output.
