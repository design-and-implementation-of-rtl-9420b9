# Equiripple FIR high-pass filter for audio, 250 kS/s

This is a linear-phase FIR high-pass filter for an audio path from an ADC through an FPGA to a DAC. It removes everything below 10 kHz and passes everything above 15 kHz unchanged, at a sample rate of 250 kHz. The filter has order 120 (121 taps). Its coefficients come from a minimax (Parks–McClellan / Remez exchange) design. Such a design spreads the approximation error evenly over each band: the error ripples with equal height, which is why it is called *equiripple*. The result is the lowest peak error that any 121-tap filter can reach for the same band edges.

The specification follows the FPGA high-pass filter of K. Swain and M. K. Sahoo, "Design and Implementation of Equiripple FIR High Pass Filter on FPGA" (IJCEAE, 2014). That work built the filter from a model-based tool flow and shows no datapath. The datapath, word widths, handshake and coefficient values here are this design's own. They are listed under [Departures and choices](#departures-and-choices).

```
 ADC word ──► gateway_in ──► fir_hpf ──────────────► gateway_out ──► DAC word
 12 bit       register,      121-tap symmetric FIR    round half up,   22 bit, 8 fraction bits
 + strobe     format         full-precision 35-bit    saturate,        + strobe, held
              conversion     sum, 9-clock pipeline    register
```

## Filter specification and coefficients

| item | value | origin |
|---|---|---|
| response | high-pass, linear phase (symmetric, type I) | published design |
| order / taps | 120 / 121 | published design |
| sample rate | 250 kHz | published design |
| stopband | 0 – 10 kHz, desired gain 0 | published band edges (see below) |
| passband | 15 – 125 kHz, desired gain 1 | published band edges (see below) |
| Remez frequency-grid density | 16 | published design |
| band weights | 1 and 1 | this design |
| coefficient word | 16-bit signed, Q1.15 | this design |

The published specification calls 10 kHz the passband edge and 15 kHz the stopband edge. That order only makes sense for a low-pass filter. The design is a high-pass filter throughout, so here the stopband ends at 10 kHz and the passband starts at 15 kHz.

The coefficients are computed as follows. Take the Remez-exchange (Parks–McClellan) solution h[0..120] for the table above. Store `HPF_COEF[k] = round(h[k] · 2^15)` for k = 0..60. The other half follows from symmetry: h[120−k] = h[k]. The centre tap h[60] = 29490, which is about 0.90, the largest value. All 61 words are in `rtl/fir_hpf_pkg.sv`. Any Parks–McClellan implementation rebuilds them from this table, for example `remez(121, [0, 10e3, 15e3, 125e3], [0, 1], fs=250e3, grid_density=16)`.

Response after quantisation to 16 bits:

* stopband (0–10 kHz): at most −45.3 dB;
* passband (15–125 kHz): gain between 0.9946 and 1.0053;
* group delay: 60 samples (240 µs), the same at every frequency.

## The datapath (`fir_hpf`)

The filter computes y[n] = Σ h[k]·x[n−k] in full parallel, so it can take one sample per clock.

1. **Delay line.** There are 121 registers of 12 bits. They shift only when `in_valid` is high. With idle clocks between samples, the filter state stays frozen. That is what lets the same hardware run at the full clock rate or at 250 kS/s from a 100 MHz clock (one sample every 400 clocks).
2. **Folding.** Because h is symmetric, x[n−k] and x[n−120+k] share a coefficient. They are added first, in 13 bits. This leaves 61 products instead of 121. The centre sample x[n−60] has no partner and passes straight through.
3. **Constant multipliers.** There are 61 products of 13 × 16 bits, with the coefficients as constants. Synthesis can turn each one into shifts and adds.
4. **Adder tree.** This is a balanced binary tree over 64 leaves. The 3 leaves past the last coefficient are zero. It has six levels, with a register after each one.

There is one register stage each for the delay line, the pre-adders and the products, then six for the tree. That gives a latency of **9 clocks** from the edge that accepts a sample to `out_valid`. A 1-bit shift register beside the datapath carries the valid flag.

The output is the exact sum in 35 bits with 15 fraction bits. Nothing is rounded inside the filter. The largest possible magnitude is 2048 · Σ|h_int| = 2048 · 80952 ≈ 1.66 · 10^8, which needs 29 bits. The 35-bit width is the generic bound DATA_W + 1 + COEF_W + ⌈log2 61⌉, kept so that other coefficient sets are safe too.

Generic synthesis of the whole design gives about 6,100 flip-flop bits. The published FPGA build, made with a different structure and tool, reports 6,049 slice flip-flops.

## Number formats at the edges

**Input (`gateway_in`).** ADC words are 12-bit two's complement by default. With `OFFSET_BINARY = 1` (top-level `ADC_OFFSET_BINARY`), offset-binary words are accepted instead, and the sign bit is inverted. The word is registered on its strobe: 1 clock of latency.

**Output (`gateway_out`).** The 35-bit sum (15 fraction bits) becomes a 22-bit word with 8 fraction bits. The same scale is kept as the input: `dac_data / 256` is in input LSBs. The 7 dropped bits are rounded half up, that is: add 2^6, then shift right arithmetically. A value that does not fit saturates to the largest or smallest word, and `dac_sat` goes high. With the default coefficients the largest output is ±1.3 · 10^6 LSB, below the limit of 2^21. So saturation cannot happen in the full system; it only protects changed coefficient sets or widths. The word is registered and held between samples, which is what a DAC input needs: 1 clock of latency.

## Interface and timing of `hpf_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; 100 MHz in the reference setup |
| `rst_n` | in | 1 | asynchronous, active-low reset, clears every register |
| `adc_valid` | in | 1 | `adc_data` holds a new sample (one clock per sample) |
| `adc_data` | in | 12 | ADC word |
| `dac_valid` | out | 1 | `dac_data` holds a new filtered sample |
| `dac_data` | out | 22 | filtered sample, two's complement, 8 fraction bits |
| `dac_sat` | out | 1 | current `dac_data` was saturated |

* `dac_valid` follows `adc_valid` by exactly **11 clocks**: 1 for `gateway_in`, 9 for `fir_hpf` and 1 for `gateway_out`.
* A new sample may be offered on any clock, including every clock.
* At 250 kS/s and 100 MHz, 389 of the 400 clocks of each sample period are idle.
* The filter's own group delay (60 samples) comes on top of the pipeline latency.

Parameters: `DATA_W` (12), `OUT_W` (22), `OUT_FRAC` (8) and `ADC_OFFSET_BINARY` (0). `fir_hpf` also takes `TAPS`, which must be odd, and `COEF`, which is the first (TAPS+1)/2 coefficients. So a different symmetric filter can be dropped in without touching the structure.

## Departures and choices

What follows the published design:

* the chain of ADC, input gateway, equiripple FIR high-pass filter, output gateway and DAC;
* order 120, 250 kHz, the 10 kHz / 15 kHz band edges, grid density 16 and linear phase;
* the 12-bit input samples;
* one sample per clock in simulation and a 10 ns clock.

What is this design's own:

* the coefficient values: the source prints none, so they are computed from its specification with equal weights and rounded to Q1.15;
* the folded, fully pipelined direct form and its 9-clock latency;
* the valid-strobe handshake and the asynchronous reset;
* the 22-bit output with 8 fraction bits, rounding half up and saturation;
* the optional offset-binary input.

What is not here:

* The ADC and DAC are board parts, and the logic that drives them is not specified in the source. The top level ends at a parallel word with a strobe on each side. A converter-specific interface, such as an SPI or I²S controller, has to be added in front of `adc_*` and after `dac_*`.
* Nothing here drives the analog audio source or the oscilloscope and speaker.

## Verification

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and stops on a watchdog if the design hangs.

| testbench | what it checks |
|---|---|
| `tb/tb_fir_hpf.sv` | Three checks. (1) The coefficient set: symmetry, and the response computed with `$cos`/`$sin`, which must be below −44 dB over 0–10 kHz and within 1 ± 0.01 over 15–125 kHz. (2) The impulse response. (3) Random samples back to back, random samples with random idle gaps, and full-scale inputs with the worst-case sign pattern. Every output must equal a direct convolution and arrive exactly 9 clocks after its sample. |
| `tb/tb_gateway_in.sv` | Two's-complement and offset-binary instances side by side. It checks the conversion, the 1-clock latency and that the value holds between strobes. |
| `tb/tb_gateway_out.sv` | Random sums, exact half-LSB ties and out-of-range sums, compared with real-valued `floor(x/128 + 0.5)` and with saturation. |
| `tb/tb_hpf_top.sv` | End to end, with default parameters and a 100 MHz clock. It runs a full-rate random burst, then 250 kS/s audio (2 kHz + 40 kHz tones, one sample every 400 clocks), then a full-scale square wave. Every DAC word is compared with a convolution, rounding and saturation model, and with the 11-clock latency. The 2 kHz tone must come out at least 40 dB down (measured −45.9 dB). The 40 kHz tone must pass with gain 1 ± 0.01, matching the computed response (measured 1.0030). It also counts back-to-back samples, idle clocks, rounded outputs and ties, and requires each to occur. |

Run the end-to-end test with plain Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl --top-module tb_hpf_top \
  rtl/fir_hpf_pkg.sv rtl/gateway_in.sv rtl/fir_hpf.sv rtl/gateway_out.sv \
  rtl/hpf_top.sv tb/tb_hpf_top.sv
./obj_dir/Vtb_hpf_top
```

It runs about 490,000 clocks in under a second. For a block test, use the matching `tb/tb_<block>.sv` as the top, with `rtl/fir_hpf_pkg.sv` plus the block's own file. Always list the package first.

## Changing the design

* **Other coefficient sets.** Design a symmetric filter of odd length, scale it to Q1.15 and write the first (TAPS+1)/2 values into `HPF_COEF`. `HPF_TAPS` must match the length. The testbenches derive their reference models from the same package. But the frequency limits checked in `tb_fir_hpf` and `tb_hpf_top` (−44 dB below 10 kHz, unit gain above 15 kHz) are this filter's specification and must be edited with it.
* **Word widths.** `HPF_DATA_W`, `HPF_COEF_W`, `HPF_OUT_W` and `HPF_OUT_FRAC` are in the package. The full-precision sum width follows automatically.
* **Lower cost.** At 250 kS/s and 100 MHz the datapath is idle 97 % of the time. A time-multiplexed version with one multiply-accumulate unit would fit easily, but it is not what is built here.
