# Delta-sigma data converters from FPGA pins and a few passives

Precision ADCs and DACs are expensive because a Nyquist-rate converter needs
matched analogue parts: a resistor ladder matched to 0.02 % gives only about
12 bits. A delta-sigma converter instead trades speed for precision. It runs a
crude 1-bit quantiser far above the signal band inside a feedback loop and
pushes the quantisation error out of the band. An FPGA does the loop
arithmetic and the over-sampling clock well. The only analogue parts needed
are two resistors and one capacitor on an input pin pair, and one resistor and
two capacitors on an output pin. Changing the converter (resolution, clock,
modulator) then means loading a new bitstream, not changing the board.

This RTL implements both converters of that scheme as one block:

* a **first-order delta-sigma ADC**. The FPGA's input buffer is the
  comparator and an output buffer is the 1-bit feedback DAC. An external RC
  network is the integrator. A CIC filter decimates the bitstream to PCM:
  4.096 MHz over-sampling clock, 512 clocks per word, 8 kHz PCM (a telephone
  voice channel).
* a **second-order delta-sigma DAC**. A 6-bit DDS tone (7.99 MHz) is
  modulated into a 1-bit stream at 192 MHz, an over-sampling ratio of 12 for
  an 8 MHz band. An AC-coupled RC low-pass on the pin reconstructs the tone.

```
  ADC path (clk_adc, 4.096 MHz)

  analogue in --Rin--+--------> adc_comp_in --> adc_sampling_ff --Q--> adc_decimator --> adc_pcm
                     |                                |                (CIC, /512)      adc_pcm_valid
  adc_fb_out --Rfb---+                              Q-bar --> adc_fb_out
                     |
                    Cint
                     |
                    GND

  DAC path (clk_dac, 192 MHz)

  dac_ftw -> dds_tone --6b--> dsm2_dac_modulator --1b--> dac_out --Cac--Rlp--+--> analogue out
                                                                            Clp
                                                                             |
                                                                            GND
```

The two paths share no logic. Each has its own clock and reset.

## Files

| file | what it is |
|---|---|
| `rtl/dsm_pkg.sv` | package: default widths, constants, DDS tuning word, ADC ratio |
| `rtl/dsm2_dac_modulator.sv` | second-order 1-bit modulator of the DAC |
| `rtl/dds_tone.sv` | phase-accumulator DDS with an elaboration-time sine table |
| `rtl/adc_sampling_ff.sv` | the ADC's over-sampling flip-flop (bitstream and feedback pin) |
| `rtl/adc_decimator.sv` | CIC (sinc^N) decimator, bitstream to PCM |
| `rtl/reconfig_converter_top.sv` | top level: both converters side by side |
| `tb/adc_rc_network_model.sv` | simulation-only model of Rin, Rfb, Cint and the input buffer |
| `tb/tb_*.sv` | self-checking testbenches (see *Verification*) |

## The second-order DAC modulator

This is the part with the most design content. Every width and constant below
comes from the published block diagram:

```
 u(n) 6b --(+)--7b--> [ i1 += . ] --9b--(+)--10b--> [ i2 += . ] --10b--> sign --> v(n) 1b
          ^                                ^                                    |
          |  fb1 = v ? 110000 : 010000     |  fb2 = v ? 1100000 : 0100000       |
          +--------- (6 bits, -16/+16) ----+------- (7 bits, -32/+32) ----------+
```

In equations, per clock:

```
v  = (i2 >= 0)
i1 <= i1 + u  - (v ? 16 : -16)
i2 <= i2 + i1 - (v ? 32 : -32)
```

Both integrators are *delaying*: the next stage sees the register output. The
second feedback is twice the first (K2 = 2*K1). Together these give the
classic second-order result:

* noise transfer function `(1 - z^-1)^2`, i.e. 40 dB/decade of noise shaping;
* signal transfer function `z^-2` scaled by `1/K1`. The average of the +/-1
  bitstream is `u/16`, and `v` responds to a change of `u` two clocks later.

The first integrator is an exact bookkeeping of the loop: at every moment it
holds `sum(u) - 16*sum(+/-1)`. The bitstream average therefore tracks the
input, and the integrator's bounded size is the tracking error. The
testbenches check this directly.

**Input range.** The feedback constant is 16 but the input is 6 bits
(+/-31). A second-order 1-bit loop is only stable for inputs up to a fraction
of its feedback level. In simulation the loop stays bounded for peaks up to
+/-12 (0.75 of K1) with a 7.99 MHz tone and runs away from +/-13 upward. The integrators wrap
without saturation; an assertion in the modulator prints a warning in
simulation whenever one wraps. So this design follows the published constants and limits
the source instead: the DDS peak amplitude is 12 LSB. Feeding a full-scale
6-bit signal overloads the modulator. If you need the whole 6-bit range,
scale the feedback constants (K1 = 32, K2 = 64) and widen the adders and
integrators by one bit. That is a departure from the published widths.

**Polarity.** The diagram does not say which mux input each output value
selects. Output 1 (second integrator non-negative) subtracts, which is the
negative feedback the loop needs.

## The first-order ADC on a pin pair

Only one flip-flop of the ADC is logic. The rest of the loop is analogue:

* **Rin and Rfb** sum the input voltage and the fed-back pin voltage into
  **Cint**. With small voltage swings on Cint (tens of millivolts per clock)
  the RC node behaves almost like an ideal integrator.
* The **input buffer** reads the Cint node against its switching threshold.
  This is the 1-bit quantiser.
* **`adc_sampling_ff`** samples the buffer on each over-sampling clock. Q is
  the bitstream. Q-bar drives the output buffer, which feeds back through Rfb
  (the 1-bit DAC). The negative feedback holds the node at the threshold.
  The ones density of Q is then `vin/VDD` when Rin = Rfb and the threshold is
  VDD/2.
* **`adc_decimator`** maps bits to +/-1 and filters them with an N-th order
  CIC: N integrators at the full rate, then N combs once every DECIM clocks.
  With DECIM = 512 and N = 2 it outputs a 20-bit signed word
  `pcm = 512^2 * (2p - 1)` at 8 kHz, where p is the ones density.
  `pcm_valid` pulses once per word.

The flip-flop samples an analogue level directly. A synchroniser would add
delay inside the loop, so the design has none and accepts the rare
metastable sample. The source fixes only the 512:1 ratio and the clock and
PCM rates. The CIC filter, its order and its scaling are this
implementation's choices.

Higher signal bandwidths would call for a second-order ADC loop: a second RC
integrator on another pin pair. It is only outlined in the source and is not
built here.

## DDS tone source

`dds_tone` has a 32-bit phase accumulator (`f_out = f_clk * ftw / 2^32`) and
a 256-entry sine table. The table is computed while the design is elaborated:
`LUT[k] = round(A * sin(2*pi*k/256))`, with A = 12. The output is registered
and shows the table entry of the previous clock's phase. `phase_wrap` marks
each completed period. The default tuning word,
`round(7.99/192 * 2^32) = 178733274`, is in the package. The top brings the
tuning word out as a port, so the tone can be changed at run time. The source
specifies only a 6-bit, 7.99 MHz DDS tone. The accumulator and table sizes
and the amplitude are this implementation's choices.

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk_adc`, `rst_adc_n` | in | 1 | ADC over-sampling clock (4.096 MHz), synchronous active-low reset |
| `adc_comp_in` | in | 1 | input buffer reading the Cint node |
| `adc_fb_out` | out | 1 | feedback pin to Rfb (Q-bar) |
| `adc_bitstream` | out | 1 | ADC bitstream (Q) |
| `adc_pcm`, `adc_pcm_valid` | out | 20, 1 | PCM word and its 8 kHz strobe |
| `clk_dac`, `rst_dac_n` | in | 1 | DAC modulator clock (192 MHz), synchronous active-low reset |
| `dac_ftw` | in | 32 | DDS tuning word |
| `dac_sample` | out | 6 | DDS sample feeding the modulator |
| `dac_phase_wrap` | out | 1 | DDS period strobe |
| `dac_out` | out | 1 | 1-bit DAC output pin, to Cac / Rlp / Clp |

Parameters of the top (`ADC_DECIM_P`, `ADC_CIC_N_P`, `ADC_PCM_W_P`,
`DDS_PHASE_W_P`, `DDS_LUT_AW_P`, `DDS_AMPLITUDE_P`) default to the package
values. The modulator's widths are parameters of `dsm2_dac_modulator`.

All resets are synchronous and clear every register. The clocks themselves
(a PLL/DCM in the FPGA), the I/O buffers and the passive parts are outside
the RTL.

## Measured performance, and how it compares

Measured in simulation with the testbenches below:

| configuration | source's figure | this RTL |
|---|---|---|
| DAC, fs = 192 MHz, OSR 12, 7.99 MHz tone | 52.5 dB calculated, about 50 dB measured | 34.5 dB in-band SNR |
| DAC, fs = 64 MHz, OSR 4 | 30 dB calculated | 9.7 dB |
| DAC, fs = 32 MHz, OSR 2 | 15 dB calculated | -5.7 dB |
| ADC, 4.096 MHz / 512, 1047 Hz tone at -1.9 dB | 78 dB quoted; about 60 dB on the measured curve | 74 dB |
| ADC, same, -20 dB | | 53 dB |
| ADC, same, -40 dB | | 17 dB (idle tones of the noiseless first-order loop) |

The DAC gains about 25 dB from OSR 4 to OSR 12, close to the 15 dB per
octave expected of a second-order loop. Its absolute SNR falls well short of
the published calculation, for two reasons. The published numbers come from
the linear noise formula at full scale. Here the tone is 2.5 dB below the
loop's stable limit and sits right on the 8 MHz band edge, where the shaped
noise is largest. An independent floating-point model of the same difference
equations gives the same 32-35 dB, so the gap lies in the published constants
and stimulus, not in the RTL. Near the band edge the bitstream's tone
amplitude also comes out about 9 % high (0.82 instead of 0.75), because the
shaped error there still correlates with the signal. At 2 MHz it is 0.753.

The ADC numbers use an ideal RC model with Rin = Rfb = 10 kOhm,
Cint = 4.7 nF and a threshold of VDD/2. There is no thermal noise or clock
jitter. The DC gain error of the leaky RC integrator is below 1 %.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=... failures=...` line.

| testbench | what it checks |
|---|---|
| `tb_dsm2_dac_modulator` | output bit against an unbounded-integer model every clock (DC levels, 7.99 MHz sine, random input); bitstream average at each DC level; bound on `sum(u) - 16*sum(+/-1)`; reset state |
| `tb_dds_tone` | every sample against `round(12*sin())` of the expected phase; phase-wrap timing and count, for three tuning words |
| `tb_adc_sampling_ff` | Q samples on the edge only; Q-bar is its complement; reset value |
| `tb_adc_decimator` | every PCM word against a direct convolution with the sinc^2 taps, including the fill-up words; full-scale value; one word per 512 clocks |
| `tb_reconfig_converter_top` | full default configuration end to end. ADC closed through the RC model at five DC levels, PCM within 1.5 % of `512^2*(2*vin/VDD-1)`, 8 kHz word rate. DAC: DDS samples, bitstream tracking, tone amplitude at 7.99 MHz and after a retune to 2 MHz. Counts PCM words, both feedback-pin levels, both modulator feedback selections, phase wraps and the retune, and fails if any never happens |
| `tb_dac_snr_vs_osr` | in-band SNR of the DAC at OSR 2, 4 and 12; rising with OSR, second-order slope, above 30 dB at OSR 12 |
| `tb_adc_voice_snr` | PCM SNR for a 1047 Hz tone at three levels; rising with level, above 55 dB at the top level, above 35 dB at -20 dB |

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/dsm_pkg.sv tb/tb_reconfig_converter_top.sv --top-module tb_reconfig_converter_top \
    --Mdir obj -o sim && obj/sim
```

Replace the testbench name for the others. Each finishes in seconds. The RTL
lints cleanly with `verilator --lint-only -Wall`. The only warnings are
package constants that a given module does not use.

## Where this departs from, or adds to, the source

* DDS: accumulator width, table size, amplitude 12 (the modulator's stable
  limit), and a run-time tuning port.
* Modulator: the mux polarity, delaying integrators, wrap-around arithmetic
  and the reset are this design's choices.
* ADC decimator: the whole filter (CIC, order 2, +/-1 input, 20-bit output
  with gain 512^2) is this design's. The source gives only the rates.
* Resets: synchronous, active low, on every register. The source does not
  mention reset.
* Not built: the analogue parts (Rin, Rfb, Cint, Cac, Rlp, Clp), the FPGA I/O
  buffers and clock generation. Also not built: the second-order ADC variant
  and modulators of order above two, which the source mentions only as
  options.
