# Two-carrier digital IF transceiver for a WiMAX base station

This is the FPGA datapath of a digital intermediate-frequency (IF) transceiver
for an IEEE 802.16d (WiMAX) base station. It carries two frequency
assignments (FA1 and FA2) in each direction, and the carriers are combined and
separated digitally rather than with analog mixers. Everything runs on one
64 MHz sample clock:

* **Downlink.** The baseband I/Q of each FA is interpolated to 64 MHz and
  shifted to +12 MHz (FA1) or +20 MHz (FA2) by complex multiplication with an
  NCO carrier. The two results are added into a single complex stream for a
  16-bit DAC. The DAC's own x4 interpolation and 64 MHz modulation then place
  the FAs at 76 and 84 MHz, around an 80 MHz IF.
* **Uplink.** A 14-bit ADC samples the 80 MHz IF at 64 MHz, below the
  Nyquist rate on purpose. The FAs at 76 and 84 MHz therefore fold down to 12
  and 20 MHz. Two NCO demodulators and four decimation filters recover the
  baseband of each FA.

The same hardware can be switched at run time between the three WiMAX
bandwidth profiles: 7 MHz, 3.5 MHz and 1.75 MHz. Only the filters' rate and
coefficients change. The board-level top, `adcb_top`, holds two such
transceivers, one per receive/transmit diversity path.

The structure and the main numbers are those of the ADCB transceiver board
published in "Implementation of a Digital IF Transceiver for SDR-Based WiMAX
Base Station". Those numbers are:

* 64 MHz sampling and 80 MHz IF;
* NCOs at 12 and 20 MHz, FAs at 76 and 84 MHz;
* 129-tap raised-cosine filters with roll-off 0.115 and 16-bit coefficients,
  with the cut-offs per profile;
* 16-bit DAC and 14-bit ADC.

Where that description stops (word formats, rounding, coefficient scaling,
control interface, reset), the choices are this implementation's own. They
are listed in [Departures and own choices](#departures-and-own-choices).

## Frequency plan

| quantity | value |
|---|---|
| sample clock (FPGA, ADC) | 64 MHz |
| DAC output rate (inside the DAC) | 256 MHz = 4 x 64 MHz |
| DAC complex modulation | 64 MHz |
| downlink NCOs w_u1, w_u2 | 12 MHz, 20 MHz |
| FA centres at the IF | 64+12 = 76 MHz, 64+20 = 84 MHz |
| uplink NCOs w_d1, w_d2 | 12 MHz, 20 MHz (76 and 84 MHz alias to 76-64 and 84-64) |

The uplink frequency plan works because sampling at 64 MHz makes a
64 MHz carrier look like DC. Likewise, the real IF seen by the ADC at the
64 MHz sample instants equals the I (real) component of the complex stream
the FPGA sends to the DAC. The end-to-end testbenches use this: they model
the analog path as `adc_data = dac_i[15:2]`.

The NCO tuning word is `ftw = f / 64 MHz * 2^32`: 12 MHz gives `0x3000_0000`
and 20 MHz gives `0x5000_0000`. Both are multiples of 2^22, so the 10-bit
sine table is addressed without phase truncation for these carriers. The
tuning words can be reprogrammed to any frequency.

## Profiles and rates

The modem's baseband is sampled at twice the OFDM system's fundamental
sampling frequency, which is 8/7 of the channel bandwidth.

| profile | fundamental | baseband rate | rate change | filter stages (all 129 taps) |
|---|---|---|---|---|
| 7 MHz | 8 MHz | 16 Msps | x4 / /4 | fs 64 MHz, fc 3.5 MHz |
| 3.5 MHz | 4 MHz | 8 Msps | x8 / /8 | fs 64 MHz, fc 2 MHz |
| 1.75 MHz | 2 MHz | 4 Msps | x16 / /16 | fs 8 MHz, fc 1.2 MHz (x2) and fs 64 MHz, fc 2 MHz (x8) |

The 1.75 MHz profile is a two-stage cascade. Its 64 MHz stage is the same
filter as the 3.5 MHz profile's, so there are only three coefficient sets.

## The raised-cosine filters

This is the part that most needs explaining. All rate changes use one core,
`rc_fir`. It is a fully parallel 129-tap direct-form FIR with a clock enable.
On each enabled clock it shifts the input into the delay line and registers
the full-precision sum (40 bits), so the result appears one clock after the
input. The coefficient set is a port, so the owning filter can swap sets when
the profile changes.

**Coefficients.** They are computed at elaboration time in `dif_pkg` from
the raised-cosine impulse response. No table file is involved. For tap
`n = -64..64`:

```
t    = 2 * fc/fs * n
h(n) = sinc(t) * cos(pi * 0.115 * t) / (1 - (0.23 * t)^2)      (limit sinc(t)*pi/4 where the denominator is 0)
c(n) = round(32768 * L * h(n) / sum(h))                        (Q1.15, 16 bits)
```

Normalising to `sum(h)` makes the 129 taps add up to exactly `L`. Without it,
cutting the response to 129 taps costs up to 4 % of gain, in the fc = 2 MHz
set. The 10-bit NCO sine table is produced the same way:
`round(32767 * sin(2*pi*k/1024))`.

**Interpolation (`interp_fir`).** This filter works on the zero-stuffed
stream:

* Every `L` clocks `in_req` goes high and the sample enters the filter.
* On the other clocks a zero enters.
* Because the taps sum to `L`, the output has unity gain.
* In the 1.75 MHz profile, the first stage runs with an 8 MHz clock enable
  (a sample, then a zero). Its output is re-stuffed into the 64 MHz stage
  every 8 clocks.

Latency from a sample to its first output: 1 clock with one stage, 9 clocks
with two. The peak of the response, which is the group delay, comes 64
filter samples later in each stage.

**Decimation (`decim_fir`).** This is the same filter in mirror order:

* The 64 MHz stage sees every sample.
* Only every 4th or 8th sum is kept and divided by `L`.
* For 1.75 MHz, the kept 8 MHz samples feed the fc = 1.2 MHz stage, which
  keeps every second sum.
* `out_valid` pulses once per output sample: every 4, 8 or 16 clocks.
* The sum for the decimation instant at clock edge n is shown after edge
  n+1, or after edge n+3 with two stages.

Each filter uses the same 129 multipliers whatever the rate. It does not
exploit zero taps or coefficient symmetry. The 129 products are summed in one
clock, as an adder chain that synthesis tools rebuild as a tree. On an FPGA at
64 MHz that sum would need pipeline registers. They are left out so that the
cycle timing above stays simple. Adding them would lengthen every latency,
and the rate strobes that select the kept sums would have to be delayed to
match.

## Downlink chain (`dif_tx`)

```
bb_i[0] -> interp_fir -+
bb_q[0] -> interp_fir -+-> quad_mod (NCO w_u1) -+
bb_i[1] -> interp_fir -+                        +-> fa_combiner -> dac_i, dac_q
bb_q[1] -> interp_fir -+-> quad_mod (NCO w_u2) -+
```

* `quad_mod` forms `(I + jQ) * e^{jwt}`, i.e. `I*cos - Q*sin` and
  `I*sin + Q*cos`. Results are rounded, saturated to 16 bits and registered.
* `fa_combiner` adds the two FAs and halves the sum with rounding. Two
  full-scale carriers then cannot overflow the 16-bit DAC word.
* The four interpolators share reset, clear and profile, so their requests
  coincide. An assertion checks that.

At the DAC, the stream carries each FA at half its baseband amplitude.

## Uplink chain (`dif_rx`)

```
adc_data -+-> quad_demod (NCO w_d1) -> I -> decim_fir -> bb_i[0]
          |                          -> Q -> decim_fir -> bb_q[0]
          +-> quad_demod (NCO w_d2) -> I -> decim_fir -> bb_i[1]
                                     -> Q -> decim_fir -> bb_q[1]
```

`quad_demod` left-aligns the 14-bit ADC word to 16 bits and forms `x*cos`
and `-x*sin`. The wanted FA lands at DC at half the input amplitude. The
decimation filter removes the other FA and the image at twice the carrier.

## Configuration and profile changes (`dif_transceiver`)

The top holds the configuration register: the profile plus four tuning
words (`cfg_ftw_u[0..1]` for downlink, `cfg_ftw_d[0..1]` for uplink). They
are written together when `cfg_we` is high.

* After reset: 7 MHz profile, all carriers at 12 and 20 MHz.
* A write that changes the profile clears every filter delay line, rate
  counter and NCO phase in the next clock, and increments `mode_changes`.
  The output is valid again once each filter has refilled: 129 samples per
  stage.
* A write with the same profile only retunes the NCOs, without clearing.
* The undefined profile code 3 is ignored.

## Board level: two diversity paths (`adcb_top`)

The base station receives and transmits on two antenna paths (diversity A
and B). The board therefore carries two identical conversion modules, each
with its own DAC, ADC and transceiver for both FAs of its path. `adcb_top`
instantiates `dif_transceiver` once per path (index 0 = A, index 1 = B).
It sends one configuration write to both, so the two paths change profile
and carriers in the same clock and run sample-aligned. All data ports are the
per-path ports below, indexed `[path]` or `[path][fa]`.

## Transceiver interface (`dif_transceiver`, one path)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 64 MHz sample clock, synchronous active-low reset |
| `cfg_we`, `cfg_profile`, `cfg_ftw_u[2]`, `cfg_ftw_d[2]` | in | 1, 2, 32 | configuration write |
| `profile`, `mode_changes` | out | 2, 16 | active profile, number of profile changes |
| `tx_req` | out | 1 | take `tx_i[f]`, `tx_q[f]` this clock |
| `tx_i[2]`, `tx_q[2]` | in | 16 | downlink baseband of FA1, FA2 |
| `dac_i`, `dac_q` | out | 16 | complex 64 MHz stream to the DAC |
| `adc_data` | in | 14 | ADC samples, one per clock |
| `rx_valid` | out | 1 | `rx_i[f]`, `rx_q[f]` updated this clock |
| `rx_i[2]`, `rx_q[2]` | out | 16 | uplink baseband of FA1, FA2 |

Profile encoding (`dif_pkg::profile_t`): 0 = 7 MHz, 1 = 3.5 MHz,
2 = 1.75 MHz.

## Files

| file | contents |
|---|---|
| `rtl/dif_pkg.sv` | profile type, constants, coefficient and sine-table generation, saturation helper |
| `rtl/rc_fir.sv` | 129-tap FIR core |
| `rtl/interp_fir.sv`, `rtl/decim_fir.sv` | per-profile interpolation and decimation |
| `rtl/nco.sv` | 32-bit phase accumulator, 1024-point sine/cosine table |
| `rtl/quad_mod.sv`, `rtl/quad_demod.sv` | complex modulator and quadrature demodulator |
| `rtl/fa_combiner.sv` | two-FA adder |
| `rtl/dif_tx.sv`, `rtl/dif_rx.sv` | downlink and uplink chains |
| `rtl/dif_transceiver.sv` | one diversity path: configuration register, both chains |
| `rtl/adcb_top.sv` | top: two diversity paths |
| `tb/ad9777_model.sv` | behavioural model of the DAC chip's x4 interpolation and 64 MHz modulation (testbench only) |

## Verification

Every testbench checks itself against values it computes on its own (floating
point or 64-bit integer models). Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_interp_fir` | every 64 MHz output against a floating-point model of the zero-stuffed (and cascaded) raised-cosine filters, in all profiles; request rate; unity DC gain |
| `tb_decim_fir` | every output against a floating-point model; output rate and exact latency; unity DC gain |
| `tb_nco` | cos/sin within 1 LSB for the 12/20 MHz carriers and random tuning words; 16-sample period at 12 MHz; phase reset |
| `tb_quad_mod`, `tb_quad_demod`, `tb_fa_combiner` | bit-exact arithmetic including saturation |
| `tb_dif_tx` | DAC stream against the exact two-carrier model (with the NCO phase timing), all profiles and a retuned pair of carriers |
| `tb_dif_rx` | recovery of two FAs from a synthetic two-carrier IF, all profiles, output rate |
| `tb_dif_transceiver` | downlink looped into uplink at default parameters. It checks the recovered values and rates of each profile, profile switches, the ignored undefined code and NCO retuning, and counts that each of these happened |
| `tb_adcb_top` | the same loop-back on both diversity paths at once with different data per path and FA, all profiles, common reconfiguration, paths in step |
| `tb_if_spectrum` | downlink into the behavioural DAC model. The 256 MHz IF must show FA1 at 76 MHz and FA2 at 84 MHz at the expected level, with their mirrors (52, 44 MHz) at least 50 dB down, in every profile |
| `tb_wimax_evm` | the three profiles with two independent 64-QAM OFDM signals each, 256-point FFT shape with 200 used subcarriers and 1/4 prefix, through the loop-back. The error vector magnitude must be below -40 dB; it comes out between -51 and -55 dB |

In the 3.5 and 1.75 MHz profiles, the interpolator's first image of one FA
(8 MHz away, at the baseband rate) falls on the other FA's centre. With the
129-tap fc = 2 MHz filter it sits about 50 dB below the carrier.
`tb_if_spectrum` shows this. It adds to the other FA's error vector: the
loop-back EVM of the 3.5 MHz profile (about -51 dB) is the worst of the three.

For scale, the published board measured -43 to -44 dB at the analog IF
output with a clean clock. The loop-back EVM here covers only the digital
filters, NCOs and quantisation.

To run one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/dif_pkg.sv tb/tb_adcb_top.sv --top tb_adcb_top -o sim
./obj_dir/sim
```

All testbenches run the design at its default parameters. Each finishes in
seconds, `tb_wimax_evm` in under a minute.

## Departures and own choices

Taken from the published design: the block structure of both chains, the
frequency plan, the filter type, taps, roll-off, cut-offs, sample rates and
coefficient width per profile, the converter resolutions and the sign of the
demodulator's sine branch (`-sin`).

Chosen here:

* **1.75 MHz profile as a cascade.** Its filter column lists two filters
  (fs 64/8 MHz, fc 2/1.2 MHz). It is read as a x2 stage at 8 MHz followed by
  the x8 stage at 64 MHz.
* **Coefficient scaling.** The taps are normalised so they sum to L, and
  rounded to Q1.15. The decimator divides by L.
* **Word formats.** Baseband words are 16 bits. Rounding is half-up
  followed by saturation. The combiner halves its sum. The ADC word is
  left-aligned, and the uplink output carries each FA at half the ADC scale.
* **NCO.** A 32-bit accumulator and a 1024-entry full-wave table. Both
  outputs are registered and reset to phase zero.
* **Run-time reconfiguration.** The profile and carriers are a register
  written by `cfg_we`. A profile change flushes the filters. The published
  board reconfigures by loading a new FPGA image and software.
* **Baseband interface.** A parallel port with a request/valid strobe
  replaces the board's multi-gigabit serial link to the modem. That link's
  framing is not described. Note that 4 streams x 16 Msps x 16 bits exceed
  its quoted 640 Mbit/s, so it must carry narrower words than the 16-bit
  port here.
* **Reset.** Synchronous, active low.

Not part of this RTL:

* the DAC chip's two half-band x2 filters, 256 MHz modulation and
  converters. `tb/ad9777_model.sv` models them behaviourally, with
  half-band taps of its own;
* the ADC;
* the multi-gigabit serial link;
* the sampling-clock PLL;
* the analog band-pass filters;
* the FPGA configuration PROM.

The clock-jitter measurements (three sampling clocks of different phase
noise) concern the analog sampling clock and have no digital counterpart.
