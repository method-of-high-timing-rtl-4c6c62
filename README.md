# Virtual-sampling pulse synthesiser

A DAC running at 1.25 GSa/s holds each sample for 800 ps. If it is fed the samples of an
ideal pulse, its rise, fall and width can only be set in 800 ps steps. This design does
better, reaching 100 ps steps and finer, without a faster DAC. It follows the published
method of virtual-sampling pulse synthesis:

1. Draw the ideal trapezoid pulse at a *virtual* sample rate N times the DAC rate
   (N = 8: 10 GSa/s, one sample every 100 ps).
2. Low-pass filter those samples at the virtual rate down to the band the DAC can
   reproduce (about 500 MHz).
3. Keep one sample in N and send those to the DAC.

The filtered pulse is smooth, so a 100 ps shift of an edge does not disappear when the
samples are thinned out. It shows up as slightly different values in the few DAC samples
on that edge. After the DAC's analogue reconstruction filter the edge sits where it was
drawn. The testbenches show this on the DAC-rate samples alone: a set width of 10.0,
10.1, 10.2 or 10.3 ns, and 4.0 to 4.9 ns in 0.1 ns steps, comes back within 1 ps (see
"Measured behaviour").

## Block structure

```
host words ─► local_interface ─► param_ctrl ─┬─► waveform_sample_generator   (N·fs)
                                             │     ├ pulse_control  (K, region)
                                             │     ├ rise_edge_compute
                                             │     ├ fall_edge_compute
                                             │     └ sample_mux (with V_H / V_L)
                                             │          │
                                             ├─► digital_filter (7th-order Butterworth, N·fs)
                                             │          │
                                             ├─► clock_divider ÷N ─► downsampler (fs)
                                             │          │
                                             │     dac_lane_packer (8 samples per word, fs/8)
                                             └─► waveform_memory (host samples, playback)
                                                        │
                        dac_word[8] / dac_valid ◄───────┘  (generated or played back)
```

`pulse_synth_top` wires all of these. The DAC, its serial link, the analogue low-pass
filter, the output amplifier, the clock chips and the host computer are outside the RTL.
The top's ports are where they would connect: `dac_word`/`dac_valid` towards the DAC and
`host_valid`/`host_data` from the host link.

### One clock = one virtual sample

The whole design runs in one clock domain. One clock period is one virtual sample, so
at N = 8 and a 1.25 GSa/s DAC the clock is nominally 10 GHz. The fs rate (one sample
per N clocks) and the DAC-word rate fs/8 (156.25 MHz in hardware) are one-clock enable
strobes, not derived clocks. This follows the method's block diagram, where the
generator and filter are clocked at N·fs. It makes the RTL an exact, cycle-by-cycle
model of the data path.

It is not a design that closes timing at 10 GHz. A real-time FPGA version at 156.25 MHz
would have to produce and filter 64 virtual samples per clock: a 64-way parallel
generator and a block-parallel IIR filter. That version is not part of this RTL. In the
published hardware, the samples were computed on the host and replayed from FPGA
memory. The playback mode here (`waveform_memory`) covers that use.

## Drawing the pulse: the sample generator

This is the part that needs the most care.

### Time units

Times are counted in *ticks* of the virtual clock (100 ps at 10 GSa/s):

| quantity | register | unit | notes |
|---|---|---|---|
| period 1/f | `REG_PERIOD` | ticks (integer) | the number of samples per period is fixed, so there is no period-to-period jitter |
| width Tw (50 %–50 %) | `REG_TW` | quarter ticks (25 ps) | |
| rise Tr, fall Tf (10 %–90 %) | `REG_TR`, `REG_TF` | quarter ticks | 0 = a step |
| V_H, V_L | `REG_VHIGH`, `REG_VLOW` | DAC codes, 16-bit two's complement | V_H ≥ V_L |

Quarter-tick resolution (`TIME_FRAC = 2` in `pulse_pkg`) lets widths such as 4.25 ns be
set at a 10 GSa/s virtual rate. The edge values carry the fraction exactly.

### Regions and values

A phase accumulator K counts 0, 1, …, period−1 and wraps. With the 10–90 % edge times,
an edge's full 0–100 % duration is T/0.8. Its 50 % points are then Tw apart when:

| region | condition on K (ticks) | sample value |
|---|---|---|
| rising edge | K < K1 = 1.25·Tr | V_L + (0.8/Tr)(V_H−V_L)·K |
| high | K1 ≤ K < K2 = Tw + 0.625(Tr−Tf) | V_H |
| falling edge | K2 ≤ K < K3 = Tw + 0.625(Tr+Tf) | V_L + (0.8/Tf)(V_H−V_L)·(K3−K) |
| low | K3 ≤ K < period | V_L |

The factors 1.25 = 10/8 and 0.625 = 5/8 make K1, K2 and K3 exact in 1/32 tick
(`THR_FRAC = 5`). `param_ctrl` computes them with shifts and adds. It also computes the
two slopes (0.8/T)(V_H−V_L) per tick, each once per parameter set. It uses a serial
divider for this and keeps 16 fractional bits (`SLOPE_FRAC`). Each edge unit is then
one multiplier, a rounding shift and an add. The falling edge uses the distance to its
end, K3 − 32·K, in 1/32 tick. A fractional width therefore moves the whole edge by the
fraction.

`pulse_control` compares 32·K with the thresholds and selects the source. The edge units
register their results, so the source select and the levels are delayed one clock to
meet them. The `sample_mux` registers the chosen value. The latency from K to the
sample is two clocks.

### Parameter sets and PWM

Registers are staged and take effect only on a write to `REG_COMMIT`. A commit:

1. checks the set: V_H ≥ V_L, Tw ≥ 0.625(Tr+Tf) (the rise must end before the fall
   begins; this is the minimum width for given edges), K3 ≤ period, period ≥ 1, N ≥ 1;
2. if the set fails the check, raises `param_error` and keeps the old set;
3. otherwise computes the slopes (about 85 clocks) and hands the set to the generator.

The generator adopts it at its next period start. No period is ever built from two sets.
Committing a new width every period therefore gives clean PWM. The run bit, the mode
bit and N switch at commit time. A change of N or of the run bit restarts the fs phase.

## Band limiting: the digital filter

`digital_filter` is a cascade of four direct-form-I second-order IIR sections. Its
default coefficients (`BUTTER_DEFAULT` in `pulse_pkg`) form a 7th-order Butterworth
low-pass for a 10 GSa/s input, with 3 dB at 550 MHz and about −1 dB at 500 MHz. It is
about −38 dB at 1 GHz and −87 dB at 2 GHz, and its response is zero at 5 GHz.

They were obtained from the analogue Butterworth prototype by the bilinear transform,
with pre-warping (ωa = 2·fs·tan(π·fc/fs)). The poles were paired into second-order
sections, and each section's numerator was scaled so that its DC gain is exactly 1:
b ← b·(1 + a1 + a2)/(b0 + b1 + b2). Coefficients are Q2.26 (28 bits). Samples inside
the filter have 2 bits of headroom and 10 bits below the DAC LSB. Direct form I has a
single rounding point per section, at its output, which keeps rounding noise small with
poles this close to z = 1.

The method asks for a Butterworth response (least overshoot among the usual types) and a
500 MHz passband at the virtual rate. The order, the exact corner and the number formats
are this design's choices. All 20 coefficients can be rewritten over the host link at
run time (`REG_COEF + 5·section + {b0, b1, b2, a1, a2}`), so another low-pass of up to
8th order can be loaded.

**Overshoot.** A 7th-order Butterworth overshoots a step by about 16 %. Keep V_H − V_L
within about 85 % of the range above V_L, or the output saturates at ±32767. The tests
use V_H = 24000–26000 with V_L near 0.

## Decimation and DAC words

`clock_divider` strobes every N clocks (register `REG_DECIM`, default 8). `downsampler`
keeps the filtered sample present at the strobe and holds it until the next one: one
sample per strobe, one clock later. `dac_lane_packer` collects eight of them into one
word, lane 0 oldest, and strobes `word_valid` once per 8·N clocks. That is 156.25 MHz
when fs = 1.25 GSa/s.

The rule "period is a whole number of ticks" is what the generator needs. If the period
is also a multiple of N, every period has the same DAC samples. A 100 MHz pulse at
1.25 GSa/s has 12.5 DAC samples per period, so its DAC samples repeat every second
period. The output is still correct.

## Playback mode

`waveform_memory` holds 8 banks × 1024 samples of 16 bits (8192 samples, 6.55 µs at
1.25 GSa/s). The host writes samples by index: local-bus address `0x8000 | index`.
Sample `index` goes to lane `index mod 8` of row `index / 8`. With `REG_CTRL` bit 1 set
and committed, rows 0 … `REG_PLAYLEN`−1 are sent to the DAC cyclically, one row per
DAC-word strobe. `play_wrap` marks row 0. This path carries samples computed elsewhere
at the DAC rate. The generator keeps running but its words are not sent.

## Host interface and register map

`local_interface` takes 32-bit words (`host_valid`, `host_data`) with no back-pressure.
A packet is a header followed by data words:

```
header [31:30] = 2'b01 (write)   [29:16] = count   [15:0] = first address
data   count words, written to first address, +1, +2, ...
```

A header with another opcode is dropped and pulses `bad_header`.

| address | register |
|---|---|
| 0x0000 | CTRL: bit 0 run, bit 1 playback (staged) |
| 0x0001 | PERIOD, ticks (staged) |
| 0x0002–0x0004 | TW, TR, TF, quarter ticks (staged) |
| 0x0005, 0x0006 | V_HIGH, V_LOW, signed 16-bit (staged) |
| 0x0007 | DECIM, N (staged, default 8) |
| 0x0008 | PLAYLEN, playback rows (immediate) |
| 0x0009 | COMMIT (any data) |
| 0x0010–0x0023 | filter coefficients, section s at 0x10 + 5s: b0, b1, b2, a1, a2 (immediate) |
| 0x8000 + i | waveform memory sample i |

Status outputs: `busy` (commit in progress) and `param_error` (last commit refused).

## Measured behaviour (simulation)

These results come from `tb_pulse_synth_top` and `tb_workload_sweeps` at the default
size. The widths are measured only from the 1.25 GSa/s samples sent to the DAC. The main
measure is the area under one period: W = 0.8 ns · Σ(s − V_L)/(V_H − V_L). For a
trapezoid this area equals the 50 %–50 % width, and the low-pass filter preserves it.

| set pulse | width by area | width by 50 % crossings (linear interpolation, 800 ps grid) |
|---|---|---|
| 50 MHz, Tr=Tf=2.5, Tw=10.0 ns | 10.0000 | 9.978 |
| 50 MHz, 2.6/2.6/10.1 | 10.1000 | 10.088 |
| 50 MHz, 2.7/2.7/10.2 | 10.2000 | 10.197 |
| 50 MHz, 2.8/2.8/10.3 | 10.3000 | 10.301 |
| 100 MHz, 2.5/2.5/5.0 | 5.0000 | 4.993 |
| 50 MHz, 2.5/2.5/4.25 | 4.2496 | 4.244 |

Widths 4.0–4.9 ns in 100 ps steps are recovered within 1 ps by area. Rise and fall times
of 2.5–10.5 ns in 2 ns steps measure 2.56/4.48/6.49/8.50/10.50 ns (rise) on the
800 ps grid.

`tb_analog_measure` rebuilds a continuous waveform from the DAC samples. It then measures
the 50 % width and the 10 %–90 % edges, as an oscilloscope would. It uses two
reconstructions. The first is a shape-preserving cubic Hermite interpolation through the
800 ps samples. The second models the analogue stage: an 800 ps zero-order hold followed by
a 2nd-order Butterworth low-pass at 600 MHz. Both models belong to the test, not to the
design.

| set pulse (Tr/Tf/Tw, ns) | interpolated: rise / fall / width | hold + low-pass: rise / fall / width |
|---|---|---|
| 50 MHz, 2.5/2.5/10.0 | 2.486 / 2.460 / 9.981 | 2.509 / 2.561 / 10.078 |
| 50 MHz, 2.6/2.6/10.1 | 2.561 / 2.585 / 10.083 | 2.581 / 2.696 / 10.167 |
| 100 MHz, 2.5/2.5/5.0 | 2.470 / 2.473 / 5.000 | 2.536 / 2.571 / 4.977 |
| 100 MHz, 2.6/2.6/5.1 | 2.574 / 2.567 / 5.099 | 2.623 / 2.639 / 5.100 |
| 1 MHz, 2.5/2.5/4.0 | 2.487 / 2.503 / 4.003 | 2.510 / 2.510 / 4.001 |
| 10 MHz, 2.5/2.5/4.0 | 2.487 / 2.503 / 4.003 | 2.510 / 2.510 / 4.001 |

The values are averages over every whole pulse in the capture. At 100 MHz a period is
12.5 DAC samples, so consecutive pulses sit at two different positions on the DAC grid.

With the simple hold-and-filter model, the 50 % points move by up to about 70 ps. The
filter leaves part of the hold's images near 1.25 GHz, and where they fall depends on where
the edge sits relative to the 800 ps grid. A steeper reconstruction filter, or a converter
that interpolates internally, reduces this error.

## Verifying and changing it

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_ref_pkg.sv` holds the
floating-point reference models: the ideal trapezoid, parameter sets worked out in real
arithmetic, and coefficient conversion.

| testbench | what it checks |
|---|---|
| `tb_pulse_control` | K sequence, region per tick against the ideal trapezoid, new set only at the wrap |
| `tb_rise_edge_compute`, `tb_fall_edge_compute` | edge values within 1 LSB of the ideal ramp, random times and levels |
| `tb_sample_mux` | source selection |
| `tb_waveform_sample_generator` | every sample of six pulse sets within 1 LSB, samples per period, switch at period start |
| `tb_digital_filter` | agreement with a floating-point cascade (2 LSB), step settling and overshoot, 100 MHz passes, 2 GHz stopped |
| `tb_param_ctrl` | thresholds and slopes against real arithmetic, refused sets, commit time, coefficient and memory writes |
| `tb_clock_divider`, `tb_downsampler`, `tb_dac_lane_packer`, `tb_waveform_memory`, `tb_local_interface` | rates, ordering, wrap, packet decoding |
| `tb_pulse_synth_top` | end to end at the default size: virtual samples, fs samples against a filter model, DAC words, widths, refused set, bad header, playback, N = 4, coefficient reload |
| `tb_workload_sweeps` | the width, rise-time and fall-time sweeps above |
| `tb_analog_measure` | width and edge times on a rebuilt continuous waveform (interpolation, and hold + low-pass) |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pulse_pkg.sv tb/tb_ref_pkg.sv tb/tb_pulse_synth_top.sv \
    --top-module tb_pulse_synth_top -o sim
./obj_dir/sim
```

Every testbench finishes in seconds.

Sizes are parameters: `K_W`, `TIME_FRAC`, `SLOPE_FRAC`, the filter formats (`pulse_pkg`),
`LANES` and `MEM_DEPTH` (top). `waveform_memory` expects `LANES` to be a power of two,
at least 2. If you change `TIME_FRAC`, the thresholds stay exact as long as
`THR_FRAC = TIME_FRAC + 3`.

## Where this design goes beyond, or departs from, the method

- **Own choices:** the clock-enable realisation of the ÷N clock; the host packet format
  and register map; staging with commit and validity checks; the parameter hand-over at
  period start; quarter-tick time resolution; the filter order, corner and fixed-point
  formats; the lane order; the memory size and replay scheme.
- **Equations:** the published rise/fall equations give the value above the low level.
  Here V_L is added so that a non-zero low level works. The rise region is taken to
  start at K = 0, where it equals V_L.
- **Not built:** the DAC and its 2× interpolation, the DAC serial link, the analogue
  reconstruction filter, the output amplifier, the PLL and clock conditioner, the host
  and its PCIe link. A 64-sample-per-clock parallel form that would run at 156.25 MHz
  is not built either.
- **Spectral purity and jitter** (SNR, random jitter) depend on the analogue parts and
  are not modelled.
