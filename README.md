# Hybrid clock recovery for a 1.1 Gbit/s 2-PAM optical receiver

A receiver for gigabit Ethernet over 1 mm plastic optical fibre gets a signal
whose channel bandwidth is below 100 MHz while the line runs at 1.0991 Gbit/s.
The eye at the receiver is completely closed by inter-symbol interference.
Before any equalizer can work, the ADC has to sample at the right frequency and
phase. This RTL is the digital half of a phase-locked loop that recovers that
clock from the raw samples, without equalizing them first.

The loop is split between the FPGA and a few board parts:

```
 2-PAM line --> ADC 2.2 GS/s (DDR, 2 samples/symbol) --+--> eq_samples (to the equalizer)
                 ^                                     |
                 | ~1.1 GHz sampling clock             v   one sample per symbol
               VCXO <-- RC low-pass <-- dac_out <-- delta-sigma <-- loop filter <-- M&M TED
               (board)  (board)        |<------------------- FPGA, 275 MHz ----------------->|
```

Only the FPGA part is RTL. The ADC, the RC filter and the VCXO are analog
parts. Testbench models of them close the loop in simulation.

## Rates and parallelism

The FPGA clock is 275 MHz, a quarter of the symbol rate. Each clock carries
`P = 4` symbols, i.e. 8 ADC samples. Even samples sit at the receiver's symbol
instants; odd samples sit half a symbol later. The timing error detector uses
one sample per symbol, chosen by `TED_PHASE` (default: even). All eight samples
leave on `eq_samples`, one register later, for an equalizer that is not part of
this design.

## The timing error detector (`mm_ted`)

A Mueller & Mueller detector normally correlates the equalized signal with
decided symbols. Here the decisions are simply the signs of the raw samples:

```
e_k = sign(y[k-1]) * y[k]  -  sign(y[k]) * y[k-1]        sign(0) = +1
```

For a symmetric pulse, the mean of `e_k` is zero when the samples sit on the
pulse's centre. Away from the centre, the mean is roughly proportional to the
offset (an S-curve). With this definition the mean error is negative when
sampling late. Single errors are very noisy on a closed eye, but the mean still
carries the timing information, and the loop averages it.

The four symbol errors of a clock are computed in parallel and summed. The last
sample of the previous clock is the predecessor of the first. Output: a 12-bit
signed error per clock, registered (1 clock latency).

## The loop filter (`loop_filter`)

The loop filter makes a second-order, type-2 loop: a proportional path plus an
integrator, `F = K1 + K2/s`. Both gains are powers of two, so the filter has no
multipliers:

| path          | operation              | delay                              |
|---------------|------------------------|------------------------------------|
| proportional  | `x >>> 1` (K1 = 2^-1)  | 2 registers                        |
| integral      | `x >>> 13` (K2 = 2^-13)| 1 register, then accumulator `q <= q + b` |
| output        | `a + b`                | 1 register                         |

An input reaches the output three clocks later. From then on, the integral adds
`x/8192` per clock.

The number format is this design's own. The input is an integer. Internally,
values carry 13 fraction bits so that the 2^-13 path loses nothing. The
accumulator and the sum saturate at the signed 8-bit range of the output, and
the output is the integer part. `ACC_INIT` sets the accumulator's value after
reset.

## Loop polarity and the start point (`hcr_top`)

The filter output `x` (signed, -128..127) becomes the DAC code
`code = 127 - x`. This is the filter's minus sign, `F(s) = -[K1 + K2/s]`,
folded into the offset-binary conversion. A higher code gives a higher control
voltage and so a higher VCXO frequency.

After reset the loop starts at `START_CODE = 255`, the top of the VCXO range.
The line rate must lie below it, and the integrator walks down toward it. While
the loop is far from lock it slips cycles. During a slip the proportional path
swings the frequency unevenly, which gives the integrator a net pull toward
lock. So the time to lock grows with the distance between the start point and
the line rate. In the model loop it took about 14k, 160k and 500k clocks for 50, 150
and 200 ppm. Starting closer to the expected frequency shortens acquisition.

If the polarity is wrong, the loop still locks, but on the other zero crossing
of the S-curve, i.e. half a symbol off. The odd samples then land on the symbol
centres.

## Delta-sigma DAC (`dsm_dac`)

The control voltage comes from a first-order delta-sigma modulator plus an
external RC low-pass. This is the usual one-pin DAC of FPGA designs, here
clocked at 275 MHz. The 8-bit code is added to an 8-bit accumulator each clock,
and the carry is the output bit. Over any 256 clocks the stream holds exactly
`code` ones. The RC filter's time constant must be long compared with 256
clocks and short compared with the loop's response. The RC values are a board
choice and are not given here.

## Convergence flag (`lock_detector`)

`locked` rises when the TED error stays bounded:
- The error is summed over windows of 256 clocks.
- A window whose sum lies within ±8192 (a mean of 32 per clock) is good.
- 16 good windows in a row raise the flag.
- One bad window drops it.

With the test channel, a mean of 32 per clock is about 0.2 UI of static timing
offset. The window, the bound and the hold count are this design's values;
retune them for another front end.

## Parameters

| module          | parameter   | default | meaning                                          |
|-----------------|-------------|---------|--------------------------------------------------|
| `hcr_top`       | `P`         | 4       | symbols per clock (1.0991 Gbit/s / 275 MHz)      |
|                 | `W`         | 8       | ADC sample width (signed)                        |
|                 | `TED_PHASE` | 0       | which DDR sample feeds the TED (0 even, 1 odd)   |
|                 | `START_CODE`| 255     | DAC code after reset (scan start point)          |
| `loop_filter`   | `K1_SHIFT`, `K2_SHIFT` | 1, 13 | proportional and integral gains as shifts |
|                 | `FRAC_W`    | 13      | fraction bits inside the filter                  |
| `dsm_dac`       | `N`         | 8       | DAC code width                                   |
| `lock_detector` | `WIN_LOG2`, `THRESH`, `HOLD` | 8, 8192, 16 | window, bound, good windows to lock |

The shared constants live in `rtl/hcr_pkg.sv`.

## What follows the published design and what does not

The following come from the published design:
- the blocks and their order
- the sign-based Mueller & Mueller law
- the loop filter's two shifts (1 and 13) and its delay structure
- the 8-bit delta-sigma DAC at the FPGA clock
- the rates
- a convergence flag driven by the TED error
- a start point at the upper end of the range

The following are this design's own choices:
- the ADC width
- the parallel TED and its summation
- the fixed-point format and saturation of the filter
- the DAC code mapping
- the lock detector's window and limits
- synchronous active-high reset everywhere

The published gain values are 0.5569 for the proportional path and 0.00001994
for the integral path. They are quoted there next to the shifts 2^-1 and 2^-13
in the opposite order. The shifts are used as the filter diagram assigns them:
1 on the proportional path, 13 on the integral path.

Not built: the equalizer (fractionally spaced FFE and DFE), the Reed-Solomon
FEC and PCS of the media converter, and the analog parts. The design's
analog-level targets cannot be checked in RTL, because they depend on the
VCXO, RC filter and front-end gains. Those targets are a 4 kHz loop natural
frequency, a 320 kHz holding window and a 55 ms acquisition.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `mm_ted_tb`: random words against the error law computed in the testbench.
  Zero error at an ISI-free eye centre. Signs for late and early sampling on a
  symmetric pulse. One-clock latency.
- `loop_filter_tb`: against an integer reference (`out = floor((x[n-2]·4096 + Σx)/8192)`,
  clamped). Three-clock impulse latency, ramp slope, saturation at both ends,
  random runs, start value.
- `dsm_dac_tb`: exactly `code` ones in every 256 clocks for fixed codes;
  strict alternation at mid-scale; output low in reset.
- `lock_detector_tb`: flag against a reference of window sums; the flag rises
  after exactly 16×256 clocks.
- `hcr_top_tb`: the closed loop at the top's default parameters, with models of
  the parts outside the FPGA:
  - `pof_adc_model`: PRBS symbols (orders 7 to 23) through a 4-UI
    raised-cosine pulse, which closes the eye; two samples per symbol.
  - `rc_filter_model`: first-order, time constant 256 clocks.
  - `vcxo_model`: 300 ppm over the control range.

  The top test acquires at three frequency offsets and checks that acquisition
  time grows with the offset. After lock it checks: mean frequency error below
  3 ppm, mean sampling offset below 0.1 UI, no flag drop, DAC density, and the
  equalizer port. It then steps the transmitter by 40 ppm while locked and
  checks that the loop follows. Last, it acquires and holds lock once with each
  PRBS length 2^7-1, 2^11-1, 2^15-1, 2^20-1 and 2^23-1. The whole test runs in
  a few seconds.

To run one with Verilator:

```
verilator --binary --timing --assert \
    rtl/hcr_pkg.sv rtl/mm_ted.sv rtl/loop_filter.sv rtl/dsm_dac.sv \
    rtl/lock_detector.sv rtl/hcr_top.sv \
    tb/pof_adc_model.sv tb/rc_filter_model.sv tb/vcxo_model.sv tb/hcr_top_tb.sv \
    --top-module hcr_top_tb
./obj_dir/Vhcr_top_tb
```

For a unit testbench, compile `rtl/hcr_pkg.sv`, the module and its
`tb/<module>_tb.sv`, with `--top-module <module>_tb`.

How far to trust it: the digital blocks are checked exactly against independent
references. The loop behaviour is checked only against simple models. A real
front end has a different pulse, noise and gains, and the lock detector's
bound in particular will need retuning. Timing closure at 275 MHz has not been
checked on any FPGA.
