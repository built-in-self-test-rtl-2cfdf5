# Frequency-response BIST with a delta-sigma DDS

This RTL measures the frequency response of an analog block (a filter or an
amplifier) from the digital side of a mixed-signal chip. It uses the DAC
and ADC that the system already has. A direct digital synthesizer (DDS)
drives the DAC with a sine tone. The ADC digitises the block's output. For
each tone the logic measures two things:

- **Phase response:** the delay between the tone and the response, in clock
  cycles.
- **Amplitude response:** a multiply-accumulate correlation of the response
  with a second, phase-aligned copy of the tone.

The controller steps the tone through a range of frequencies and hands each
result to a host over a small register bus. The measurement needs no FFT.
It uses two synthesizers, a cycle counter, one multiplier and one
accumulator.

The scheme follows a published BIST design, "Built-In Self-Test for
Automatic Analog Frequency Response Measurement". That description gives
the architecture but not word widths, handshakes or a register map. Where
this RTL has to fill those in, the sections below say so.

## Measurement principle

Let the stimulus be `T1 = A1 sin(wt) + k1`. The block's response is
`D = A2 sin(wt + theta) + k2`. Suppose a second synthesizer produces
`T2 = A1 sin(wt + theta)` with no DC offset, phase-aligned with the
response. Then

    T2 * D = A1*A2/2 * (1 - cos(2wt + 2theta)) + k2 * T2

Summed over a whole number of tone periods, the oscillating terms vanish.
What remains is `A1*A2/2 * N`. Tone frequencies are `FCW * f_clk / 2^L`, so
a window of exactly `2^L` clocks holds `FCW` whole periods of every tone.
The amplitude result is therefore

    AMP = A1 * A2 / 2 * 2^L        (A1 = 127 with the default table)

Dividing by `127*127/2*2^L` gives the gain `|H|` of the block directly.
The -3 dB point is where the result falls to 0.707 of its pass-band value.

The phase alignment of T2 is what makes this work. A misaligned T2 scales
the result by `cos(error)`. Each tone therefore gets a phase measurement
first, and that measurement is used to restart T2.

## Per-tone sequence (test_controller)

1. **Tone change.** The controller sets `fcw` on both synthesizers. It then
   waits `SETTLE` clocks so the analog block reaches steady state. DDS1 is
   never interrupted between tones. It is restarted from phase 0 only when
   a sweep starts.
2. **Phase test.** The phase detector waits for an upward zero crossing of
   T1 (its MSB rising). It then counts clocks until the ADC code's MSB
   rises. The count is the delay. The phase shift is
   `theta = 2*pi * delay * FCW / 2^L`. The delay is kept in the phase
   register (ORA1).
3. **DDS2 restart.** The controller waits for the next T1 crossing, in
   cycle `t0`. It copies the DDS1 phase that produced that T1 sample into
   DDS2's start phase. It then holds DDS2 in reset through cycle
   `t0 + delay`.
4. **Amplitude test.** DDS2 produces its first sample 3 clocks after
   release. The ADC samples pass through a matching 3-stage delay line.
   As a result, DDS2's copy of the T1 sample from cycle `t0` meets the ADC
   sample from cycle `t0 + delay` at the multiplier. That is the sample in
   which the response edge was seen. The multiplier-accumulator (ORA2)
   then sums `2^L` products.
5. **Result.** FCW, delay, the phase shift `delay*FCW mod 2^L` (a
   fraction of a turn), a timeout flag and the 33-bit sum are presented
   to the host. The controller stalls until the host acknowledges them.
   It then moves on to `FCW + STEP`, and ends after `FCW_STOP`.

Per tone, this takes roughly `SETTLE` + up to two tone periods + `2^L` +
a few clocks. At L = 16 that is under 200 k clocks even for the slowest
tone.

The delay line is what lets a delay of 0 work without predicting the
next T1 crossing. Step 3 also differs from a plain "reset DDS2 to phase
zero": T1 is detected at the first sample past zero, and that sample can
be up to one phase step past zero. At high FCW one step is large (22
degrees at FCW = 4096). Restarting from the captured phase removes that
error. With a pure-delay stand-in for the analog block, the amplitude
result then matches the ideal value to 0.04 %.

If no T1 crossing arrives (FCW = 0), or no response crossing arrives within
`2^16 - 1` clocks, the phase test ends with `timeout` and delay 0. The
amplitude test then runs with DDS2 started at once.

## The synthesizer (dds, sd_mash, phase_accumulator, sine_rom)

A plain DDS truncates an L-bit phase accumulator to W bits to address its
sine table. That truncation produces spurs. This design instead splits the
L-bit frequency control word:

- `FCW[L-1:L-W]` goes straight to a **W-bit** phase accumulator.
- `FCW[L-W-1:0]`, constant for a given tone, goes to a 3rd-order
  delta-sigma modulator.

The modulator's small integer output (-3..+4) is added to the increment.
Its mean is exactly `FCW_low / 2^(L-W)`, so the average phase step is
`FCW / 2^(L-W)`. The frequency resolution is still `f_clk / 2^L`. The
quantisation error is pushed to high frequencies, where the DAC's
reconstruction filter removes it. The modulator's input is a constant, so
its oversampling ratio is the same for every FCW.

- **Modulator:** MASH 1-1-1. It is three `L-W`-bit accumulators in cascade,
  with carries combined as `c1 + (1-z^-1)(c2 + (1-z^-1)c3)`. Feed-forward,
  feedback and error-feedback structures give the same shaping. MASH is
  the simplest of them.
- **Table:** one full period, 2^W entries of
  `2^(D-1) + round((2^(D-1)-1) * sin(2*pi*p/2^W))`. The entries are computed
  when the ROM is initialised, by `bist_pkg::sine_code`. That function uses
  a quarter-wave reduction and a Taylor series in 64-bit fixed point, so
  no real-number support is needed. The sample's MSB is the sine's sign.
- **Timing:** `fcw` reaches the phase 2 clocks later, and the sample 1
  clock after that. A restart (`clear`) loads `start_phase`. If `clear` is
  last high in cycle c, the sample of `start_phase` appears in cycle c+3,
  and the phase advances from there.

Because the dither can be negative, the phase moves back and forth by a few
steps near every crossing. For a low FCW this makes the MSB chatter for
tens of clocks. See the next section for how the phase detector handles
it.

## Phase detector hysteresis

The timing reference is the MSB of each signal (T1 sample and ADC code). A
rising MSB edge counts only if the code has fallen below
`mid-code - HYST` (HYST = 4 codes) since the previous counted edge. Without
this, chatter at a *downward* crossing creates false rising edges. In
simulation that turned the FCW = 2 amplitude result into -1.0 × its true
value. HYST must be larger than the chatter plus the ADC noise, and smaller
than the smallest response amplitude you want to measure.

At low FCW the delay resolution is limited by the slope of the sine at
the crossing. At FCW = 2, one ADC code spans about 40 clocks. This limits
the phase result to about 0.01 rad. The effect on the amplitude result
is negligible.

## Host registers (host_interface)

There is a synchronous word bus: `addr[3:0]`, `wr_en`, `wr_data[31:0]`,
and a combinational `rd_data[31:0]`. The addresses are `bist_pkg::reg_addr_e`.

| addr | name        | access | meaning |
|------|-------------|--------|---------|
| 0    | CTRL        | W      | bit0: start sweep; bit1: acknowledge result (pulses) |
| 0    | CTRL        | R      | bit0 busy, bit1 result valid, bit2 sweep done, bit3 timeout |
| 1    | FCW_START   | R/W    | first FCW (reset 2) |
| 2    | FCW_STEP    | R/W    | FCW increment (reset 2, the finest step) |
| 3    | FCW_STOP    | R/W    | last FCW, inclusive (reset 2^(L-1), i.e. f_clk/2) |
| 4    | SETTLE      | R/W    | clocks waited after each tone change (reset 2^(L-2)) |
| 5    | RES_FCW     | R      | FCW of the current result |
| 6    | RES_PHASE   | R      | delay in clocks |
| 7    | RES_AMP_LO  | R      | amplitude sum bits 31:0 |
| 8    | RES_AMP_HI  | R      | amplitude sum bits above 31, sign-extended |
| 9    | RES_THETA   | R      | phase shift `delay*FCW mod 2^L`, in units of 2π/2^L |

Host loop: write the settings, write CTRL = 1, poll CTRL. When bit1 is
set, read registers 5–9 and write CTRL = 2. Stop when bit2 is set and bit0
is clear.

## Parameters (bist_top)

| name | default | meaning |
|------|---------|---------|
| L | 16 | FCW width: resolution `f_clk/2^L`, window `2^L` clocks |
| W | 10 | phase accumulator width, sine table of 2^W entries |
| D | 8  | DAC/ADC resolution |
| K | 3  | delta-sigma order |

D = 8 and K = 3 are the published values. L and W are not published. The
values here are this design's choice (W = D + 2 keeps table phase error
below the amplitude quantisation). The amplitude sum is `2D+1+L` bits
wide, so it cannot overflow. The host bus supports L up to 32.

The top's ports are:

- `clk` and `rst_n` (asynchronous, active low).
- The host bus.
- `dac_data[D-1:0]`: offset binary to the DAC.
- `adc_data[D-1:0]`: offset binary from the ADC, sampled every clock.

The DAC, its reconstruction filter, the analog block and the ADC are not
part of the RTL.

## Files

| file | content |
|------|---------|
| rtl/bist_pkg.sv | register map, status bits, sine-table function |
| rtl/bist_top.sv | top level: two DDSs, analysers, controller, host bus, ADC delay line |
| rtl/dds.sv | DDS: FCW split, modulator, accumulator, table |
| rtl/sd_mash.sv | K-th order MASH delta-sigma modulator |
| rtl/phase_accumulator.sv | W-bit accumulator with dither input and load |
| rtl/sine_rom.sv | 2^W x D sine table, registered read |
| rtl/phase_detector.sv | edge-to-edge delay counter with hysteresis, phase register |
| rtl/level_shifter.sv | offset-binary to signed T2 |
| rtl/mac_ora.sv | multiplier and 2^L-sample accumulator |
| rtl/test_controller.sv | sweep sequencer |
| rtl/host_interface.sv | host register bank |
| tb/tb_*.sv | one self-checking testbench per module |
| tb/analog_path_model.sv | behavioural DAC + first-order low-pass + ADC |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top -o sim
    ./obj_dir/sim

The same command works for the others: replace `tb_bist_top` with
`tb_dds`, `tb_sd_mash`, `tb_phase_detector`, `tb_mac_ora`,
`tb_test_controller`, `tb_host_interface`, `tb_phase_accumulator`,
`tb_sine_rom`, `tb_level_shifter` or `tb_noise_shaping`.

`tb_bist_top` runs the top with **all parameters at their defaults**,
through the host bus, in three sweeps:

- **Pure delay of 6 clocks.** FCW 2, 2050 and 4098. The delay must be
  exactly 6. The amplitude must be ideal within 1 %.
- **First-order low-pass** (`a = 0.05`, 4 clocks latency). FCW 2 to 1026
  in steps of 128. Each amplitude must be within 3 % of the analytic
  `|H|`, and each delay within about 2 clocks of `-arg(H)/w`. The -3 dB
  point must fall within one step of the analytic corner.
- **FCW = 0.** This must end in a timeout.

The testbench also checks that every mechanism occurred at least once:
phase test, delayed DDS2 restart, accumulation, host stall, timeout and
sweep end. It simulates about 1.5 M clocks in about a second.

`tb_dds` checks, every clock and for 2^16 clocks, that the phase follows
`FCW*n/2^(L-W)` within 4 table steps. It also checks that the tone makes
exactly FCW periods per window. `tb_sd_mash` compares the modulator with
a cycle-accurate reference and checks its mean.

`tb_noise_shaping` checks the modulator's noise shaping at the
synthesizer's default size (6 input bits, 3rd order). It takes a 4096-point
DFT of the modulator error for three constant inputs. The mean error power
below 0.02 f_clk must be at least 50 dB under the mean power between 0.25
and 0.5 f_clk. The measured gap is 76–82 dB. The theoretical value for
`(1-z^-1)^3` shaping (60 dB per decade) is about 77 dB.

## Departures and limits

Choices made here that the published scheme does not specify:

- **Phase detector.** It adds hysteresis, and it measures the phase as a
  delay in clocks. The controller converts it to `delay*FCW mod 2^L`, in
  units of `2*pi/2^L`. The resolution is one clock, which is coarse for
  tones near `f_clk/2`.
- **DDS2 restart.** DDS2 restarts from the captured DDS1 phase rather than
  from phase zero. The ADC samples go through a 3-clock delay line to
  match DDS2's restart latency.
- **Controller.** The settle wait, the sweep limits, the timeout path and
  the result handshake with stall are all new here. The sweep starts at
  FCW = 2, not 0, because a DC tone has no crossings to measure.
- **Host interface.** The register bus is this design's own. The original
  only mentions a PC interface.
- **Sine vs cosine.** The text of the scheme writes the tones as cosines.
  The table here holds a sine. Only the relative phase matters.
- **Modulator.** Only the MASH form is provided. No other structure is
  included.
- **Accumulator width.** The accumulator is sized for the worst case
  rather than for the analog block's actual gain.

Not verified:

- Noise and distortion of real converters. The analog stand-in is
  noiseless apart from ADC rounding.
- Sweeps of more than a few tones at the default size. A full 16384-tone
  sweep is about 2·10^9 clocks.
