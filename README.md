# SAMPIC waveform TDC — SystemVerilog model

SAMPIC is a 16-channel "waveform TDC": every channel combines a time-to-digital
converter with an ultrafast analog memory. A hit is timed on three scales at once:

| scale  | source                                            | step                        |
|--------|---------------------------------------------------|-----------------------------|
| coarse | 12-bit Gray timestamp counter, common to the chip | one DLL turn (6.4–10 ns)    |
| medium | which of the 64 DLL-driven memory cells was being written when the channel stopped | one sample (100–625 ps) |
| fine   | the 64 stored samples of the pulse itself, interpolated offline | a few ps RMS |

Instead of a precise discriminator in the timing path, the channel keeps
recording the input into a 64-cell circular switched-capacitor memory. The
discriminator only decides *when to stop*; the precise time comes from the
recorded leading edge. After a trigger, the stored cells are digitised on chip
by 64 Wilkinson (ramp) ADCs per channel, and only the channel's event — header
plus all cells or a region of interest — is shipped on a 12-bit parallel bus.

This repository is a register-transfer model of the SAMPIC0 chip: all its
digital control in synthesizable SystemVerilog, and its analog parts (DLL,
discriminator, analog memory, ramps and comparators, oscillator) as small
behavioural models with the real parts' interfaces, so that the whole chip can
be simulated end to end with Verilator.

## How time and voltage are represented

Everything runs on **one clock whose period is one DLL step**, i.e. one sample
(156.25 ps at 6.4 GS/s). This is the central modelling decision; keep it in mind
when reading any module.

* The DLL model (`dll_model`) advances the cell pointer `wr_ptr` by one cell per
  clock and wraps 63 → 0 with no gap. `wrap` is high on cell 63. Its one-hot
  Track&Hold vector `th` is shared by all channels. Each channel gates it with
  its own sampling enable.
* The timestamp counter (`gray_counter`, 12 bits) advances on `wrap`. Hence, for
  the clock edge number *k* counted from reset, the cell written is `k mod 64` and
  the timestamp is `k / 64`: **stop time = timestamp × 64 + trigger cell**, in
  samples. The timestamp is Gray coded inside the chip (so a channel can latch it
  at any moment) and sent in binary.
* The 1.3 GHz ADC oscillator (`adc_vco`) and the readout clock RCk are **clock
  enables**: `adc_vco` gives a one-cycle `tick` every `VCO_DIV` = 5 clocks
  (1.28 GHz at 6.4 GS/s); the top-level input `rck_ce` must pulse once per RCk
  period (every 40 clocks for 160 MHz).
* Analog levels (inputs, thresholds, stored cells, ramps) are unsigned **12-bit
  codes** of the ~1 V unipolar range. The 10-bit threshold DAC maps code *d* to
  level 4·*d*.

## Life of an event

1. **Recording.** While a channel is in `SAMPLING`, `sca_memory` stores its input
   into the cell whose T/H pulse is active. Older data is overwritten after
   64 samples.
2. **Trigger** (`channel_trigger`, `central_trigger`). The discriminator output is
   sampled; its rising or falling edge (per channel) is the *local hit*. The
   trigger is the OR of the enabled sources:
   * the local hit,
   * the rising edge of the external trigger input,
   * the central trigger, which is the OR of all enabled channels' local hits.

   A disabled channel never triggers. With the Fast Global Enable option on,
   triggers are accepted only while the `fge` input is high. The trigger can be
   delayed by 0, 1 or 2 post-trigger units of `PT_UNIT` = 6 samples (~1 ns at
   6.4 GS/s), which moves the recorded window later relative to the pulse.

   Latency: if the input first exceeds the threshold in the sample written at
   edge *c*, the memory stops at edge *c* + 2 + delay. That last-written cell is
   the *trigger cell*.
3. **Hold** (`channel_controller`). At the stopping edge the channel latches the
   Gray timestamp and the trigger cell, stops writing, and goes to `HOLD`.
   Output `flag_trig` (any channel held) asks the acquisition system to start a
   conversion.
4. **Conversion** (`conversion_controller`, `adc_vco`, `gray_counter`,
   `ramp_comparators`, `adc_latch_bank`). A pulse on `conv_start` selects *every*
   held channel at once. The sequencer then runs the oscillator, enables the
   selected channels' comparators, clears and runs the shared 11-bit Gray counter,
   and runs each selected channel's ramp. When the ramp reaches a cell's level,
   that cell's register copies the Gray count. For an *n*-bit conversion
   (n = 8…11, chosen by `res_sel`) the ramp slope is 2^(12−n) codes per tick and
   the conversion lasts 2^n ticks: 1.6 µs at 11 bits and 0.2 µs at 8 bits. The
   resulting code of a cell at level *v* is min(⌈v / 2^(12−n)⌉, 2^n − 1). A cell
   the ramp never reaches gets the full-scale code.
5. **Re-arm.** When the conversion ends, the channel moves timestamp and trigger
   cell into buffer registers, raises `buf_full` and **returns to `SAMPLING`
   immediately**. The 64 ADC registers are the data buffer, so a channel is dead
   only while it converts, not while it waits to be read. `flag_data` (any buffer
   full) asks for readout.
6. **Buffer rule.** A channel that triggers again while its buffer is still full
   stays in `HOLD` and is not offered to a conversion until the readout frees the
   buffer. Otherwise the conversion would overwrite unread data.
7. **Readout** (`readout_controller`, `rr_arbiter`). While `rd` (Read) is high,
   one word is sent per RCk. Channels with a full buffer are served one frame at a
   time. A rotating priority starts the search just after the last channel read,
   so no channel can starve the others. The frame layout:

   | word | content |
   |------|---------|
   | 0 | `{4'b1000, channel[3:0], res_sel[1:0], roi_en, 1'b0}` |
   | 1 | coarse timestamp, binary |
   | 2 | `{6'b0, trigger_cell[5:0]}` |
   | 3 | `{first_cell[5:0], number_of_cells − 1 [5:0]}` |
   | 4… | `{1'b0, code[10:0]}` for cells first, first+1, … (mod 64), binary |

   A full readout sends cells 0–63. In region-of-interest (RoI) mode it sends
   `roi_len` cells starting `roi_offset` cells after the trigger cell (modulo 64,
   so an offset of 60 starts 4 cells *before* the trigger cell). A frame of *n*
   cells takes 4 + *n* RCk periods: 25 ns + 6.25 ns per cell at 160 MHz. The last
   word raises `bus_last` and frees the channel's buffer. Dropping `rd` pauses the
   frame.

## Configuration (SPI)

`spi_config` is an SPI slave in mode 0 (sample on the rising SCLK edge). It
samples the pins with the core clock, so SCLK must stay below a quarter of that
clock. Frames are 32 bits, MSB first: bit 31 = read, bits 30:24 = address,
bits 23:0 = data. A write takes effect on the 32nd SCLK edge; for a read, the
register comes out on MISO during bits 23:0.

| address | register | fields (MSB → LSB) |
|---------|----------|--------------------|
| 0–15 | channel *n* (`ch_cfg_t`, 18 bits) | `enable, sel_local, sel_ext, sel_central, falling, ptdelay[1:0], ext_thr, dac[9:0]` |
| 16 | global (`glb_cfg_t`, 16 bits) | `roi_len_m1[5:0], roi_offset[5:0], roi_en, fge_en, res_sel[1:0]` |

Reset state: all channels disabled, 11-bit conversion, full readout, FGE off.
Note that changing a threshold can itself produce a discriminator edge. The
end-to-end testbench therefore writes the thresholds with the channels disabled
first.

## Top level

`sampic_top` has two parameters: `PT_UNIT` (default 6) and `VCO_DIV` (default 5).
Its ports:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | step clock, asynchronous active-low reset |
| `vin[16]` | in | 12-bit input level per channel |
| `vth_ext` | in | external threshold, used by channels with `ext_thr` |
| `ext_trig`, `fge` | in | external trigger, Fast Global Enable |
| `spi_sclk`, `spi_mosi`, `spi_cs_n` / `spi_miso` | in / out | configuration |
| `conv_start` | in | start the conversion of all held channels |
| `rd`, `rck_ce` | in | Read level, one pulse per RCk period |
| `bus_data[12]`, `bus_valid`, `bus_last` | out | readout bus, updated on RCk |
| `flag_trig`, `flag_data`, `conv_busy` | out | events wait for conversion / data waits for readout / conversion running |

Sizes are fixed in `sampic_pkg`: 16 channels, 64 cells, 12-bit timestamp, 11-bit
ADC counter and 12-bit bus. After coarse synthesis the design is about 23 k
word-level cells and 26 k flip-flops. Most of that is the analog memory and the
ADC registers, both modelled as registers: 16 × 64 × (12 + 11) bits.

## Files

`rtl/` holds one module or package per file:

* `sampic_pkg.sv`: constants, configuration structs, Gray helpers
* `sampic_top.sv`: the chip
* `sampic_channel.sv`: one channel, which groups:
  * `discriminator.sv`*
  * `channel_trigger.sv`
  * `sca_memory.sv`*
  * `ramp_comparators.sv`*
  * `adc_latch_bank.sv`
  * `channel_controller.sv`
* shared blocks:
  * `dll_model.sv`*
  * `gray_counter.sv`
  * `central_trigger.sv`
  * `conversion_controller.sv`
  * `adc_vco.sv`*
  * `readout_controller.sv`
  * `rr_arbiter.sv`
  * `spi_config.sv`

Files marked * are behavioural models of analog circuits. Their code happens to
be synthesizable, but it describes what the analog block does, not how.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_sampic_top` runs
the whole chip at its default parameters:

* phase A: local triggers with all three delays, falling edge, external
  threshold, external trigger, central trigger, a disabled channel, a pulse
  ignored during conversion, a second event waiting for a full buffer, 11-bit
  conversion and full readout of 15 channels;
* phase B: Fast Global Enable, 8-bit conversion and RoI readout.

Its reference model predicts each frame from the input waveforms alone: stop
time, trigger cell and every cell code. It also checks the conversion time and
the frame length in RCk periods, and counts each mechanism above.

`tb_sampic_delay` runs the chip's characteristic measurement: the time between
two pulses on two channels. The pulses are 2.56 ns, 7.1 ns, 100 ns, 1 µs and
10 µs apart, each with a fractional-sample offset. The five runs use 11-, 10-,
9-, 8- and 11-bit conversion. From each frame the testbench rebuilds the sample
times (timestamp × 64, then each cell relative to the trigger cell). It finds
the 50 % point of the leading edge by linear interpolation and checks that the
measured delay is within 0.02 sample (10–11 bits) or 0.08 sample (8–9 bits).
This is the coarse / medium / fine combination at work: in this noiseless
model, the ADC step is the only error left.

## Simulating

With Verilator 5, for any testbench `T` in `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/sampic_pkg.sv tb/T.sv --top-module T -o sim
./obj_dir/sim
```

`tb_sampic_top` takes about 20 s to build and a few seconds to run. The
testbenches use only `$urandom` (no constraint solver) and initialise everything
they read. This matters for two-state simulators.

## Where this model departs from the chip, or fills gaps

These parts follow the published SAMPIC0 description:

* 16 channels, 64 cells, the 64-step DLL and a 12-bit Gray timestamp;
* self, external and central-OR triggers, selectable edge, channel disable,
  0/1/2 post-trigger delays and Fast Global Enable;
* a stop that latches the timestamp and the trigger cell;
* simultaneous conversion of all triggered channels by Wilkinson ADCs: oscillator,
  shared 11-bit Gray counter, tunable ramp, per-cell register, 8–11 bits, 1.6 µs
  at 11 bits;
* two flags to the acquisition system, and re-arming right after conversion;
* readout channel by channel with rotating priority on a 12-bit bus, frames
  holding channel, timestamp, trigger cell and cells, with optional RoI;
* configuration over SPI.

These are this model's own choices:

* the single clock with clock enables, and levels as 12-bit codes;
* the DAC transfer (×4);
* how the trigger sources combine (OR of three enable bits);
* FGE as a trigger gate;
* edge detection on the external trigger;
* the buffer rule of step 6;
* the saturation code;
* the frame word layout, Gray-to-binary decoding on chip, and a full readout that
  starts at cell 0;
* the SPI frame, register map and reset values.

For conversion time, the chip description gives 1.6 µs for 11 bits and 0.2 µs
for 8 bits in its summary, but also quotes 800 ns for 8 bits and 400 ns for
9 bits. The model follows 2^n oscillator periods: 1.6 µs, 0.8 µs, 0.4 µs and
0.2 µs for 11, 10, 9 and 8 bits.

These parts of the chip are not modelled:

* the DLL's analog lock loop and low-speed mode (below 3 GS/s);
* the cells' bandwidth, noise, charge injection and leakage;
* discriminator noise and hysteresis;
* the LVDS drivers and their current setting. The bus is plain logic.

The first silicon had a faulty RoI readout and central trigger, corrected in a
later version. This model implements the intended behaviour of both.

Outside the chip, nothing is modelled: the acquisition board, the FPGA firmware
and the calibration (pedestal, gain and time-INL corrections applied to the
read-out data).

## Verification status

Every module's testbench passes. Each one was also run against a deliberately
broken copy of its module, and each of those runs failed. The end-to-end test
checks every cell code of 18 frames, as well as the timing relations listed
above. Analog performance (picosecond resolution, noise, bandwidth) is outside
the scope of a digital model and is not claimed.
