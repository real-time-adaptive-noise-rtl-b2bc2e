# Fast-LMS adaptive noise canceller for an FPGA with an SSM2603 audio codec

This design removes noise from a microphone signal in real time. A
microphone picks up ambient noise. The FPGA receives the noise through the
audio codec's ADC. An adaptive FIR filter learns to predict each new noise
sample from the samples before it, and subtracts that prediction. What is
left, the *error*, goes back out through the codec's DAC to a speaker. The
filter adapts with the Fast-LMS rule. This is a sign-data LMS: the step size
becomes a right shift, and each weight update uses only the sign bit of its
input sample. So the update needs no multipliers, only an add or subtract per
tap.

The RTL is SystemVerilog (IEEE 1800-2017). It is written for a 50 MHz
system clock and a Cyclone V board with an Analog Devices SSM2603 codec. The
codec is set up once over I2C at start-up.

```
                    +-------------------- anc_top --------------------------+
 mic -> codec ADC ->| audio_codec_if --adc_sample--> fast_lms_filter        |
  (aud_adcdat)      |   ^   frame_tick (L/R rise) -->   (6-state FSM,      |
                    |   |                                 weights, taps,    |
 speaker <- DAC  <--|   +------ error_out <------------   history_buffer)  |
  (aud_dacdat)      |        (loaded at L/R fall)                          |
                    | codec_config -> i2c_master --> i2c_sclk, i2c_sda_*   |
                    +-------------------------------------------------------+
```

## The filter: what is computed per sample

There is one microphone, so the noise sample is both the filter input u and
the "desired" signal d. The taps hold the previous `TAPS` samples, so
the filter is a one-step linear predictor:

```
u_i   = x(k-1-i)                           i = 0 .. TAPS-1  (tap registers)
y(k)  = (sum_i  w_i * u_i) >>> WFRAC       weights are Q15 integers
e(k)  = sat16( x(k) - y(k) )               -> DAC
w_i  <= sat24( w_i + ((u_i < 0 ? -e(k) : e(k)) >>> MU_SHIFT) )
```

All arithmetic is integer. A weight is a 24-bit signed integer read as a
fraction with 15 fractional bits, so a weight of 1.0 is 32768. The shift
`MU_SHIFT` takes the place of the LMS step size μ. With e(k) counted in
sample units, the effective step is 2^-(MU_SHIFT+15): about 1.2e-7 per unit
of error at the default of 8. The filter output y and the error e are
combinational over the weight and tap registers. The error that drives an
update is also registered as `error_out`. That register is what the DAC
plays.

Because the filter predicts from past samples only, it cancels the part of
the noise that can be predicted: tones, hum, and coloured or band-limited
noise. It cannot cancel the part that is white at the sampling rate. In
simulation at the default settings:

| input noise | output / input power |
|-------------|----------------------|
| two tones with a little random noise on top (after 10,000 samples) | −13.6 dB |
| white noise | +0.15 dB (passes unchanged, no divergence) |
| white noise coloured by a two-pole resonance | −7.0 dB |

Weights and outputs saturate instead of wrapping. The sign of a zero input
counts as positive, because only the sign bit is examined.

## The per-sample controller

`fast_lms_filter` runs a six-state machine on the 50 MHz clock. It starts
once per audio frame, at the rising edge of the DAC L/R clock:

| state     | cycles    | action |
|-----------|-----------|--------|
| `IDLE`    | –         | wait for `sample_tick` (rising L/R edge) |
| `SAMPLE`  | 1         | latch the new ADC sample as d = x(k) |
| `WEIGHTS` | 1         | update all weights in parallel; register e(k), y(k); pulse `out_valid` |
| `STORE`   | 1         | write x(k) into the circular history buffer at the base address |
| `INC`     | 1         | advance the buffer's base pointer |
| `RESTORE` | TAPS + 1  | reload tap i from the buffer, one read per cycle (synchronous read) |

One sample takes `TAPS + 5` cycles: 21 at the default of 16 taps. A frame
lasts 1024 cycles at 48.83 kHz, so the filter is idle for about 98% of the
time. `error_out` is valid two cycles after the tick. A tick that arrives
while the controller is busy is dropped and flagged on `overrun`. This cannot
happen at the default clock ratios.

The weights are updated before the new sample enters the taps. Because of
that order, the taps at update time hold x(k-1) .. x(k-TAPS), which makes the
filter a predictor. The history could equally be kept in a plain shift
register. The circular buffer with a moving base pointer is kept because it
maps onto a block RAM when `TAPS` is large.

### history_buffer

This is a ring of `DEPTH` samples (equal to `TAPS`) with a base pointer. A
write stores at `base`, and `inc` moves `base` up by one. A read by *age*
returns entry `base - 1 - age`, so age 0 is the sample written last. Entries
not written since reset read as zero. This gives the filter a silent history
after reset without clearing the RAM.

## Codec control: I2C

`codec_config` walks a table of register writes. It sends each one through
`i2c_master` as a 24-bit write:

```
byte 0: 0x34            (device address 0x1A, write)
byte 1: reg[6:0], val[8]
byte 2: val[7:0]
```

Each byte is followed by an acknowledge slot, so there are three
acknowledgements before the stop condition. The master does not react to
them during the transfer. It records them, and at the end it reports
`ack = 1` only if all three were received. If a write is not acknowledged,
the controller sends the same register again and counts the repeat in
`cfg_nacks`. `config_done` rises after the last register is acknowledged.

SCLK is the system clock divided by 128, which gives 390.6 kHz. The codec
allows at most 526 kHz. Each SCLK period has four quarters: SCLK is low in
quarters 0–1 and high in 2–3. SDA changes at the start of quarter 1, and the
acknowledge bit is sampled at the end of quarter 2. One transaction takes
114 quarters, or 3648 cycles (73 µs). The whole configuration takes about
0.6 ms.

| reg | function                   | value (binary) |
|-----|----------------------------|----------------|
| R0  | left ADC input volume      | 0_0001_0111 |
| R1  | right ADC input volume     | 0_0001_0111 |
| R2  | left DAC (headphone) volume| 0_0111_1001 |
| R3  | right DAC volume           | 0_0111_1001 |
| R4  | analog audio path          | 0_1101_0100 |
| R5  | digital audio path         | 0_0000_0100 |
| R7  | digital audio interface    | 0_0000_0001 (left-justified, 16 bit, codec is slave) |
| R8  | sampling rate              | 0_0010_0000 |

The table does not write R6 (power management) or R9 (Active). On a real
SSM2603, R9 must be set to 1 before the codec runs, and R6 sets which blocks
are powered. If the board does not come up, add those two entries to
`codec_reg()` in `anc_pkg` and raise `CODEC_NREGS`.

SDA is open-drain. The module has `i2c_sda_oe` (1 pulls SDA low) and
`i2c_sda_in`. A board wrapper joins them into an `inout` pad with a pull-up.

## Serial audio link

`audio_codec_if` makes the FPGA the clock master:

- `aud_xck`: 12.5 MHz (clock/4). This is the codec master clock, at 256× the
  sample rate.
- `aud_bclk`: 3.125 MHz (clock/16).
- `aud_adclrck` = `aud_daclrck`: 48.83 kHz. Each frame is 64 bit clocks, or
  1024 system clocks. The left channel is sent while the L/R clock is high.

The data are left-justified, 16 bits, MSB first. The MSB is valid at the
first rising bit-clock edge of each channel. The FPGA samples ADC data on
rising bit-clock edges and changes DAC data on falling ones. The left ADC
channel carries the microphone. At the falling L/R edge, the current
`error_out` is copied into the DAC holding register. It then plays in the
right slot that starts at that edge and in the next left slot. The result is
one frame of delay from microphone sample to speaker:

```
L/R   ___/‾‾‾‾‾ left ‾‾‾‾‾\_____ right _____/‾‾‾‾‾ left ‾‾‾‾‾\____
          ^ frame_tick: filter runs (21 cycles)
                          ^ dac_load: e(k) into DAC register
ADC   left word k received here ->| processed at the next frame_tick
```

## Top-level ports (`anc_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | 50 MHz clock; asynchronous active-low reset |
| `aud_xck`, `aud_bclk`, `aud_adclrck`, `aud_daclrck` | out | codec clocks |
| `aud_adcdat` / `aud_dacdat` | in / out | serial ADC / DAC data |
| `i2c_sclk`, `i2c_sda_oe`, `i2c_sda_in` | out, out, in | codec control port |
| `config_done` | out | all codec registers acknowledged |
| `cfg_nacks` | out | number of repeated register writes |
| `lms_overrun` | out | sticky: a sample arrived while the filter was busy |

Parameters and defaults: `TAPS` = 16, `WEIGHT_W` = 24, `WFRAC` = 15,
`MU_SHIFT` = 8, `I2C_CLK_DIV` = 128, `XCK_DIV` = 4, `BCLK_HALF` = 8,
`BITS_PER_CH` = 32. Only the SCLK divider of 128 comes from the original
description of the design. The tap count, the word widths, the shift and the
audio clock ratios are choices made here.

The filter runs from reset. It does not wait for `config_done`.

## Files

| file | content |
|------|---------|
| `rtl/anc_pkg.sv` | sample type, controller states, codec register table |
| `rtl/anc_top.sv` | top level |
| `rtl/fast_lms_filter.sv` | filter, Fast-LMS update, six-state controller |
| `rtl/history_buffer.sv` | circular sample buffer |
| `rtl/audio_codec_if.sv` | serial audio master |
| `rtl/codec_config.sv` | codec register sequencer |
| `rtl/i2c_master.sv` | 24-bit I2C write master |
| `tb/codec_i2c_model.sv`, `tb/codec_audio_model.sv` | behavioural codec models (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/anc_pkg.sv tb/tb_anc_top.sv --top-module tb_anc_top
./obj_dir/Vtb_anc_top
```

Replace `tb_anc_top` with any of the following:

- `tb_anc_top`: the full design at default size, with both codec models.
  It first checks the I2C configuration, including one write that is
  refused and then repeated. It then compares 10,000 consecutive DAC words
  bit for bit with a reference Fast-LMS model fed the same ADC words, and
  checks the attenuation. It also counts how often each mechanism happened:
  register writes, the repeated write, samples processed, DAC loads,
  buffer wrap-arounds and weight updates. About 7 s.
- `tb_anc_noise_workload`: the full design at default size, on 8000 samples
  of white noise followed by 8000 samples of coloured noise. It checks every
  DAC word against the reference model, checks that white noise is not
  amplified, and checks that coloured noise is attenuated by more than
  3 dB. About 15 s.
- `tb_fast_lms_filter`: 6000 samples against the reference model, checking
  y(k) and e(k) for each one. It also checks the two-cycle error latency,
  the `TAPS + 5` busy time, a dropped tick with `overrun`, and convergence.
- `tb_history_buffer`: random write/increment/read-back against a queue,
  including wrap-around and the zero-filled start.
- `tb_i2c_master`: the received 24-bit words, `ack` for acknowledged and
  refused transfers, the SCLK period, that SDA is stable while SCLK is high,
  and the transfer length.
- `tb_codec_config`: the register contents and order, the retry after a
  missing acknowledgement, and the total time.
- `tb_audio_codec_if`: the clock ratios, ADC deserialisation, DAC
  serialisation of the value taken at the falling L/R edge, and the strobe
  positions.

## Limits and departures

- **Predictor, not a two-microphone canceller.** The general form of a
  noise canceller has separate reference and primary inputs. This build
  has one microphone, so both come from the same sample. Truly white noise
  cannot be predicted, so it passes through almost unchanged. Only the
  coloured part of real noise (speaker, room and microphone responses) can
  be reduced.
- **Chosen values.** The tap count, weight width and format, shift amount,
  saturation, audio clock ratios, channel use, I2C device address, retry on
  a refused write, and reset behaviour are all choices made here, not taken
  from the original description. All are parameters or small, local code.
- **Codec setup.** Codec setup is limited to the eight registers listed above
  (see the note on R6/R9).
- **Store step.** The original state sketch writes several buffer entries in
  the store step. This design writes only the new sample, and reloads every
  tap from the buffer in the restore step.
- **Analog parts.** The codec itself, the microphone and the speaker are
  outside the RTL. The codec is modelled only behaviourally, in the
  testbenches.
