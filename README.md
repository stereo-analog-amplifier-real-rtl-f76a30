# Real-time binaural sound spatializer (FPGA RTL)

This design makes a stereo line-level signal sound, on headphones, as if it
came from a chosen direction around the listener. Each ear's signal is
convolved with a head-related impulse response (HRIR): the impulse response
measured in the ear canal of a dummy head for a sound source at that azimuth
and elevation. The filtering runs in hardware on every sample, so any analog
source can be used with no audible delay. The target is an FPGA board with a
WM8731 audio codec, four push buttons, four slide switches and LEDs (the
Terasic DE2-115 layout), with a 50 MHz system clock and 44.1 kHz audio.

The RTL is written from the description of a student project that also built
an analog headphone amplifier. That amplifier is an analog circuit and has no
RTL here (see "Not in this RTL").

## Signal path

```
 codec ADC ──I2S──> i2s_rx ──pair──> hrtf_conv ──done + sums──> output_stage
                                        ▲   (hrtf_ctrl + hrtf_coef_ram)     │
                      coefficient loader│                                   ▼
                     (CPU, outside RTL) │                       i2s_tx ──I2S──> codec DAC
                                        │
 buttons/switches ──> angle_ctrl ──coef_req / coef_ack──┘     LEDs <── angle_ctrl
 codec_config ──two-wire bus──> codec registers (once, after reset)
```

Everything runs on the single 50 MHz clock `clk` with an asynchronous
active-low reset `rst_n`. The codec is the serial-bus master and drives the bit
clock and the frame clocks. These are never used as clocks. They are brought in
through two-flop synchronisers (`sync2`), and their edges are detected in the
50 MHz domain. The original project heard glitches when it ran logic on gated
clocks; this design has no derived or gated clocks.

### Timing budget

At 44.1 kHz a stereo pair arrives every 50e6 / 44.1e3 ≈ 1134 clocks. The
filter needs 130 clocks per pair (128 taps plus 2), and the synchronisers and
registers around it add about 6 more. A pair captured in ADC frame *n* is
normally played in DAC frame *n + 1*. The receiver presents the pair when the
right word's last bit arrives, 7.5 bit clocks before the frame ends. The
transmitter takes its pair at the first rising bit clock of the next left word,
8 bit clocks (≈ 142 system clocks) after that last bit. The result is ready
after ≈ 136 clocks, so it makes that deadline, but the margin is only a few
clocks. The end-to-end test measures a steady delay of one frame. A longer
filter, or a faster bit clock, would miss the deadline. The transmitter would
then resend the previous pair, and the delay would become a steady two frames,
with no pair split.

## The HRTF filter (`hrtf_conv`, `hrtf_ctrl`, `hrtf_coef_ram`)

For each ear:

    y[n] = Σ_{k=0}^{127} h[k] · x[n−k]

**Sample history.** Each channel has a chain of 128 24-bit registers wired in
series. Stage 0 holds the newest sample. A new pair shifts both chains by one.
The left input feeds the left-ear filter and the right input feeds the
right-ear filter. For a mono source, feed the same signal to both inputs.

**Schedule.** There is one multiplier per ear, and the taps are walked one per
clock under the state machine `hrtf_ctrl`:

| cycle (after `start`) | state | action |
|---|---|---|
| 0 | IDLE | `start` seen: chains shift, accumulators clear |
| 1 … 128 | RUN | tap k = 0…127 is issued: RAM address k, chain stage k selected |
| 2 … 129 | (pipeline) | registered h[k] × x[n−k] added to the 47-bit accumulator |
| 129 | LAST | last product added |
| 130 | DONE | `done` high for one clock, sums valid on `y_l`, `y_r` |

The coefficient RAM has a one-clock synchronous read, and the chain stage is
registered at the same time, so each product pairs the right operands. A
`start` that arrives while the filter is busy is dropped. The top-level
assertion `a_no_overrun` flags that case; it cannot occur at the real sample
rate.

**Number formats.** Samples are 24-bit two's complement (the codec word).
Coefficients are 16-bit two's complement with 15 fraction bits (Q1.15). The
accumulator has 24 + 16 + 7 = 47 bits, so 128 full-scale products cannot
overflow it. These widths are in `spatial_pkg`.

**Output normalisation (`output_stage`).** On `done` the output stage
shifts each sum right by 15 + `NORM_SHIFT` bits and saturates it to 24 bits.
Then it registers the pair for the DAC. A response whose taps add up to more
than unity gain can drive loud material past full scale. Truncation would then
wrap around, which is heard as pops. Saturation clips instead, and `clipped`
pulses when it happens. Raise `NORM_SHIFT` (6 dB per bit) to trade level for
headroom.

## Coefficient sets and the loader handshake

The coefficient RAM holds one set: 128 words per ear for the current direction.
It is a RAM rather than loose registers, so FPGA tools map it to block memory.
All the measured sets (72 azimuths × 4 elevations) are kept by an embedded
processor running C code. That loader is not part of this RTL. It connects to
the top through these ports:

* `coef_req` goes high, with `coef_req_angle` = {azimuth index, elevation
  index}, whenever the selected direction differs from the loaded one. This
  includes the first request after reset. Both stay stable until `coef_ack`.
* The loader writes the set through `coef_we` / `coef_waddr` / `coef_wdata`.
  The address is {ear, tap}: 0…127 for the left ear and 128…255 for the right
  ear. The word is Q1.15.
* The loader then pulses `coef_ack` for one clock. If the direction changed in
  the meantime, a new request follows at once.

The filter keeps running while the loader writes. For one or two frames a
filter pass can mix old and new coefficients, which is harmless at audio rates.
The RAM contents are undefined until the first set has been loaded.

## Codec interface

**Set-up (`codec_config`, `i2c_writer`).** After reset and a 1 ms wait, eleven
register writes go over the two-wire control bus (address 0x1A, 100 kHz). A
write that is not acknowledged is repeated, and `codec_nacks` counts the
repeats. The values follow the WM8731 register map:

| reg | value | effect |
|---|---|---|
| R15 | 0x000 | reset |
| R6 | 0x000 | all sections powered |
| R0, R1 | 0x017 | line-in 0 dB, unmuted |
| R2, R3 | 0x079 | headphone out 0 dB |
| R4 | 0x012 | DAC on, **line-in** selected, microphone muted |
| R5 | 0x000 | no de-emphasis, DAC unmuted |
| R7 | 0x04A | codec is master, 24-bit, I2S |
| R8 | 0x020 | normal mode, 256 fs, **44.1 kHz** ADC and DAC |
| R9 | 0x001 | interface active |

R8 = 0x020 assumes that the codec's master clock (XCK) is 11.2896 MHz. That
clock must come from a PLL or oscillator outside this RTL. `codec_ready` rises
when set-up is complete. The data line is open-drain: `i2c_sda_oe = 1` pulls it
low, and `i2c_sda_i` reads it back.

**Audio (`i2s_rx`, `i2s_tx`).** Both use I2S with 24-bit words, left word while
the frame clock is low, MSB one bit clock after the frame edge. The receiver
presents a pair only after it has received a left word followed by a right
word. The transmitter copies the latest pair when each left word begins, so a
frame never carries halves of two different pairs. The bit clock must be slower
than clk/4. In use it is 2.8224 MHz against 50 MHz.

## Controls (`angle_ctrl`)

| input | effect |
|---|---|
| `key_n[0]` | azimuth +5° |
| `key_n[1]` | azimuth −5° |
| `key_n[2]` | azimuth +90° |
| `key_n[3]` | azimuth −90° |
| `sw[3:0]` | elevation index = position of the single switch that is up; any other pattern is ignored |

The azimuth is kept as an index 0…71 (degrees / 5) and wraps past 0° and 360°.
`led` shows it in degrees, in binary. Buttons are active low and are taken to
be debounced on the board; they are only synchronised. Which elevation angle
each switch stands for is set by the sets the loader supplies.

## What follows the original project and what is this design's own

Taken from the original project: the block structure (codec ADC and DAC, an
HRTF convolution module with a state controller and a separate coefficient RAM
that a CPU refills on request), 128 taps per ear held in registers connected in
series, 24-bit audio, 44.1 kHz with line-in, a 50 MHz clock, a `done` signal
that enables the output module, normalising before output, and the buttons,
switches and LEDs with their step sizes and range.

This design's own choices: the word widths of coefficients and accumulator, the
one-multiplier-per-ear schedule, the state encoding, saturation as the
normalisation method (with `NORM_SHIFT = 0`), I2S with the codec as master and
all codec clocks sampled in the system domain, the codec register values, the
control-bus master, the request/acknowledge protocol and RAM addressing, the
button order, the binary LED code, the handling of invalid switch patterns, and
reset behaviour.

## Not in this RTL

* **Coefficient loader CPU** (a soft processor with C code): its ports are
  brought out on the top.
* **WM8731 codec** and its master-clock source.
* **Analog headphone amplifier** of the same project: two non-inverting OPA2134
  stages with R1 = 1 kΩ and R2 = 9 kΩ (gain 1 + R2/R1 = 10), 50 kΩ input
  resistors, a volume potentiometer, and ±15 V rails decoupled with 100 µF and
  0.1 µF. It has no logic function.

## Files

| file | contents |
|---|---|
| `rtl/spatial_pkg.sv` | widths, `stereo_t`, `angle_t` |
| `rtl/spatializer_top.sv` | top level |
| `rtl/hrtf_conv.sv`, `rtl/hrtf_ctrl.sv`, `rtl/hrtf_coef_ram.sv` | filter, its state machine, coefficient RAM |
| `rtl/output_stage.sv` | shift and saturate |
| `rtl/i2s_rx.sv`, `rtl/i2s_tx.sv`, `rtl/sync2.sv` | codec audio interface, synchroniser |
| `rtl/codec_config.sv`, `rtl/i2c_writer.sv` | codec set-up |
| `rtl/angle_ctrl.sv` | buttons, switches, LEDs, loader request |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus `tb_direction_sweep` over all directions |
| `tb/wm8731_model.sv`, `tb/nios_loader_model.sv`, `tb/tb_hrtf_pkg.sv` | codec and loader models, reference arithmetic and test data |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. It also has a
watchdog that counts a failure if the run hangs. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/spatial_pkg.sv tb/tb_hrtf_pkg.sv tb/tb_spatializer_top.sv \
  --top-module tb_spatializer_top -Mdir obj
./obj/Vtb_spatializer_top
```

`tb_spatializer_top` runs the whole design at its default parameters and takes
a few seconds. The codec is set up, with one refused transfer that must be
repeated. About 270 audio frames stream through. The buttons step the azimuth,
including a wrap below 0°, the switches change the elevation, and an invalid
switch pattern is ignored. A loud passage saturates the output. Every frame the
codec model receives is compared bit-exactly with a filter computed
independently in the testbench. Frames whose filter pass may overlap a
coefficient load are skipped. The unit testbenches check each module's
arithmetic, its cycle timing (for example, `done` exactly 130 clocks after a
sample) and its protocol rules.

`tb_direction_sweep` also runs the whole design at its default parameters. It
steps through all 288 directions (72 azimuths × 4 elevations). For each one it
checks the LED reading, the angle sent to the loader and one load, and compares
the audio that follows bit-exactly.

To change the filter length, set `N_TAPS` on the top or on `hrtf_conv`. The
accumulator width in `spatial_pkg` covers up to 128 taps, so raise `TAPS`
there for longer filters.
