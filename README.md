# Eskimo @ Farm — sprite graphics and background music in hardware

Eskimo @ Farm is a side-scrolling shoot-'em-up: an eskimo on a space ship flies
across a farm and shoots farm animals. The game logic runs as software on the
ARM processor of an FPGA SoC board. The processor hands each frame to two
small peripherals on its Avalon memory-mapped bus:

* a **graphics controller**. It holds a table of 30 sprites (position, size,
  image), draws them from on-chip image ROMs over a two-colour background and
  drives a 640x480 VGA monitor. The software reads the VSYNC level to start each
  game frame during vertical blanking.
* an **audio controller**. It plays a background music clip from an on-chip
  ROM to the SSM2603 audio codec in a loop, or mutes it. After reset it
  configures the codec over I2C.

The software needs no frame buffer. It rewrites at most 30 32-bit words per
frame, and the hardware renders the picture one line at a time. This
repository holds the SystemVerilog for both peripherals and testbenches for
every block.

## Rendering: one line ahead, from a double line buffer

This is the part that needs the most explanation.

The graphics controller does not store a frame. While line *v* is on screen,
`sprite_controller` computes line *v+1* pixel by pixel and writes it into the
back half of a **double line buffer** (`line_buffer`, two buffers of 640
12-bit pixels). The front half is read out to the monitor at the same time.
The two halves swap once per line, at the rising edge of the active-low
HSYNC. By then the last pixel of the next line has been written (column 639
is written during the front porch), and the next line has not started. The
renderer and the display therefore never touch the same buffer. During the
last line of the frame (524) the renderer builds line 0.

For each column `h` of the line being built, a three-stage pipeline advances
on the 25 MHz pixel enable:

| stage | block | work |
|---|---|---|
| 0 | 30 × `sprite_slot`, `sprite_priority_mux` | Each slot decodes its packet and tests whether its sprite covers (h, v+1): `0 <= h-x < dim` and `0 <= v+1-y < dim`. It also computes the pixel's offset in the image, `(h-x) + (v+1-y)*dim`, cut to 10 bits. The priority mux keeps the visible slot with the lowest number: slot 1 is in front, slot 30 at the back. |
| 1 | `sprite_rom_bank` | The type address selector sends the offset to the ROM of the chosen image id. The ROM answers on the next enable, and the RGB selector picks that ROM's word. |
| 2 | `line_buffer` | Writes the ROM colour into the back buffer at column h. If no sprite with an image covers the pixel, it writes the background instead: sky `0x4CF` above line 448, grass `0x1C0` from line 448 down. |

The front buffer is read at the current `hcount`, and the read is registered,
so R, G and B appear one pixel after the counters. `graphics_controller`
registers HSYNC, VSYNC and BLANK on the same enable so that all VGA outputs
stay aligned. Each 4-bit colour channel is widened to 8 bits by repeating the
nibble.

A sprite has no transparent colour. Every pixel of its square is drawn,
including pixels past the right screen edge, which are simply dropped. A
visible sprite whose id has no ROM (0, 16, 17, 39 and above) shows the
background, and it also hides any sprite behind it.

### Sprite packet and image ids

Software writes one 32-bit word per slot (`eskimo_pkg::sprite_t`):

| bits | field | meaning |
|---|---|---|
| 31:26 | dim | width = height of the sprite in pixels (32 or 16 in the game) |
| 25:20 | id | image, selects the ROM |
| 19:10 | y | row of the top-left corner |
| 9:0 | x | column of the top-left corner |

A word of all zeros is an empty slot. There are 36 image ROMs of 1024 × 12
bits (4 bits each of R, G, B). Ids 1–15 use ROMs 0–14 and ids 18–38 use ROMs
15–35. In the game these are the ship, the animals, the bullet, the digits
0–9, the eskimo (lives), the cloud and the letters of the on-screen words.

### Register map (graphics, 32-bit words)

| word | access | function |
|---|---|---|
| 0–29 | write | sprite packet of slot 1–30 |
| 60 | write | clear: empties all 30 slots in one cycle |
| 61 | read | bit 0 = VSYNC level, active low: **0 while the monitor is in vertical sync** |

Reads return data one clock after the read strobe. Other words read as 0.

### Frame sync

The game polls word 61 until it reads 0. It then computes the next game state
and writes the changed packets. The frame after that vertical sync shows the
new state completely: line 0 of the new frame is built during line 524, well
after the sync pulse (lines 490–491). Polling can miss a sync pulse, which is
only two lines (64 µs) long. The hardware has no interrupt.

## VGA timing

`vga_timing` runs from the 50 MHz clock and advances one pixel every two
clocks, for a 25 MHz pixel rate and a 640x480 display at about 60 Hz:

| | active | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

Both sync pulses are active low. `pix_en` marks the second clock of each
pixel; `vga_clk` equals it and is the 25 MHz clock for the video DAC.

## Audio path

```
 bus --> play bit --sync--> audio_sampler <--sample_req-- audio_codec_if --> BCLK, LRCLK, DACDAT
                              |  ^                            ^
                     rom_addr v  | rom_data                   | sample
                            audio_rom (131072 x 16)  ---------'
 clk --> i2c_av_config --> i2c_controller --> SCL, SDA (codec registers)
```

* **`audio_codec_if`** runs on the 11.2896 MHz codec master clock. An 8-bit
  counter divides that clock by 256 to get the 44.1 kHz LRCLK (high = left
  half) and by 4 to get BCLK. The 16-bit sample is sent MSB first and
  left-justified in each half frame: the MSB is on DACDAT when LRCLK changes,
  and each bit changes after a falling BCLK edge. The same sample goes to both
  channels. `sample_req` pulses one clock before each frame starts.
* **`audio_sampler`** answers each request. When playing, it returns the ROM
  word at the current address and steps the address, going back to 0 after
  sample 117585, the end of the clip. The ROM is larger (131072 words) than
  the clip. When muted, it returns 0 and rewinds to the clip start.
* **Control register** (word 0, bit 0): 1 plays, 0 mutes. It is written on
  the bus clock and passed to the audio clock through a two-flop synchroniser,
  and so is the reset.
* **`i2c_av_config`** sends 11 register writes after reset to device address
  0x34. They power up the codec, set the line-in and headphone volumes, select
  the DAC path, set a 16-bit left-justified interface, set 44.1 kHz from
  11.2896 MHz, power the outputs and activate the codec. A write that is not
  acknowledged is sent again. `config_status` shows the index of the write in
  progress, and `configured` goes high at the end.
* **`i2c_controller`** sends one write as 30 stages of 128 clocks each: START,
  three bytes each followed by an ACK slot, and STOP. Bits go MSB first, and
  SDA changes in the middle of the SCL low phase. SDA is open drain: the
  controller only pulls it low (`i2c_sda_oe`) and reads the line back
  (`i2c_sda_in`). Tie `i2c_sda_in` to the pad with a pull-up.

## Clocks, reset, top-level ports

`eskimo_top` places the two peripherals side by side. Its inputs:

* `clk`: the 50 MHz bus clock, used by the graphics, the audio bus register
  and I2C;
* `aud_clk`: the 11.2896 MHz clock from a PLL outside this design, forwarded
  to the codec as `aud_xck`;
* `reset`: synchronous to `clk`, active high.

The processor's bus bridge, the PLL and the codec are not part of the RTL.
Their signals are the top's ports: `gfx_*` and `aud_*` for the two Avalon
slaves, `vga_*` for the DAC, and the codec's serial and I2C pins. The codec's
ADC input is not used.

## What is not real data, and other departures

* **ROM contents are placeholders.** The sprite images and the music clip
  were converted from PNG and WAV files and are not reproduced here. Each
  sprite ROM holds a computed test picture, word `a` of ROM `r` =
  `(273*r + 7*a) mod 4096`. The audio ROM holds a sawtooth, sample `i` =
  `1499*i mod 65536`. Both formulas are in `eskimo_pkg`. To show real
  content, replace the `initial` loops in `sprite_rom.sv` and `audio_rom.sv`
  with `$readmemh` of the converted data.
* **One clock domain for graphics.** The original arrangement clocked the
  renderer and the ROMs with the 25 MHz pixel clock. Here everything runs at
  50 MHz with a pixel enable, so the bus side and the video side need no
  synchroniser.
* **Rendering one line ahead** and the resulting one-pixel delay of all VGA
  outputs are choices of this implementation. So are the pipeline depths, the
  background shown for ids without an image, and rewinding the clip on mute.
* The I2C engine runs on the 50 MHz clock, giving SCL at about 390 kHz. The
  frequency of the clock it ran from originally is not known.
* A further 256 × 12 ROM existed in the original build. Its use is unknown,
  and it is not included.
* The codec mute pin and board LEDs/switches are board wiring and are not
  part of these peripherals.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed in the testbench, independently of the RTL:

* `tb_sprite_controller` and `tb_graphics_controller` compare every visible
  pixel of whole frames with a reference renderer (`tb/sprite_ref_pkg.sv`).
  The scene includes overlapping sprites, an id without an image, the grass
  line, the right screen edge and a zero-size packet. `tb_graphics_controller`
  drives the bus like the game software and decodes the VGA output like a
  monitor.
* `tb_audio_codec_if` and `tb_audio_controller` decode DACDAT like a
  left-justified receiver. `tb/i2c_slave_model.sv` stands in for the codec's
  control port and can refuse transfers to exercise the retry.
* `tb_workload_gameplay` draws three frames of real play on the graphics
  controller: 28 sprites (lives, score label and digits, ship, 4 bullets, 8
  animals, 4 clouds) placed and moved the way the game software does.
* `tb_eskimo_top` runs the whole design end to end with a 64-sample clip.
  It covers frame sync, drawing, moving, clearing, I2C configuration with a
  retry, play, looping and mute. It counts each of these events and fails if
  one never happens.
* `tb_eskimo_full` is the same test with every parameter at its default. It
  plays the full 117586-sample clip once (2.7 s of simulated time) and takes
  about 3 minutes.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_graphics_controller \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/eskimo_pkg.sv tb/sprite_ref_pkg.sv \
  tb/tb_graphics_controller.sv -o sim && obj_dir/sim
```

Testbench names are `tb_<block>`. The package files must come first on the
command line.

## Changing the design

* The number of sprite slots is `NUM_SPRITES` (top, `graphics_controller`,
  `sprite_controller`). The register map allows up to 60 slots below the
  clear word.
* The background colours and the grass line are parameters of
  `sprite_controller`. The porch and sync lengths are parameters of
  `vga_timing`.
* The clip length is `CLIP_SAMPLES` (top and `audio_controller`). The ROM size
  is `ROM_WORDS` in `audio_controller`.
* The codec register table is the `case` in `i2c_av_config.sv`.

## Files

`rtl/`: `eskimo_pkg` (types, id-to-ROM map, placeholder formulas),
`eskimo_top`, `graphics_controller`, `sprite_regfile`, `vga_timing`,
`sprite_controller`, `sprite_slot`, `sprite_priority_mux`, `sprite_rom_bank`,
`sprite_rom`, `line_buffer`, `audio_controller`, `audio_rom`,
`audio_sampler`, `audio_codec_if`, `i2c_av_config`, `i2c_controller`.
`tb/`: one testbench per block, plus `sprite_ref_pkg` and `i2c_slave_model`.
