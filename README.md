# Battle Tank game hardware: tile-and-sprite VGA engine and codec audio player

This is the FPGA-fabric half of a Battle City style tank game on a Cyclone V
SoC board. Two players, one on a local game pad and one over Ethernet, defend
a home base against enemy tanks. The game rules, enemy routing, controller
input and network protocol are software on the SoC's ARM processor. The
fabric holds the two peripherals that software drives over the Avalon bus:

* a **VGA controller**. It draws the 640x480 screen by itself from pictures
  and small tables kept in on-chip memory, so software never touches pixels;
* an **audio controller**. It sets up the SSM2603 codec over I2C and plays
  background music mixed with sound effects over I2S at 8 kHz.

```
            ARM processor (game software, DDR3, USB pads, Ethernet)
                              |  Avalon-MM
            +-----------------+------------------+
            |                                    |
     vga_controller                       audio_controller
  tables + 458 kbit image RAM        effect RAM, music FIFO, mixer
  5-layer pixel pipeline             i2c_codec_config, i2s_tx
            |                                    |
   ADV7123 DAC -> VGA monitor          SSM2603 codec -> speaker
```

`battle_tank_top` puts the two side by side. They share only the 50 MHz
clock and the reset. Each Avalon-MM slave port is a top-level port, to be
wired to the processor's bus bridge.

## The display: tiles, objects and five layers

The screen is a grid of 20 x 15 tiles of 32 x 32 pixels. Every game element
is a 32 x 32 picture: two enemy tank colours, two player tanks, steel, water,
brick, the bonus, the bullet, the explosion, the home base and one spare
image. The game information (stage number, enemies left, lives) uses ten
20 x 20 digit pictures. A pixel is 30 bits, 10 per colour. All pictures
together take 30 x (12 x 1024 + 10 x 400) = 457,920 bits. Software loads
them once at start-up.

Software then describes the screen with four small tables:

| table | entries | what an entry says |
|---|---|---|
| tile map | 300 (20 x 15) | enable, image: fixed scenery on the 32-pixel grid |
| tank objects | 8 | enable, image, x, y: tanks and the bonus, anywhere on screen |
| effect objects | 8 | enable, image, x, y: bullets and explosions |
| digit objects | 8 | enable, digit 0-9, x, y: game information |

A playfield register sets the rectangle of tiles that is the battlefield.
The background is black inside it and grey outside, which draws the grey
frame. A brick that is shot, or a destroyed base, is shown by pointing its
tile entry at another image. A moving tank is shown by rewriting its x and y.

**Layer order.** For each pixel the controller looks at all layers at once
and shows the highest one that has something there. From top to bottom the
order is:

1. bullets and explosions;
2. scenery: steel, water, brick, home base;
3. tanks and bonus;
4. game-information digits;
5. background: black playfield, grey frame.

A picture pixel whose value is 0 is transparent, so the layer below shows
through it. That is how round explosions and tank outlines work. When two
objects of the same layer overlap, the one with the lower table index wins.
Scenery lies above the tanks, so a tank that drives into a water or brick
tile is hidden by it.

**Pixel pipeline** (`vga_controller`). `vga_timing` makes one pixel enable
every second clock (25 MHz) and runs the standard 800 x 525 raster: 640
visible pixels, then a 16-pixel front porch, a 96-pixel sync and a 48-pixel
back porch. Vertically it is 480 visible lines, then 10, 2 and 33. Both
syncs are negative.

* **Stage 0** (combinational, from the raster counters). The tile map is
  read at (x/32, y/32). Three `sprite_engine`s compare the pixel with every
  object of their layer in parallel: an object at (X, Y) covers the pixel
  when `(x-X) mod 1024 < SIZE` and `(y-Y) mod 1024 < SIZE`. Each engine
  forms the picture address `image*SIZE*SIZE + dy*SIZE + dx`. The arithmetic
  wraps at 1024, so an object with X near 1023 hangs off the left edge.
* **Memory read** (registered). The image RAM (`mp_ram`, 12288 x 30) has
  three read ports, for effects, scenery and tanks; the digit RAM (4000 x 30)
  has one. So every layer's pixel arrives in the same pixel time.
* **Stage 1** (`layer_mux`). This stage picks the visible pixel. A register
  then drives the top 8 bits of each channel to VGA_R/G/B, which are 8 bits
  wide on the board.

HSYNC, VSYNC and BLANK_n go through the same two stages, so the pins leave
the controller two pixel times after the counters. RGB is 0 during blanking.
VGA_CLK is low in the first half of each pixel and high in the second, so
the DAC's rising edge falls in the middle of stable data. VGA_SYNC_n is held
low, since sync-on-green is not used.

**VGA bus map** (32-bit words, write-only):

| word address | contents |
|---|---|
| 0x0000-0x2FFF | image RAM: image i, row r, column c at i*1024 + r*32 + c; bits [29:0] = {R, G, B} |
| 0x4000-0x4F9F | digit RAM: digit d, row r, column c at 0x4000 + d*400 + r*20 + c |
| 0x5000-0x512B | tile map, entry row*20 + col: [31] enable, [23:20] image |
| 0x5400 + i | tank object i: [31] enable, [23:20] image, [19:10] y, [9:0] x |
| 0x5500 + i | effect object i (same layout) |
| 0x5600 + i | digit object i (same layout; the image field is the digit 0-9) |
| 0x5700 | playfield: [4:0] first column, [9:5] last column, [13:10] first row, [17:14] last row |

Image numbers are 0 enemy A, 1 enemy B, 2 player 1, 3 player 2, 4 steel,
5 water, 6 brick, 7 bonus, 8 bullet, 9 explosion, 10 home base, 11 spare
(`bt_pkg::img_e`). Writes take effect at once, so software should move
objects during vertical blanking to avoid tearing.

## The audio path

The game plays mono 16-bit samples at 8 kHz. The two sources are mixed in
the fabric:

* **background music.** 30 s is 480 kB, too much for on-chip memory. It stays
  in the processor's DDR3, and software streams it into a 512-sample FIFO,
  which holds 64 ms of sound. A control bit switches the music on and off.
* **sound effects.** Fire and explosion are 0.5 s each, 4000 samples. They
  sit in an 8000 x 16 RAM (16 kB) in the controller, loaded once. A play
  command starts one from its first sample. A new command restarts playback
  with the new effect, even if another effect is still playing.

At each frame the controller takes the next music sample and the next effect
sample. The music sample is 0 when the music is off. It is also 0 when the
FIFO is empty, and that case is counted as an underrun. The effect sample is
0 when no effect plays. The two are added, and the sum is clamped to
-32768..32767. The result goes out on both channels in the next frame.

**The codec is the clock master.** It drives BCLK and DACLRCK, and the
fabric only follows them (`i2s_tx`). Both clocks pass through two-flip-flop
synchronisers. LRC is sampled on BCLK rising edges, while it is stable. At
each BCLK falling edge the serialiser compares the LRC of the bit time that
just ended with the LRC of the bit time before it. If they differ, the bit
time that ended was the don't-care bit that I2S puts after every LRC edge,
so the MSB goes out now. The other bits follow MSB first; the rest of the
channel is 0. LRC low is the left channel. When a left channel starts, both
samples are latched and `frame_tick` asks the mixer for the next frame.
Because of the synchronisers, DACDAT changes about 60 ns after BCLK falls.
So BCLK has to stay below about CLK/8; the codec's bit clock is a few MHz.

**Codec set-up** (`i2c_codec_config`) runs once after reset. Each SSM2603
control word is 16 bits: a 7-bit register number and 9 bits of data. It goes
out as START, address 0011010 + W, ACK, high byte, ACK, low byte, ACK, STOP.
Each bit time is cut into four quarters of 125 clocks: SDA changes while SCL
is low, and SCL is high for two quarters. That gives 100 kHz with 5 us high
and low times, against codec limits of 526 kHz, 0.6 us high and 1.3 us low.
The nine words, in order:

| register | value | meaning |
|---|---|---|
| R15 | 0x000 | software reset |
| R6 | 0x067 | power up DAC and output, power down the rest |
| R4 | 0x010 | DAC to output (DACSEL) |
| R5 | 0x000 | DAC soft mute off |
| R7 | 0x042 | master mode, 16-bit words, I2S format |
| R8 | 0x00D | USB clock mode, 8 kHz |
| R2, R3 | 0x079 | output volume, left and right |
| R9 | 0x001 | activate the digital interface |

AUD_MUTE, which is active low, holds the output muted until the set-up has
finished. A missing ACK sets a sticky flag, and the sequence still runs to
the end. AUD_XCK, the codec's master clock, is 50 MHz / 4 = 12.5 MHz. The
I2C data line is open drain: the block only pulls it low (`sda_oe`) and reads
it back (`sda_in`). The top keeps these as two ports
(`AUD_I2C_SDAT_oe`, `AUD_I2C_SDAT_in`), so the pad is a plain open-drain
buffer at board level.

**Audio bus map** (32-bit words, read latency 1):

| word address | access | contents |
|---|---|---|
| 0x0000-0x1F3F | write | effect RAM; effect k starts at k*4000 |
| 0x2000 | write | push one music sample [15:0] |
| 0x2001 | write | [0] music on |
| 0x2002 | write | [0] effect to play (a new command restarts) |
| 0x2003 | read | [9:0] FIFO level, [16] effect playing, [17] codec configured, [18] ACK missing, [19] FIFO full, [31:24] underruns (saturating) |

## What is built here and what is not

The fabric logic is all here. The rest of the game system is outside the
fabric:

* the ARM processor with its DDR3;
* the Avalon interconnect, which the vendor tool generates;
* the ADV7123 video DAC and the SSM2603 codec;
* the USB3300 PHY and the HPS USB controller that read the game pads;
* the Ethernet MAC and the KSZ9021RN PHY.

The network protocol is software. So are its packet layout (type, x, y,
shot, direction), its ACK with a 500 ms resend, and the fall-back to
single-player mode.

Sizes that come from the game's design: 640x480, 32x32 elements, 20x15
tiles, 20x20 digits, 30-bit pixels, 12 + 10 pictures (457,920 bits), the
layer order, 8 kHz, 16-bit I2S with the codec as master, two 0.5 s effects,
the codec's I2C address and word format, and the 526 kHz SCL limit.

The following are this design's own choices, made where the game's design is
silent:

* VGA porch and sync lengths (standard 640x480 at 60 Hz), and the 25 MHz
  pixel rate from 50 MHz;
* 0 meaning transparent, and the grey level (512 per channel);
* 8 objects per layer, and the default 13 x 13 playfield at tiles 1-13;
* the bus maps and entry layouts, and the three read ports on the image RAM;
* the mixing rule, the FIFO and its depth, and the underrun behaviour;
* the codec register values, and their order;
* AUD_XCK = 12.5 MHz with the codec's USB clock mode.

AUD_XCK deserves a warning. At 12.5 MHz, instead of the nominal 12 MHz of
that mode, the sample rate comes out about 4 % high. An exact rate needs a
PLL making 12 MHz or 12.288 MHz; change XCK_DIV and the R8 value in
`bt_pkg::codec_word` to match.

The game description has one inconsistency about sound effects. One passage
says the audio controller fetches them from DDR3 itself. Another gives them a
16 kB budget next to the 480 kB of music. Here they live in the controller's
own RAM, with no bus master, and only the music is streamed.

The number of effects is also stated two ways. The audio section names two
(fire and explosion), but the feature list adds sounds for moving, winning and
dying. Two slots are built, which matches the 16 kB budget. The effect RAM fills
8000 of the 8192 words below the control registers. More effects would need a
wider bus address, a moved register block and a wider effect-number field.

There is one stored picture per tank kind, and an object entry has no rotate
or mirror bits. A tank turned to face another way therefore needs its own
picture (the spare image slot) or a software rewrite of its image.

The ADC half of the codec (AUD_ADCDAT, AUD_ADCLRCK) is not used.

## Files

| file | role |
|---|---|
| `rtl/bt_pkg.sv` | constants, types (`sprite_t`, `tile_t`, `field_t`, `img_e`), bus maps, codec words |
| `rtl/vga_timing.sv` | raster counters, syncs, pixel enable, VGA_CLK |
| `rtl/mp_ram.sv` | RAM with one write and NRD registered read ports (images, digits, effects) |
| `rtl/tile_map.sv` | 20x15 scenery map |
| `rtl/sprite_engine.sv` | per-layer object hit test and picture address |
| `rtl/layer_mux.sv` | layer priority and background |
| `rtl/vga_controller.sv` | display engine and its Avalon slave |
| `rtl/sample_fifo.sv` | music FIFO |
| `rtl/i2s_tx.sv` | I2S serialiser following the codec's clocks |
| `rtl/i2c_codec_config.sv` | codec set-up over I2C |
| `rtl/audio_controller.sv` | effects RAM, FIFO, mixer, codec glue and its Avalon slave |
| `rtl/battle_tank_top.sv` | both controllers side by side |
| `tb/ssm2603_model.sv` | behavioural codec: I2C slave, I2S clock master, PBDAT decoder |
| `tb/vga_ref.svh` | pixel reference model and picture formulas for the display benches |
| `tb/tb_*.sv` | one self-checking bench per module |

## Simulating

Every bench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/bt_pkg.sv tb/tb_battle_tank_top.sv --top-module tb_battle_tank_top -o sim
./obj_dir/sim
```

Replace the bench name to run another. What the benches check:

* **`tb_battle_tank_top`** runs the whole fabric at its real sizes and
  clocks, with no parameter changed. It simulates 0.54 s, which takes
  about a minute. It loads every picture, builds a game screen and checks two frames
  pixel by pixel against `vga_ref.svh`. A game step is applied in between:
  tanks move, a bullet flies, a brick is damaged, an explosion appears and a
  counter changes. Meanwhile it checks the codec set-up (time and registers),
  plays the fire effect to its end over streamed music, interrupts with the
  explosion effect, lets the FIFO run dry and turns the music off. Every
  sample the codec model decodes is compared with a frame-level reference.
  The bench fails if any layer case, transparency, overlap, saturation,
  underrun, effect end or restart never happened.
* **`tb_vga_controller`** compares two full frames of random, overlapping
  tables pixel by pixel, with syncs and blanking. It also checks the
  two-pixel output delay.
* **`tb_audio_controller`** runs the same audio scenario with a 250 kHz SCL
  and a fast BCLK.
* Unit benches cover raster timing, RAM ports, the object hit test, the tile
  map, the layer priority, the FIFO, the I2S framing against the model, and
  the I2C word list, SCL timing and NACK handling.

The references in the benches are written separately from the RTL: own
counters, own priority walk, and picture formulas.

## How far to trust it

Every module compiles in Verilator lint and in Yosys (slang front end), and
every bench passes. Each bench was also run against a deliberately broken
copy of its module and caught it. The following have not been checked
against real parts, only against the behavioural codec model and the timing
numbers quoted above:

* the codec itself: register values, master-mode BCLK rate, and XCK in USB
  mode;
* the DAC, which is assumed to register data on the VGA_CLK rising edge;
* the Avalon timing of the vendor interconnect, which is assumed to be
  write-through with read latency 1.

The design has not been run on hardware.
