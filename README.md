# Video and audio logic for an FPGA guitar-rhythm game

A small rhythm game ("hit the falling note when it reaches the line") runs on a
Spartan-3E board around a soft processor. The processor has a 2 kHz interrupt to
run the game, read the buttons and keep two streams fed. It is too slow to redraw
the screen every frame: in one frame it can rewrite only about a fifth of a
framebuffer. So the custom hardware does the drawing:

* **Video.** A VGA controller puts out 640x480 at 60 Hz. It shows a *framebuffer
  region* that a DMA engine streams from external RAM into a FIFO. Over that region
  it draws up to 40 *hardware sprites* (the falling notes, letters and digits)
  on the fly. Sprites are never written into the framebuffer. To move a note,
  software changes two registers.
* **Audio.** An audio controller plays 8-bit stereo PCM from a FIFO as two PWM
  pins, one sample per PWM period.

This repository holds the SystemVerilog for these two controllers (`gh_top` and
everything under it) and a self-checking testbench for each module. The processor,
bus, timer, interrupt controller, UART, GPIO and DMA engine are stock cores, so they
are not included. The external RAM and flash are not included either. Their
connections to the custom logic are the ports of `gh_top`.

Everything runs on one 50 MHz clock with a synchronous, active-low reset `rst_n`.

## Module map

```
gh_top
├── vga_controller
│   ├── vga_sync_gen      hcnt/vcnt, syncs, lookahead position
│   ├── sync_fifo         framebuffer FIFO, 2048 x 32 bit
│   ├── fb_reader         "read from FIFO if inside limits", byte select
│   ├── sprite_engine     4-stage sprite pipeline
│   │   ├── sprite_props  40 x 54-bit property registers
│   │   └── sprite_mem    8 KiB pixel memory (block RAM)
│   └── RGB multiplexer + output register
└── audio_ctrl
    ├── sync_fifo         sample FIFO, 1024 x 16 bit
    └── audio_pwm         prescaler (/9) + 8-bit PWM counter
```

`gh_pkg` holds the shared types: `rgb332_t` (3 bits red, 3 green, 2 blue),
`sprite_cmd_t` (the sprite write bundle), `sprite_prop_t` (54 bits per sprite) and
`fb_limits_t`. It also holds the timing constants.

## Timing: counters, pixels and the lookahead

`vga_sync_gen` counts `hcnt` 0..1599 at 50 MHz and `vcnt` 0..520. One line is
32 µs and one frame is 833,600 clocks, which is 59.98 Hz. `hsync` is low while
`hcnt < 190` and `vsync` is low while `vcnt < 1`. A screen pixel lasts two clocks,
so every coordinate in the design is a **pixel** coordinate. The horizontal pixel
is `hcnt/2` (0..799) and the line is `vcnt` (0..520). This is the whole frame,
blanking included. Sprites may be placed in the blanking area, and the framebuffer
region may sit anywhere.

The sprite path and the framebuffer path are each exactly **4 clocks deep**.
Both are fed a *lookahead* position, 4 clocks (4 `hcnt` steps) ahead of the
counters, and this position wraps into the next line and frame. So the pixel that
leaves either path belongs to the current `(hcnt, vcnt)`. A multiplexer picks the
sprite pixel where a sprite is opaque and the framebuffer pixel elsewhere. One output
register then delays RGB, `hsync` and `vsync` together. At the pins, RGB and the syncs
therefore describe the position the counters held one clock earlier. RGB is forced to
0 during either sync pulse.

## Sprites (`sprite_engine`, `sprite_props`, `sprite_mem`)

Each sprite has these properties:

| field  | bits | meaning |
|--------|------|---------|
| x, y   | 11 + 11 | top-left corner, pixel coordinates of the whole frame |
| w, h   | 8 + 8   | size 0..255; size 0 draws nothing |
| offset | 16      | where the sprite's pixels start in the pixel memory |

The pixel memory holds 8192 bytes in RGB 3:3:2. A byte of **0 is transparent**. A
sprite's pixels are stored row by row, so the pixel at sprite-local `(x, y)` is at
`offset + w*y + x`. The sum is 16 bits wide and wraps. Only its low 13 bits address
the memory.

The pipeline, one position per clock:

1. **Inside any sprite?** All 40 sprites are compared with the position in
   parallel: `sx <= x < sx+w` and `sy <= y < sy+h`. If several cover the position,
   the **highest index wins**. The stage registers a hit flag, the winning index and
   the sprite-local x and y. This is the long combinational path, and it grows with
   `NUM_SPRITES`.
2. **Address.** It computes `offset + w*local_y + local_x` with one 8x8 multiplier.
3. **Set address.** It registers the address into the memory port.
4. **Fetch.** The block RAM is read. `spr_opaque` = hit and byte ≠ 0.

Priority is decided before transparency. If the winning sprite's byte is 0 there,
the framebuffer shows through, not a lower-index sprite beneath it. This keeps the
pipeline to a single memory read.

Software writes through `sprite_cmd_t`, one strobe per clock:

| strobe | effect |
|--------|--------|
| `valid_sprite`      | location of `sprite_index` = (`sprite_x`, `sprite_y`) |
| `set_sprite_size`   | w = `sprite_x[7:0]`, h = `sprite_y[7:0]` |
| `set_sprite_offset` | offset = `sprite_address` |
| `fill_sprite_mem`   | pixel memory[`sprite_address`] = `sprite_x[7:0]` |

Indices 40 and above are ignored. Properties may change at any time. If a sprite
moves while it is being drawn, that frame may show a torn sprite. After reset every
sprite has size 0. The pixel memory is not cleared.

## Framebuffer path (`sync_fifo`, `fb_reader`)

Software sets the region with `fb_limits`: `x_start <= x < x_end` and
`y_start <= y < y_end`, in pixels. The DMA engine writes 32-bit words into the FIFO.
Each word holds four pixels, and the **leftmost pixel is bits 31:24**. The words
follow the region row by row, and each row starts on a new word. Inside the region
the reader pops a word on the first clock of every fourth pixel, counted from
`x_start`. The word goes through a register before the byte select, which removes
the timing sensitivity of reading the FIFO output directly. Outside the region the
framebuffer pixel is 0 (black).

The controller does not check that the FIFO holds the right data: keeping it filled
is software's job. If a word is due and the FIFO is empty, the read is skipped and
the previous word is shown again. `fb_underflow` pulses for one clock. Software can
poll `fb_count` and `fb_full`.

Bandwidth: a 420-pixel-wide region needs 105 words per 1600-clock line. RAM with a
70 ns, 16-bit read cycle delivers one word every 7 clocks, up to 228 words per line.
So the region streams with room to spare; see `tb_fb_bandwidth`.

## Audio (`audio_ctrl`, `audio_pwm`)

A prescaler divides 50 MHz by 9. Each time it wraps, an 8-bit PWM counter steps.
An output is 1 while the counter is below the sample, so its duty is `sample/256`.
One PWM period is 256 x 9 = 2304 clocks, so the sample rate is **21.701 kHz**. That
is the nearest a whole-number prescaler gets to 22.05 kHz: 50 MHz / 22050 / 256 =
8.86.

On the last clock of each period (`aud_tick`) the controller pops one FIFO word.
The word is `{left[7:0], right[7:0]}`. The FIFO's registered read data is the sample
register, so a new sample starts exactly with a new period. If the FIFO is empty,
the last sample repeats and `aud_underflow` pulses.

## Where this RTL makes its own choices

These points are not fixed by the original console's description. They are choices
made here and can be changed:

* Pixel coordinates are `hcnt/2`. The lookahead is counted in clocks (4 `hcnt` steps).
* Byte order in a framebuffer word: leftmost pixel in the MSB. Byte order in an audio
  word: left channel in the high byte.
* FIFO depths: 2048 x 32 for video and 1024 x 16 for audio. These are sized to
  fill 4 and 1 Spartan-3E block RAMs.
* "8Kb" of sprite memory is read as 8 KiB. That matches byte-wide pixels and
  16-bit offsets.
* Sprite edges are exclusive: a sprite covers `sx .. sx+w-1`.
* RGB is blanked during sync pulses. Framebuffer pixels outside the region are black.
* Empty-FIFO behaviour (repeat the last data, pulse an underflow flag) and the
  reset values.
* The bus side is abstracted. The processor's register writes arrive as the plain
  strobes above, and the region limits are plain inputs. The bus registers that
  would hold them are not part of this RTL.

Not included: the processor system and its stock cores, the external memories, and
the clock manager. The guitar controller is also left out: it is switches with
pull-up resistors, read by a GPIO core.

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gh_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/gh_pkg.sv tb/tb_gh_top.sv
./obj_dir/Vtb_gh_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_vga_sync_gen`   | counters, sync widths, lookahead and the 833,600-clock frame over two frames |
| `tb_sync_fifo`      | random traffic against a queue model, full/empty/overflow/underflow |
| `tb_fb_reader`      | region test, byte order, word register and underflow on a small frame |
| `tb_sprite_props`   | random property writes, out-of-range indices |
| `tb_sprite_mem`     | 8 KiB fill, read latency, address wrap |
| `tb_sprite_engine`  | 40 random sprites against a model: priority, transparency, address, 4-clock latency |
| `tb_audio_pwm`      | duty = 9 x sample clocks, 2304-clock period, samples 0 and 255 |
| `tb_audio_ctrl`     | FIFO full, sample order, left/right, underflow with a 16-entry FIFO |
| `tb_vga_controller` | one full frame at default sizes, every pixel and sync compared with a model |
| `tb_fb_bandwidth`   | a 420x480 region at the external RAM's rate, no underflow |
| `tb_gh_top`         | whole design at default sizes, three frames plus 1100 audio samples |

`tb_gh_top` runs 2.5 million clocks in a few seconds. It counts how often each
mechanism happened: sprite pixels, transparent pixels, overlapping sprites,
framebuffer pixels, video FIFO full and underflow, audio FIFO full and underflow.
A mechanism that never happens counts as a failure.

## How far to trust it

Every module lints cleanly with Verilator (`-Wall`, warnings only for unused
signals) and elaborates in Yosys. The testbenches compare against models written
independently of the RTL. They pass at the default sizes (40 sprites, 8 KiB, full
640x480 timing). Each testbench was also run against a copy of its module with one
deliberate bug, and every one caught the bug. The FIFO carries assertions on its
fill level and pointers, which hold in every simulation run with `--assert`.

None of this has been checked on hardware. Stage 1 of the sprite pipeline (40
parallel compares plus a priority chain) is the critical path at 50 MHz. Timing
closure on a Spartan-3E has not been checked here.
