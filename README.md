# Atari 7800 console core with VGA output

This is a synthesizable SystemVerilog model of the Atari 7800 console's own
logic, minus its CPU and TIA. It covers the Maria graphics chip, the console
memory map and RAM, the hidden control register that switches between 7800 and
2600 operation, the TIA sound generator, the controller inputs, and a video
back end. The back end turns the 7800's 60 Hz NTSC raster into 640x480 VGA
without a frame buffer in 7800 mode.

The main idea is that the Maria draws in step with the VGA raster:

- Each NTSC scanline (320 pixels wide) is shown on two VGA rows (640 pixels wide).
- The Maria's DMA for the next scanline runs while the current scanline is
  being scanned out twice.
- The Maria still runs on its own 7.16 MHz clock and follows its cycle budget
  of 452 cycles per scanline.
- A VGA row pair is 1600 VGA clocks, about 457 Maria cycles, so the two rates
  match with a few cycles to spare.

The 6502 ("Sally") CPU, the TIA's video and input logic, the RIOT, the BIOS ROM
and the cartridge are outside this core. They connect through plain ports on
the top module `atari7800`.

## Blocks

| module | role |
|---|---|
| `atari7800` | top: wires everything below; CPU and external devices are ports |
| `maria` | the Maria: `maria_timing`, `memory_map`, `maria_dma`, `line_ram`, `clock_gen` |
| `maria_timing` | places DMA on the raster, halts the CPU, kill, NMI, WSYNC, line RAM swap |
| `maria_dma` | zone-list / display-list DMA engine |
| `line_ram` | double line buffer, write modes and read modes |
| `memory_map` | address decode, Maria registers, colour map |
| `clock_gen` | TIA / CPU / bus clock enables |
| `ctrl_reg` | hidden control register (lock, Maria enable, cartridge/BIOS, TIA enable) |
| `sram` | 2 KB RAM (two instances: RAM0, RAM1) |
| `bus_mux` | read bus driven by the buffered chip select |
| `sound`, `audio_channel` | two TIA audio channels, mixed to signed 16 bit |
| `controller_if` | joystick pins to RIOT port A and TIA INPT pins |
| `frame_buffer_2600` | two 160x192 frames for 2600 mode |
| `uv_to_rgb` | Atari colour byte to 12-bit RGB |
| `vga_ctrl` | 800x525 raster, syncs, blanking |
| `a78_pkg` | shared constants, device codes, CONTROL register struct |

## Clocks and the bus

There are two clocks:

- `clk` is the Maria clock (7.16 MHz). Everything on the bus uses it.
- `vga_clk` is the pixel clock (25.175 MHz). The raster counters, line RAM
  playback, frame buffer reads, colour conversion and video output use it.

The row number crosses into the Maria domain through a re-timing stage that
waits for a stable value. The column never crosses: the line RAM is read with
the VGA column directly.

On `clk`, `clock_gen` makes clock enables rather than derived clocks:

- `tia_ce` every 2nd cycle (3.58 MHz).
- `cpu_ce` every 4th cycle (1.79 MHz), or every 6th (1.19 MHz) when the
  address starting the CPU cycle selects a slow device (TIA or RIOT).
- `mem_ce` is the bus-cycle strobe. It follows `cpu_ce` while the CPU runs
  and is high every cycle while the Maria holds the bus.

The bus has separate write and read data paths. Every device registers its
read data on `mem_ce`. `bus_mux` registers the selected device on the same
edge (the buffered chip select) and uses it to pick the read bus, so a read
returns one bus cycle after its address.

During DMA, `halt` is high:

- the address bus carries the DMA address;
- CPU writes are blocked;
- the fast RAMs answer every Maria cycle.

## Maria DMA: zone lists and display lists

The screen is built from horizontal zones. The zone list starts at
`{ZPH, ZPL}`. Each zone entry is three bytes:

| byte | contents |
|---|---|
| 0 | `{DLI, A12en, A11en, 0, OFFSET[3:0]}` |
| 1 | display-list pointer, high byte |
| 2 | display-list pointer, low byte |

A zone is OFFSET+1 scanlines high, and the zone heights must sum to 242. Its
display list is a sequence of object headers, ended by a header whose second
byte is zero:

- 4-byte header: `PPL, {PALETTE, WIDTH}, PPH, HPOS`
- 5-byte header: `PPL, {WM, 1, IND, 00000}, PPH, {PALETTE, WIDTH}, HPOS`.
  WM stays in force for later objects. IND selects character (indirect) mode.

WIDTH is the two's complement of the byte count. The data address depends on
the mode:

- Direct mode reads `{PPH + OFFSET, PPL}` upward, so each scanline of a zone
  takes its bytes from a page further down.
- Indirect mode reads a character code C from the object data, then the
  graphics byte at `{CHARBASE + OFFSET, C}`. With CONTROL.CWIDTH it also reads
  the byte at `C + 1`.

"Holey" DMA skips a graphics address with A12 set (when A12en) or A11 set
(when A11en). The skipped byte is treated as transparent, but the horizontal
position still advances.

OFFSET counts down once per scanline. When it reaches zero at the end of a
display list, the DMA fetches the next zone entry in the same DMA. An entry's
DLI bit raises an NMI when that entry is fetched, which is at the end of the
previous zone.

**Cycle costs.**
- A fast byte (RAM, address below 0x4000) costs 2 Maria cycles: one with the
  address held and one to take the registered data.
- A cartridge byte (0x4000 and up) holds its address for 4 cycles and costs 5.
- Character codes are always read as fast.

This is what limits how much can be drawn on one scanline. The DMA gets the
bus from cycle 37 (28 plus 9 cycles of halt lead) to cycle 436. At that point
an unfinished display-list DMA is cut off and its line shows whatever had been
written so far.

## Line RAM

`line_ram` holds two arrays of 160 five-bit cells. Each cell covers two of the
320 pixels and holds `{palette, colour}` bits. The DMA fills the buffer array
while the playback array is shown. A swap copies buffer to playback and clears
the buffer.

**Writing.** Each graphics byte `D7..D0` with palette `P2..P0` is written at
the current horizontal position, which then advances:

| WM | cells written |
|---|---|
| 1 | `{P2,D3,D2,D7,D6}`, `{P2,D1,D0,D5,D4}` (two cells) |
| 0 | `{P2,P1,P0,D7,D6}`, `{..,D5,D4}`, `{..,D3,D2}`, `{..,D1,D0}` (four cells) |

A cell whose data bits are all zero is not written, so earlier objects
show through. Neither is a cell beyond index 159.

**Kangaroo mode.** Normally a written cell replaces both of its pixels, so an
invisible (colour 0) pixel next to a visible one shows the background. With
CONTROL.KM set, two-cell writes work pixel by pixel in the 320-wide read modes
(RM = 10 or 11): a pixel whose new colour bits are zero keeps the bits already
in the cell, so it stays transparent. The bit groups are:

- RM = 10: left `{L1,L3}`, right `{L0,L2}`;
- RM = 11: left `L1`, right `L0`.

**Reading.** The VGA column divided by two (a 320-wide column) selects the
cell, and its last bit R selects the left or right pixel. CONTROL.RM decodes
the cell `L4..L0` as follows:

| RM | palette | colour |
|---|---|---|
| 00, 01 | `{L4,L3,L2}` | `{L1,L0}` |
| 10 | `{L4,0,0}` | R ? `{L0,L2}` : `{L1,L3}` |
| 11 | `{L4,L3,L2}` | R ? `{L0,0}` : `{L1,0}` |

Colour 0 gives the background register. Otherwise the colour is register
`P<palette>C<colour>`. The result is an Atari colour byte `{hue, luminance}`.

## The raster schedule

`maria_timing` counts Maria cycles from each scanline start (0..451) and
decides scanline starts from the VGA row:

| VGA row(s) | what happens |
|---|---|
| 0, 2, ..., 478 | scanline start, display-list DMA for a visible line; 478 is the last |
| 480 ... 518 (even) | scanline start, no DMA; 518 starts a one-row line |
| 519 | scanline start; zone-list DMA at cycle 420, which falls in row 520 |
| 521, 523 | scanline start, display-list DMA for the first two lines of the zone list |

Each DMA runs as follows:

1. Halt rises.
2. Nine cycles later the DMA engine gets its start pulse.
3. Halt falls one cycle after the engine reports done.
4. A display-list DMA that has not finished by cycle 436 is killed, and halt
   falls one cycle later.

A DLI reported with "done" holds NMI high for 6 cycles, counted only while
the CPU is not halted.

The line RAM swaps at the first scanline start after a display-list DMA. The
line fetched during rows 2k..2k+1 is therefore shown on rows 2k+2 and 2k+3.
The first two lines of the zone list are fetched on rows 521 and 523, before
row 0.

Other timing rules:

- A write to WSYNC drops RDY until the next scanline start.
- STATRD bit 7 (VBlank) is set from row 512 to the end of the frame.
- DMA only runs with the Maria enabled, CONTROL.DM = 10, ZPL written, and a
  zone-list DMA done since then.

## Memory map and the control register

7800 map (Maria enabled):

| range | device |
|---|---|
| 0x0000-0x001F and mirrors | TIA (slow) |
| 0x0020-0x003F and mirrors | Maria registers |
| 0x0040-0x00FF, 0x0140-0x01FF, 0x0240-0x027F, 0x0340-0x037F | RAM0 |
| 0x0280-0x02FF, 0x0380-0x03FF, 0x0480-0x04FF, 0x0580-0x05FF | RIOT (slow) |
| 0x1800-0x1FFF | RAM1 |
| 0x2000-0x27FF | RAM0 |
| 0x4000-0xFFFF | cartridge |

2600 map (Maria disabled): A12 selects the cartridge; otherwise A7 selects the
RIOT; otherwise the TIA. In both maps, 0x8000-0xFFFF is the BIOS ROM while the
control register's cartridge bit is 0.

Maria registers sit at offsets from 0x20:

| offset | register |
|---|---|
| 0x00 | background |
| 4p+c | palette p colour c |
| 0x04 | WSYNC |
| 0x08 | STATRD |
| 0x0C | ZPH |
| 0x10 | ZPL |
| 0x14 | CHARBASE |
| 0x1C | CONTROL `[CK DM1 DM0 CWIDTH BCNTL KM RM1 RM0]` |

Every CPU write to a TIA address also writes the four-bit hidden control
register:

- bit 0: lock
- bit 1: Maria enable
- bit 2: cartridge instead of BIOS
- bit 3: TIA video mode

A write that would set bits 1 and 3 together is ignored. Once the lock bit is
set, nothing changes it until reset. Reset selects the BIOS with both video
modes off.

## 2600 mode

With the TIA bit set (Maria off), the core expects the external TIA to stream
pixels (`tia_px_*`) into `frame_buffer_2600`:

- The frame buffer holds two 160x192 frames. The TIA writes one, and
  `tia_frame_done` swaps it to the display side.
- VGA shows each pixel as 4 columns by 2 rows, on rows 48..431.
- The controllers switch to one-button mode: INPT4/5 is low when either
  button of that player is pressed.

## Sound

Each of the two channels has three registers (TIA addresses 0x15..0x1A):

- AUDC (tone);
- AUDF (5-bit divider);
- AUDV (4-bit volume).

A sample tick is made every 114 TIA clocks (about 31.4 kHz). Each channel steps
its pattern once per AUDF+1 ticks. The 16 AUDC tones come from three
polynomial counters and two dividers:

- a 4-bit counter (x^4+x^3+1);
- a 5-bit counter (x^5+x^3+1);
- a 9-bit counter (x^9+x^5+1);
- a divide-by-31 square wave;
- a divide-by-3 prescaler.

Their repeat lengths are 1, 15, 465, 465, 2, 2, 31, 31, 511, 31, 31, 1, 6, 6,
93 and 93 steps. A channel outputs +AUDV·2184 for a 1 bit and −AUDV·2184 for
a 0 bit, so volume 15 nearly spans the 16-bit range. The two channels are
averaged.

## Colour and video output

`uv_to_rgb` computes the colour table instead of storing one:

- Luminance L gives Y = 17·L.
- Hue 0 is grey.
- Hues 1..15 lie on a colour circle, starting at 167° and stepping −24° per
  hue, with a saturation of 40.
- RGB comes from the usual YCbCr-style formulas, clamped, keeping 4 bits per
  channel.

This is an approximation of the NTSC palette, not a measured one.

`vga_ctrl` produces the standard 640x480 timing:

- 800x525 total;
- hsync on columns 656..751 and vsync on rows 490..491, both active low.

The colour path has two clocks of latency from the raster counters (memory
read, then colour conversion). `vga_ctrl` delays its sync and blanking flags by
the same `PIPE_DELAY`, so colour and syncs leave the output flops together.

## Where this design departs from the original description

- **Line RAM swap.** The swap happens at the scanline start after a
  display-list DMA, not the moment the DMA finishes. Swapping at DMA
  completion would change the line while it is still being shown.
- **DMA access time.** Fast bytes take 2 cycles and slow bytes 5, instead of 1
  and 4. The extra cycle comes from the registered (buffered-select) reads.
- **Write-mode polarity.** The description gives both polarities for the WM
  bit. This design uses WM = 1 for two cells and WM = 0 for four. The
  four-cell layout and the RM = 00/01 decode are this design's own.
- **Not implemented.**
  - Transparency kill, which has no bit in the CONTROL register.
  - Colour kill and border control: the CONTROL bits are stored but do
    nothing.
  - DM values other than 10 do nothing.
  - Read mode 01 decodes like 00.
- **Memory map.** The decode table was only partly available. The mirror
  ranges and the 0x4000 cartridge boundary follow the usual 7800 map.
- **Sound.**
  - The divider is 114 TIA clocks (31.4 kHz), the nearest integer to 31139.5 Hz.
  - The pattern generator is this design's polynomial-counter version, built
    to match the published pattern lengths.
- **Colour.** The palette is a computed approximation.
- **Timing details.** Scanline boundaries, the VBlank row (512), the re-timing
  stage, and the extra halt cycle after a kill are this design's choices.
- **Outside the core.**
  - The CPU, the TIA video and input logic, the RIOT, the BIOS and the
    cartridge (including POKEY).
  - The audio codec interface and the clock generator.

## Simulation

Every block has a self-checking testbench in `tb/` named `tb_<block>`. It ends
by printing `TB_RESULT checks=N failures=M`, and has a watchdog. Run one with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/a78_pkg.sv tb/tb_maria.sv --top-module tb_maria -o sim
./obj_dir/sim
```

What the larger tests cover:

- `tb_maria_dma` compares the DMA engine against a reference walk of the same
  lists, covering:
  - 4- and 5-byte headers;
  - direct and indirect objects, with CWIDTH;
  - holey skips, fast/slow cycle counts, zone changes, DLI and kill.
- `tb_maria_timing` runs two frames with a responding DMA model. It checks:
  - 242 display-list DMAs and 242 swaps per frame, and one zone-list DMA;
  - start cycles, the 9-cycle halt lead, kill at 436;
  - NMI length, WSYNC and VBlank.
- `tb_maria` builds a zone list and display lists in a memory model and
  compares a whole frame of the Maria's colour output pixel by pixel.
- `tb_atari7800` runs the top at its default size. It acts as the CPU and
  outside devices:
  - boots from the BIOS and enables the Maria and cartridge;
  - writes the lists into RAM, programs the registers and checks a whole VGA
    frame on the output pins;
  - switches to locked 2600 mode and checks a frame-buffer picture on the pins.

  It counts every mechanism and fails if any count stays at zero: zone and
  display DMA, kill, swap, NMI, WSYNC stall, halt, slow DMA, BIOS/cartridge
  selects, audio ticks, mode switches. It takes a few seconds.
