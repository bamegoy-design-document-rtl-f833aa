# BameGoy — a Game Boy compatible video and memory system in SystemVerilog

BameGoy recreates the original (DMG) Game Boy on an FPGA. A CPU core running
the Game Boy's variant of the Z80 instruction set sees the usual 16-bit
address space: cartridge ROM, video RAM, work RAM, sprite memory and the
memory-mapped registers. A pixel processing unit (PPU) draws the 160x144
picture line by line from tiles and sprites, exactly as the handheld does,
and the picture is shown on a 640x480 VGA monitor at three times its size.
A host processor on the same FPGA loads the game image and forwards the
buttons of a USB controller over an Avalon bus.

This repository holds everything except the CPU core: the memory map and
memories, timer, interrupt registers, joypad, OAM DMA, the complete PPU,
the framebuffer, the VGA output and the host interface. The CPU is meant to
be an existing GB-Z80 core; its bus is brought out on the top level
(`bamegoy_top`) so that one can be attached, and the end-to-end testbench
plays its part.

## How the pieces fit

```
            host (Avalon-MM) ──► avalon_if ──► ROM loading, buttons, CPU run
                                                 │
 GB-Z80 core ◄──► bus_ctrl ──► ROM  VRAM  ext RAM  WRAM  OAM  HRAM
  (external)        │            ▲      ▲                 ▲
                    │            │      └──── ppu ◄───────┘ (entry port)
                    ├─► timer, int_ctrl, joypad, oam_dma, LCD registers
                    │
                 ppu ──pixels──► framebuffer ──► vga_out ──► VGA
```

Everything runs on one clock (`CLK_HZ`, 50 MHz by default). A phase
accumulator turns it into `cpu_ce`, a one-clock tick at the Game Boy rate of
4.194304 MHz; the PPU, timer and DMA advance only on that tick, and the CPU
core should too. The VGA side advances every other clock (25 MHz). Setting
`CLK_HZ = GB_HZ` makes the tick permanent, which is handy for fast tests.

## Memory map

| Range | Contents | Implementation |
|---|---|---|
| $0000–$7FFF | cartridge ROM, 32 KiB | `dp_ram`; written only by the host, writes from the CPU are ignored (no bank controller) |
| $8000–$9FFF | VRAM, 8 KiB: tile data $8000–$97FF, tile maps $9800/$9C00 | `dp_ram`, second port read by the PPU |
| $A000–$BFFF | external (cartridge) RAM, 8 KiB | `dp_ram` |
| $C000–$DFFF | work RAM, 8 KiB | `dp_ram` |
| $E000–$FDFF | echo area | not emulated, reads $FF |
| $FE00–$FE9F | OAM, 40 sprites x 4 bytes | `oam_ram` |
| $FF00 | joypad | `joypad` |
| $FF01/$FF02 | SB/SC | plain registers (no serial link) |
| $FF04–$FF07 | DIV, TIMA, TMA, TAC | `timer` |
| $FF0F / $FFFF | IF / IE | `int_ctrl` |
| $FF40–$FF4B | LCDC, STAT, SCY, SCX, LY, LYC, DMA, BGP, OBP0, OBP1, WY, WX | `ppu` (DMA: `oam_dma`) |
| $FF50 | boot ROM control | plain register (there is no boot ROM) |
| $FF80–$FFFE | HRAM, 127 bytes | `dp_ram` |

Anything else reads $FF. Every read, memory or register, returns its data
on the clock after the one-clock `cpu_rd` strobe; writes take effect on the
`cpu_wr` clock. The I/O registers read back with unused bits as 1.

## The PPU

The PPU (`ppu.sv`) is the heart of the design and the part that takes the
most care to follow. It works in dots (one dot per Game Boy tick), 456 dots
per line and 154 lines per frame (70224 dots, 59.73 Hz):

| Mode | When | What happens |
|---|---|---|
| 2, OAM scan | dots 0–79 of lines 0–143 | `ppu_oam_scan` checks one OAM entry every two dots and keeps the first ten sprites that cover this line |
| 3, drawing | from dot 80 until 160 pixels are out | fetchers fill the FIFOs, one pixel leaves per dot |
| 0, H-Blank | rest of the line | idle |
| 1, V-Blank | lines 144–153 | idle |

STAT bits 1:0 report the mode and LY the line.

**Background and window.** `ppu_fetcher` runs four steps of two dots each:
read the tile number from the tile map, read the low byte of the tile row,
read the high byte, then push eight pixels into the background FIFO
(`pixel_fifo`). The push waits until the FIFO is empty. A FIFO whose last
pixel leaves on the same dot counts as empty, so pixels flow without gaps
once the first tile is in. For the background, the map row is
`(LY+SCY)/8` and the column `(SCX/8 + n) mod 32`. The first `SCX mod 8`
pixels of each line are thrown away, so mode 3 grows by exactly that many
dots. Tile data is found at `$8000 + tile*16` when LCDC bit 4 is set. When
it is clear, the address is `$9000 + signed(tile)*16`. The window takes
over when LCDC bit 5 is set, LY >= WY and the next pixel's x + 7 >= WX.
At that point the background FIFO is cleared and the fetcher restarts on
the window map (LCDC bit 6) at column 0. The window keeps its own line
counter, which only advances on lines that showed the window.

**Sprites.** When a kept sprite's X byte (screen x + 8) reaches the current
pixel position + 8, pixel output stops. The sprite fetch then waits until
the background fetcher is holding a finished row, so no VRAM read is cut in
two. `ppu_sprite_fetcher` reads the sprite's two tile bytes. Tile numbers
are unsigned from $8000, and it handles Y-flip, X-flip and 8x16 sprites,
where bit 0 of the tile number is ignored. The row is then merged into the
sprite FIFO: a pixel already queued keeps its place unless it is
transparent. Because sprites are fetched left to right, and in OAM order
when they are due together, the leftmost sprite wins where sprites overlap.
Pixels of a sprite that is partly off the left edge are dropped in the
merge.

**Mixing.** `ppu_pixel_mixer` shows the background pixel when there is no
sprite pixel, when the sprite pixel is colour 0, or when the sprite's
priority flag (bit 7) is set and the background colour is not 0. Otherwise
it shows the sprite pixel. The colour number then goes through BGP or
through OBP0/OBP1 (sprite flag bit 4) to a 2-bit shade, where 0 is lightest.
LCDC bit 0 = 0 blanks the background and the window to colour 0, and LCDC
bit 1 = 0 hides sprites.

**Interrupts and LCD off.** `irq_vblank` pulses on entering line 144.
`irq_stat` pulses on a rising edge of the OR of the conditions enabled in
STAT: LY = LYC (bit 6), mode 2 (bit 5), mode 1 (bit 4) and mode 0 (bit 3).
Clearing LCDC bit 7 holds LY and the dot counter at 0, and drawing restarts
from line 0 when the bit is set again.

Mode 3 takes about 167 dots plus `SCX mod 8`, plus about five dots for each
sprite fetched. This is shorter than the handheld's 172 dots, so programs
that count exact mode-3 cycles will see different numbers. Nothing depends
on it inside the design.

## Video output

The PPU writes each pixel into `framebuffer` (160x144 x 2 bits, address
`y*160 + x`). `vga_out` scans a standard 640x480 frame: 800x525 pixel
ticks, negative syncs. It reads the frame back at 3:1, which gives a
480x432 picture at columns 80–559 and lines 24–455, with black around it.
It counts with divide-by-3 sub-counters rather than dividing. Shades
0–3 become grey levels FF, AA, 55 and 00 on all three colour outputs.
Because the address changes right after a pixel tick and the framebuffer
answers a clock later, the pixel tick must come at most every other clock.

## Other registers

- **Timer.** A 16-bit divider counts ticks. DIV is its upper byte, and any
  write to DIV clears it. With TAC bit 2 set, TIMA counts falling edges of
  divider bit 9, 3, 5 or 7 (TAC[1:0] = 0..3). At 4.194304 MHz these give
  4096, 262144, 65536 and 16384 Hz. On overflow TIMA reloads TMA in the
  same tick and the timer interrupt fires.
- **Interrupts.** IE and IF hold five bits: V-Blank, STAT, timer, serial
  and joypad. A source pulse sets its IF bit. The CPU clears bits by
  writing IF or by pulsing `cpu_int_ack[i]` when it takes the interrupt.
  `cpu_irq_flags = IE & IF`. A new request wins over a clear in the same
  clock.
- **Joypad.** The host supplies eight buttons (1 = pressed; bit 0 Right,
  1 Left, 2 Up, 3 Down, 4 A, 5 B, 6 Select, 7 Start). Writing $FF00 with
  bit 4 low selects the D-pad and bit 5 low selects the buttons. The low
  nibble reads 0 for a pressed key. The interrupt fires when a selected line
  falls.
- **OAM DMA.** Writing XX to $FF46 copies $XX00–$XX9F into OAM, one byte
  per tick (161 ticks). The DMA engine owns the bus meanwhile. The CPU can
  still use HRAM, and its other accesses are dropped and read $FF.

## Host interface

`avalon_if` is an Avalon-MM slave with 32-bit words and read latency 1:

| Word | Register |
|---|---|
| 0 | CTRL: bit 0 = run; while 0 the CPU is held in reset (`cpu_rst_n`) |
| 1 | ROM_ADDR: next ROM byte to load (15 bits) |
| 2 | ROM_DATA: write a byte at ROM_ADDR, which then increments |
| 3 | JOYPAD: the eight buttons as above |
| 4 | STATUS: PPU mode (bits 9:8) and LY (bits 7:0) |

To start a game, write ROM_ADDR = 0, stream the image through ROM_DATA,
then set run. A larger cartridge can be emulated by the host rewriting the
switchable half ($4000–$7FFF) as the game changes banks. Nothing in the
hardware does banking.

## Attaching a CPU core

`bamegoy_top` expects the core to:
- drive `cpu_addr`, `cpu_wdata` and one-clock `cpu_rd`/`cpu_wr` strobes;
- take `cpu_rdata` on the next clock;
- pace itself with `cpu_ce`;
- stay in reset while `cpu_rst_n` is low;
- pulse `cpu_int_ack[i]` when it services interrupt `i`.

The core should implement the GB-Z80 set. That set is the Z80 without the
sign and parity flags, the IX/IY registers, the DD/ED/FD prefixes, the
block and most 16-bit instructions. It adds LDI/LDD through (HL), the
$FF00+n and $FF00+C accesses, `LD (nn),SP`, `ADD SP,dd`, `LD HL,SP+dd`,
RETI, STOP and SWAP (in place of SLL). Its flags are Z, N, H and C in bits
7–4 of F.

## Where this departs from a real Game Boy

- The framebuffer holds a whole frame. A single 160-pixel line would be
  enough only if the PPU and the VGA scan were locked together. They are
  not: the PPU runs at 59.73 Hz and the VGA scan at 60 Hz.
- Work RAM is 8 KiB, so that every address from $C000 to $DFFF is backed.
- Both tile-data addressing modes are built, chosen by LCDC bit 4, even
  though games are expected to use the $8000 mode.
- The CPU can read and write VRAM and OAM in every mode. The handheld blocks
  this during modes 2 and 3.
- Mode 3 timing, the sprite-fetch penalty, DMA speed (one byte per dot
  rather than per machine cycle) and the exact TIMA reload delay are
  simplified. When WX < 7 the window starts with its own column 0 rather
  than part-way into the first tile.
- There is no boot ROM, no sound and no serial link. SB, SC and $FF50 are
  only storage.

## Simulating

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. `tb_bamegoy_top` runs the whole system at
its default parameters. It loads a ROM through the host port, exercises the
memories, the timer, the joypad and DMA, and draws a scrolled checkerboard
with a window and a sprite. It then compares one full VGA frame pixel by
pixel with the expected picture, and fails if any of these mechanisms never
happened: ROM load, DMA and its lock-out, timer overflow, joypad, V-Blank
and STAT interrupts, each PPU mode, SCX discard, sprite fetch and window
start. It runs in a few seconds. `tb_ppu` compares complete frames in five
LCDC set-ups against a reference renderer. It also checks 70224 dots per
frame, 456 per line, and that SCX mod 8 lengthens mode 3.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gb_pkg.sv tb/tb_bamegoy_top.sv \
          -y rtl --top-module tb_bamegoy_top
./obj_dir/Vtb_bamegoy_top
```

Replace `tb_bamegoy_top` by any other testbench name to run it. The
memories start at zero. Every other register is reset by `rst_n` (active
low, asynchronous).

## Files

`rtl/gb_pkg.sv` holds the shared types: PPU modes, the OAM entry, the
sprite-FIFO pixel and the memory regions. The other files are:
`bamegoy_top`, `bus_ctrl`, `dp_ram`, `oam_ram`, `timer`, `int_ctrl`,
`joypad`, `oam_dma`, `ppu`, `ppu_oam_scan`, `ppu_fetcher`,
`ppu_sprite_fetcher`, `pixel_fifo`, `ppu_pixel_mixer`, `framebuffer`,
`vga_out` and `avalon_if`. Each file opens with a description of its
interface and timing.
