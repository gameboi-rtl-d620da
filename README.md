# A Game Boy (DMG) in SystemVerilog

This design puts the original monochrome Game Boy on an FPGA. It is a
machine-cycle-accurate model of the console's CPU, a dot-by-dot picture
generator, the four-voice sound unit and the small peripherals around them,
all clocked from one 4.194304 MHz clock as in the real hardware. The game is
not built in. It lives in external memory (an SDRAM filled by a host
processor) and is reached through a plain byte-wide cartridge port. The
picture goes out on 640x480 VGA, the sound goes to a 16-bit parallel DAC,
and the buttons come in on eight GPIO lines. A small handshake lets the
host stop the machine at a frame boundary, swap the game and restart it.

Everything is synthesizable RTL in `rtl/`. Every module has a self-checking
testbench in `tb/`, and `tb/gb_top_tb.sv` runs the whole machine at full
size on a program it builds itself.

## Clocking: one clock, one enable

`clk` is the dot clock, 4.194304 MHz. The PPU advances one dot per clock.
The CPU advances one machine cycle (M-cycle) on every fourth clock, when
`ce` is high. The rest of the design follows from this scheme:

* The CPU puts an address on the bus at a `ce` edge. It samples read data
  at the next `ce` edge, three clocks later. The synchronous RAMs
  (one-clock read) and the cartridge port therefore have three clocks to
  answer.
* A write happens exactly once, on `mem_wr & ce`. Peripherals get this as
  the one-clock strobe `io_wr`.
* The timer's 16-bit divider counts every clock. DIV, the TIMA rates and the
  512 Hz sound frame-sequencer tick all come from it.

With 456 dots per line and 154 lines, a frame is 70224 clocks long, which
gives 59.73 frames per second.

## CPU (`gb_cpu`, `gb_alu`, `gb_regfile`)

The CPU is the DMG's 8-bit core. Its one memory port is shared by
instructions and data. Each instruction takes the console's exact number
of M-cycles, with one memory access per cycle.

* **Opcode fetch.** The next opcode is fetched in the last cycle of the
  current instruction, so fetch and execute overlap (two stages).
* **Sequencing.** A step counter, `mc`, walks each instruction family
  through its cycles.
* **ALU.** The 8-bit ALU takes two operands, the flag byte and a 4-bit
  operation, and returns a result and new flags (Z, N, H, C). ADD HL,rr
  goes through the ALU twice on successive cycles (low byte, then high byte
  with carry). INC/DEC rr and the PC use a separate 16-bit incrementer.
* **Register file.** It holds A F B C D E H L. It has two read ports, a byte
  write port, a pair write port and a separate flag write.
* **Interrupts.** The CPU checks `irq_pending` (IE & IF) between
  instructions. Dispatch takes 5 M-cycles, pushes PC and jumps to
  0040/48/50/58/60. `irq_ack` clears the IF bit.
* **HALT** waits for any pending interrupt.
* **Pause.** `pause_req` stops the CPU between instructions and raises
  `paused`. The game switch uses this.
* **Reset.** There is no boot ROM (its contents are the console maker's), so
  the boot sequence is skipped. Reset gives the state the boot ROM leaves
  behind: PC=0100, SP=FFFE, AF=01B0, BC=0013, DE=00D8, HL=014D.

## Memory map (`gb_bus`, `gb_dpram`, `gb_dma`)

| Range | Contents |
|---|---|
| 0000-3FFF | ROM bank 0 (cartridge port) |
| 4000-7FFF | switchable ROM bank |
| 8000-9FFF | VRAM, 8 KiB, dual port (PPU on port B) |
| A000-BFFF | cartridge RAM (cartridge port, `cart_addr[22]`=1) |
| C000-DFFF | work RAM, 8 KiB; E000-FDFF echoes it |
| FE00-FE9F | OAM, dual port (PPU on port B) |
| FF00-FF7F | I/O registers |
| FF80-FFFE | HRAM |
| FFFF | IE |

**Cartridge.** Bank switching uses MBC1-style registers:

* 2000-3FFF sets the ROM bank (0 acts as 1);
* 4000-5FFF sets the RAM bank;
* 0000-1FFF enables RAM with a value of xA.

`cart_addr` is `{ram_select, bank, offset}`, so the external memory sees a
flat 23-bit address.

**Access rules.**

* While the PPU draws (mode 3), the CPU cannot use VRAM.
* During OAM search and drawing (modes 2 and 3), the CPU cannot use OAM.
* While an OAM DMA runs, the CPU may only use FF00-FFFF.

A blocked read returns FF and a blocked write is dropped.

**OAM DMA.** Writing a page number to FF46 copies 160 bytes from XX00 into
OAM, one byte per M-cycle. The source reads go through the same memory map.

**I/O read bus.** Every I/O block returns FF when it is not addressed, so
the top simply ANDs their read data.

## Picture generation (`gb_ppu` and helpers)

The hardest part of the design to follow is how a line is drawn. Each line
has 456 dots, in this order:

1. **OAM search, dots 0-79 (`gb_oam_scan`).** The scan reads one OAM byte
   per dot: the Y and X of each of the 40 entries. It keeps the first ten
   sprites that cover the line and orders them by X. The smallest X comes
   first, and among equal X the lower OAM index comes first.

2. **Drawing, mode 3 (`gb_ppu`).** A fetcher state machine works in steps
   of two dots per VRAM read: tile number, low bitplane, high bitplane,
   push. Each push puts 8 background or window pixels into the pixel FIFO
   (`gb_pixel_fifo`, 16 entries).

   **The FIFO rule.** The FIFO only shifts a pixel out while it holds
   **at least 8 pixels**. This is the central trick. When the next
   sprite's X matches the output position, the pixel output stops and the
   fetcher fetches that sprite's row. The row is then mixed into the eight
   pixels at the head of the FIFO. Because those eight are always present,
   the sprite lands on the right pixels.

   **Mixing.** A sprite pixel only fills a spot that no earlier sprite has
   filled, so the sprite with the smaller X wins, as on the console. The
   sprite's "behind background" bit is kept with the pixel. Sprites that
   start left of the screen (X < 8) are mixed with their first columns
   skipped.

   **The window.** When the window starts (line at or below WY, position
   WX-7), the FIFO's background pixels are dropped and the fetcher
   restarts on the window map. Sprite pixels that are already mixed stay.

   **Fine scroll.** SCX & 7 is done by discarding pixels at the start of the
   line.

   Because of the sprite fetches, mode 3 varies in length, and H-Blank
   takes up the rest of the line.

3. **Palette step (`gb_pixel_decoder`).** The pixel leaving the FIFO goes
   through BGP, OBP0 or OBP1. Sprite colour 0 is transparent. The
   "behind" bit lets background colours 1-3 cover the sprite.

Lines 144-153 are V-Blank. `gb_ppu_regs` holds LCDC, STAT, SCY, SCX, LY,
LYC, BGP, OBP0, OBP1, WY and WX. It raises the V-Blank interrupt on entry to
line 144. It raises STAT on the rising edge of (mode 0, 1 or 2 enables, or
LY=LYC).

The PPU outputs one pixel per clock on `pix_valid/pix_x/pix_y/pix_shade`.

## Video out (`gb_vga`)

The PPU writes 2-bit shades into a 160x144 frame buffer in its own clock
domain. The VGA side has its own details:

* It runs 640x480 at 25.175 MHz: 800x525 total, with negative sync pulses
  of 96 clocks and 2 lines.
* It shows each Game Boy pixel as a 3x3 block, centred with 80 black
  columns at each side and 24 black lines at the top and bottom.
* Shade 0 is white and 3 is black.

The buffer is not synchronised to the VGA frame, so a fast-changing
picture can tear.

## Sound (`gb_apu` and voices)

The register block FF10-FF26 and the wave RAM FF30-FF3F feed four voices:

* **Two pulse voices (`gb_apu_pulse`).** They have duty, length and
  envelope; the first one also has the frequency sweep.
* **The wave voice (`gb_apu_wave`).** It plays 32 4-bit samples.
* **The noise voice (`gb_apu_noise`).** It is a 15-bit or 7-bit LFSR.

The 512 Hz frame sequencer steps through 8 ticks:

* length counters on every second tick (256 Hz);
* sweep on ticks 2 and 6 (128 Hz);
* envelope on tick 7 (64 Hz).

A write to NRx4 with bit 7 set restarts a voice. NR52 bit 7 powers the
unit down and clears its registers. Bits that cannot be read come back as
1.

**Mixer (`gb_apu_mixer`).** Each 4-bit voice output is centred as
`2*s - 15`, panned by NR51 and summed per side. Each side is then scaled by
NR50's volume + 1 and by 64, which gives signed 16-bit left, right and mono
outputs.

**DAC (`gb_dac_if`).** A phase accumulator makes a 50 kHz sample strobe.
Each sample is driven on DB15..DB0, then /CS and /L1 are pulsed low to load
the DAC's input register. LDAC is then pulsed high to move it to the
output register, so the analog output changes cleanly once per sample. The
data are two's complement.

## Joypad, timer, interrupts

* **Joypad (`gb_joypad`).** The eight buttons are active-high GPIO inputs
  `{start, select, B, A, down, up, left, right}`. They are synchronised and
  read through P1 (FF00) with its two group selects. A selected line going
  low raises the joypad interrupt.
* **Timer (`gb_timer`).** It provides DIV, TIMA, TMA and TAC. The four TAC
  rates tap divider bits 9, 3, 5 and 7. TIMA reloads from TMA and raises
  the interrupt on overflow.
* **Interrupt controller (`gb_irq_ctrl`).** It holds IF (FF0F) and IE
  (FFFF), with bits VBlank, STAT, Timer, Serial and Joypad. There is no
  serial port, so bit 3 is never requested.

## Switching games (`gb_game_switch`)

The host raises `switch_req`, which may be asynchronous. The block then:

1. waits for the current frame to end;
2. asks the CPU to pause;
3. raises `switch_ack` once it has.

While `switch_ack` is high, the CPU stays stopped, and the top hands the
memory map to the `host_*` port. Through it the host can read and write
the whole 64 KiB address space: work RAM, VRAM, OAM, HRAM, the I/O
registers and the cartridge. It can also load another game into the
external memory.

Each host access must be held for 4 clocks. A write lands once, and read
data is valid from the second clock. The normal access rules still apply,
so VRAM and OAM read as FF while the PPU draws. To copy them, clear LCDC
bit 7 first.

When the host drops `switch_req`, the block holds a 16-clock soft reset of
the whole machine, and the new game starts from 0100.

While stopped, the host can also read the CPU's registers on `cpu_pc`,
`cpu_sp`, `cpu_af`, `cpu_bc`, `cpu_de`, `cpu_hl` and `cpu_ime`. There is
no path to load a saved register set back into the CPU. Resuming a saved
game therefore starts it again from its entry point.

## Top level (`gb_top`)

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | 4.194304 MHz clock, asynchronous active-low reset |
| `clk_vga` | 25.175 MHz pixel clock |
| `buttons[7:0]` | button lines, active high |
| `switch_req`, `switch_ack` | game switch handshake |
| `host_addr[15:0]`, `host_rd`, `host_wr`, `host_wdata`, `host_rdata` | memory access while `switch_ack` is high |
| `cart_addr[22:0]`, `cart_rd`, `cart_wr`, `cart_wdata`, `cart_rdata` | external game memory; answer within 3 clocks |
| `vga_r/g/b[7:0]`, `vga_hsync_n`, `vga_vsync_n`, `vga_blank_n` | video |
| `dac_db[15:0]`, `dac_cs_n`, `dac_l1_n`, `dac_ldac` | audio DAC |
| `frame_done`, `cpu_halted` | status |
| `cpu_pc`, `cpu_sp`, `cpu_af`, `cpu_bc`, `cpu_de`, `cpu_hl`, `cpu_ime` | CPU registers, for saving state while stopped |

## Simulating

All modules import `rtl/gb_pkg.sv`, so it goes first. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/gb_pkg.sv rtl/gb_*.sv tb/gb_top_tb.sv --top gb_top_tb
./obj_dir/Vgb_top_tb
```

A single block works the same way. Give the package, the block and the
blocks it instantiates, plus its testbench. For example, `gb_cpu` needs
`gb_alu` and `gb_regfile`. Each testbench prints
`TB_RESULT checks=N failures=M`.

`gb_top_tb` runs at the default sizes. It builds a program in a 64 KiB ROM
model. The program clears VRAM, draws background, window and sprite
tiles, places a sprite by OAM DMA from an HRAM routine, sets up the STAT,
timer and joypad interrupts and a pulse voice, and reads two switched ROM
banks. It then loops reading VRAM and halting.

The testbench checks the following:

* every pixel of two frames against the expected picture;
* the handler counters and bank markers;
* a game switch in the middle of the run, which must stop right after a
  frame, hold, let the host port read HRAM and ROM and write and read back
  work RAM, restart from 0100 and draw the same two frames again;
* the frame period (70224 clocks, 59.73 fps) and the delay from a button
  press to the joypad handler (about 116 clocks).

It also counts each mechanism and fails if any count is zero: each
interrupt kind, DMA, HALT, VRAM lock, bank reads, sprite mixes, window
starts, FIFO stalls, sprite fetches, the switch, the restart, DAC loads and
VGA frames. It takes about 10 seconds with Verilator.

## How far to trust it, and where it departs

* **Testing.** The CPU was tested with a directed program and through the
  whole-system program, not with the Blargg or Mooneye test ROMs. Expect
  differences in rare timing corners, such as the HALT bug, STOP and exact
  access timing inside an M-cycle. STOP and undefined opcodes behave as
  NOP.
* **PPU timing.** The PPU matches the console's structure: OAM search, the
  FIFO with the at-least-8 rule, and sprite fetch stalls. Its dot counts
  inside mode 3 are this design's own: mode 3 lasts 172 dots or more and
  reached 290 dots in the worst scenes tested (the console's worst case is
  289), so games that time writes to the exact dot can differ.
* **Picture check.** The PPU testbench compares whole frames against an
  independent reference renderer, with random tiles, scrolls, window
  positions and sprites.
* **Departures from the console.** The fourth ALU flag is the console's N
  (subtract) flag. Work RAM is a plain 8 KiB with no banking. OAM is at
  FE00-FE9F.
* **Not built.** The analog parts (DAC chip, speaker), the host processor
  and its software, the SDRAM and its controller, the flash storage and
  the controller reading are outside the RTL. The top brings out ports
  where they connect.
* **Warnings.** The lint warnings that remain are unused outputs, such as
  a RAM's second read port left open for WRAM/HRAM. They are also width
  extensions of loop constants.

## Files

`rtl/` holds one module per file, plus `gb_pkg.sv` with the shared enums
(ALU operations, PPU modes, register indices), the flag bit numbers and
the FIFO pixel struct. `tb/<module>_tb.sv` is the testbench for each
module.
