# E-Sniff user-I/O hardware: PS/2 keyboard, scrolling text memory and VGA text display

E-Sniff is a standalone Ethernet packet sniffer built around an FPGA board
(Cyclone II, DM9000A 10/100 MAC/PHY, VGA, PS/2). Frames are captured by the
Ethernet controller in promiscuous mode, analysed by a soft processor, and
described one line per packet on a 640x480 monitor; the user types commands
such as `start`, `stop`, `proto tcp` or `src ip 10.0.0.0 255.0.0.0` on a PS/2
keyboard.

Capturing a 100 Mbit/s stream leaves the processor little time for anything
else, so the two jobs that never stop — refreshing the screen and following
the keyboard — are done by dedicated hardware. The processor only writes ASCII
codes into a text memory and is interrupted once per finished command line.
This repository is the RTL of that hardware:

```
 PS/2 keyboard ──► ps2_keyboard ──(input line, 1 char/clock)──► video_mem ──► vga_driver ──► VGA DAC
                     │  ▲ enter_irq, kbd_present, auto_start       ▲ text ring, line offset
                     ▼  │ kbd_cmd_*                                │ cpu_* (read/write/scroll/clear)
                 ───────┴──────────── processor (not included) ────┘
```

`esniff_top` wires the three blocks together and brings the processor-side
signals and the board pins out as ports. The processor, the Ethernet
controller, SRAM/SDRAM, flash, the 16x2 LCD, the LEDs and the video DAC are
board parts or vendor IP and are not part of this RTL.

## The text memory and one-write scrolling (`video_mem`)

The screen is an 80x30 grid of 8x16-pixel character cells. Rows 0–28 scroll;
row 29 is the keyboard input line.

**Text ring.** The scrolling rows live in a 4096-byte dual-port RAM organised
as 32 physical rows of 128 bytes (80 used). Every access — from the processor
and from the display — goes through a 5-bit *line offset*:

```
physical row = (logical row + offset) mod 32
```

Writing the scroll register adds one to the offset. In that single clock
every line on screen moves up one row, the old top line disappears, and
logical row 28 (the bottom) now maps to a physical row the processor
overwrites with the new line. Printing a packet line therefore costs one
scroll write plus 80 character writes, never a redraw of the screen. The
ring has 32 rows while 29 are shown, so the three rows below the screen are
spare; the hardware does not blank the new bottom line — the processor writes
all 80 columns.

**Keyboard line.** The input line is 80 bytes of flip-flops, written only by
the keyboard driver, read by the processor and by the display. It has an
asynchronous reset that sets every character to 0x20 (space). That reset is
asserted by the system reset and, for one clock, by a processor write to the
clear register; the same strobe (`line_cleared`) tells the keyboard driver to
return its cursor to column 0. Because the keyboard driver and the processor
have separate ports, they never contend for an address bus.

**Processor register map** (`cpu_addr`, 13 bits, byte data, one clock read latency):

| address          | access | meaning                                          |
|------------------|--------|--------------------------------------------------|
| `0x0000–0x0FFF`  | R/W    | text ring: `addr[11:7]` logical row, `addr[6:0]` column |
| `0x1000–0x104F`  | R      | keyboard input line, columns 0–79                 |
| `0x1080`         | R/W    | line offset                                       |
| `0x1081`         | W      | scroll up one line (offset + 1)                   |
| `0x1082`         | W      | clear the input line to spaces, unlock it         |

## The VGA text driver (`vga_driver`, `font_rom`)

The driver produces standard 640x480 timing (800x525 pixels per frame,
16/96/48-pixel horizontal and 10/2/33-line vertical porch/sync/porch, sync
pulses active low). A clock enable fires every `PIX_DIV` = 4 clocks, so from
the 100 MHz system clock the pixel rate is 25 MHz and the refresh 59.5 Hz.

Each pixel passes a three-stage pipeline, all stages advancing on the pixel
enable:

1. the counters address video memory with `row = v/16`, `col = h/8`;
2. the returned ASCII code addresses the font ROM;
3. the glyph bit for `(h mod 8, v mod 16)` is selected and registered
   together with the syncs and blanking.

The sync and blank signals travel through the same three registers, so the
picture is aligned with the syncs; all outputs lag the counters by three
pixels. `pix_stb` marks the clock in which a new pixel appears on the outputs
and `frame_start` the first pixel of each frame.

The font ROM holds a 5x8 dot-matrix glyph per 7-bit code, 40 bits per entry,
column-major: bits `[39:32]` are the leftmost column, and bit 0 of each column
byte is the top row. In an 8x16 cell the glyph occupies columns 0–4, and each
glyph row is shown on two scan lines. Codes 0x00–0x1F and 0x7F are blank. The
table is `rtl/font5x8.hex` (128 lines of 10 hex digits). Text is white on
black (10-bit colour per channel); both colours are parameters.

## The keyboard driver (`ps2_keyboard`, `ps2_rx`, `ps2_tx`, `ps2_keymap`)

**Receiving.** `ps2_rx` synchronises the PS/2 clock and data lines and shifts
one bit in on every falling clock edge. After 11 bits the frame is checked:
start bit 0, odd parity over data and parity, stop bit 1. A good frame gives a
one-clock `data_valid`; a bad one gives `frame_err` and is dropped, so the
keystroke is lost rather than garbled. A frame interrupted for more than
200 µs is discarded so the receiver resynchronises.

**Translating.** `ps2_keymap` tracks the break prefix (0xF0), the extended
prefix (0xE0) and both Shift keys, and turns make codes of scan code set 2
(US layout) into ASCII: letters, digits, space, the punctuation used for IP
and MAC addresses and netmasks (`. / - : ;` and the rest of the main block),
the keypad digits, Enter (0x0D) and Backspace (0x08). Releases and keys
without a character produce nothing.

**Editing the line.** Each printable character is written at the cursor (one
write strobe, one clock) and the cursor advances; characters beyond column 79
are dropped. Backspace moves the cursor back and writes a space. Enter raises
`enter_irq` for exactly two clocks and locks the line, so what the processor
reads cannot change under it. The processor reads the line at
`0x1000–0x104F`, then writes `0x1082`, which clears the line and unlocks it.

**Sending.** `ps2_tx` implements the host-to-device direction: it holds the
clock low for 120 µs, pulls data low as the start bit, releases the clock, and
puts data bits, odd parity and the stop bit on the line on each falling edge
of the keyboard's clock, then checks the keyboard's acknowledge bit. The
processor uses it through `kbd_cmd_valid/ready` (for instance to set the
keyboard LEDs with 0xED); `kbd_cmd_done` pulses at the end, with `kbd_cmd_err`
set if the keyboard did not answer within 20 ms or did not acknowledge.

**Boot-time keyboard check.** After reset the driver sends the keyboard reset
command 0xFF. A keyboard answers 0xFA and, after its self test, 0xAA. If 0xAA
arrives within 1 s, `kbd_present` goes high. If the transmission fails (no
keyboard clocks the byte in) or the time runs out, `auto_start` goes high:
the sniffer is meant to start capturing with default settings when no
keyboard is attached. Both flags hold until the next reset. Keystrokes are
accepted only after the check.

## Top-level ports (`esniff_top`)

| group | ports |
|-------|-------|
| clock, reset | `clk` (100 MHz), `rst_n` (asynchronous, active low) |
| PS/2 connector | `ps2_clk_i`, `ps2_data_i`; `ps2_clk_oe`, `ps2_data_oe` (high = pull the line low; drive the pins open-collector) |
| processor: text memory | `cpu_cs`, `cpu_we`, `cpu_addr[12:0]`, `cpu_wdata[7:0]`, `cpu_rdata[7:0]` |
| processor: keyboard | `kbd_cmd_valid`, `kbd_cmd_data[7:0]`, `kbd_cmd_ready`, `kbd_cmd_done`, `kbd_cmd_err`, `kbd_irq`, `kbd_present`, `auto_start`, `kbd_frame_err`, `scroll_offset[4:0]` |
| VGA / video DAC | `vga_pix_stb`, `vga_hsync_n`, `vga_vsync_n`, `vga_blank_n`, `vga_r/g/b[9:0]`, `vga_frame_start` |

Parameters (defaults for a 100 MHz clock): `PIX_DIV` = 4, `IDLE_CYCLES` =
20,000 (receive time-out), `INHIBIT_CYCLES` = 12,000 (send: clock inhibit),
`WAIT_CYCLES` = 2,000,000 (send: time-out), `DETECT_CYCLES` = 100,000,000
(boot check). Scale them together if the clock changes.

## What follows the design description and what is this implementation's choice

Taken from the description: hardware VGA driver with Hsync/Vsync at 640x480,
60 Hz; text-only display with ASCII codes in memory and a font ROM in the VGA
hardware; fixed-width characters; dual-port video memory addressed with a
line offset so that adding one scrolls the screen in one clock; a separate
one-line keyboard partition with an asynchronous reset to 0x20, readable by
processor and display, written by the keyboard driver; PS/2 receive by shift
register with start/stop/parity error detection and dropped keystrokes on
error; sending arbitrary codes to the keyboard; translation to ASCII
including punctuation for addresses; one character per clock into video
memory; a two-clock interrupt pulse on Enter; a keyboard check at boot that
tells the processor to start automatically when no keyboard is present; a
100 MHz clock.

Chosen here, where the description is silent: the standard VGA timing numbers
and a 59.5 Hz refresh from 100 MHz / 4; 8x16 cells and the 5x8 font; the
80x30 grid with the input line on the bottom row; the 32-row ring and the
register map; reading "20" as hexadecimal 0x20 (space); the line lock after
Enter and its release by the clear register; Backspace; the 80-character
limit; the scan code set and layout; the boot check by reset command and 0xAA
self-test reply; time-outs; the valid/ready command port; a plain
memory-mapped processor port instead of a specific vendor bus.

Not built: the processor and all of its software (packet copy, protocol and
address filters, command interpreter, interrupt priorities), the Ethernet
controller, packet memory, flash, SD card, LCD and LEDs. In particular the
description's packet-rate budgets (a 1536-byte frame every 150 µs, a minimum
frame every 2 µs) concern that software and cannot be evaluated on this RTL.
The DAC pixel clock for the board's video DAC is not generated; `vga_pix_stb`
marks pixel boundaries.

## Files

| file | contents |
|------|----------|
| `rtl/esniff_pkg.sv` | timing, geometry, ASCII and PS/2 constants, register map |
| `rtl/esniff_top.sv` | top level |
| `rtl/video_mem.sv` | text ring, line offset, keyboard line |
| `rtl/vga_driver.sv`, `rtl/font_rom.sv`, `rtl/font5x8.hex` | display |
| `rtl/ps2_keyboard.sv`, `rtl/ps2_rx.sv`, `rtl/ps2_tx.sv`, `rtl/ps2_keymap.sv` | keyboard |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ps2_dev_model.sv` | behavioural PS/2 keyboard used by the testbenches |

## Verification

Every testbench compares the block against values it works out on its own and
ends with a line `TB_RESULT checks=N failures=M`.

* `tb_ps2_rx`: random bytes from a keyboard model; frames with bad start,
  parity and stop bits rejected; resynchronisation after an aborted frame.
* `tb_ps2_tx`: bytes and parity as seen by the keyboard model, acknowledge,
  exact clock-inhibit length, time-out with no keyboard.
* `tb_ps2_keymap`: a table of keys with and without either Shift, releases,
  the extended prefix.
* `tb_ps2_keyboard`: boot check with and without a keyboard, typing, Shift,
  Backspace, a corrupted frame, the two-clock interrupt, the line lock and
  clear, the 80-character limit, commands to the keyboard.
* `tb_video_mem`: processor and display reads against a model of the ring,
  scrolling, offset wrap, the keyboard line and its clear; printing one
  packet line (scroll plus 80 back-to-back writes) takes 81 clocks, inside
  the budget of about 100 clocks per line.
* `tb_font_rom`: glyph patterns, blank control codes, latency.
* `tb_vga_driver`: two full frames at the default pixel rate, every pixel,
  sync and blank checked against a character pattern, frame period
  1,680,000 clocks.
* `tb_esniff_top`: the whole design at its default parameters with real
  PS/2 timing: keyboard detection at boot, the user types `start` (with a
  typo, a Backspace and a corrupted frame), the Enter interrupt, the processor
  reads and clears the line, prints two scrolled lines and sends a keyboard
  command, and a full VGA frame is compared pixel by pixel with the expected
  screen; then a reset without keyboard must raise `auto_start`. It counts
  each of these events and fails if one never happens. About 7 million
  clocks, a few seconds of simulation.

Run a testbench with plain Verilator from the repository root (the font file
is read by the relative path `rtl/font5x8.hex`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_esniff_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/esniff_pkg.sv tb/tb_esniff_top.sv
obj_dir/Vtb_esniff_top
```

Simulators with two-state variables start unreset signals at random values;
all state in the RTL has a reset except the RAM contents, which the processor
must write before they are shown.
