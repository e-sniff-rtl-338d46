// esniff_pkg: constants and types shared by the E-Sniff user-I/O hardware.
//
// The sniffer's FPGA holds three custom peripherals next to a soft processor:
// a PS/2 keyboard driver, an ASCII "video" memory and a 640x480 VGA text
// driver. This package holds the screen geometry, the VGA timing, the ASCII
// codes the hardware treats specially and the processor-side register map of
// the video memory.
//
// 640x480 at 60 Hz and the fixed-width character cell follow the design
// description. The timing numbers are the standard 640x480 industry timing
// (25 MHz pixel rate); the 8x16 cell, the 80x30 text grid, the 32-row scroll
// ring and the register map are this design's own choices.
package esniff_pkg;

  // ---------------- VGA 640x480 @ 60 Hz timing, in pixels / lines ----------
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_VISIBLE + H_FRONT + H_SYNC + H_BACK; // 800
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_VISIBLE + V_FRONT + V_SYNC + V_BACK; // 525

  // ---------------- Text geometry -------------------------------------------
  localparam int unsigned CHAR_W      = 8;    // pixels per character cell, x
  localparam int unsigned CHAR_H      = 16;   // pixels per character cell, y
  localparam int unsigned TEXT_COLS   = H_VISIBLE / CHAR_W;  // 80
  localparam int unsigned TEXT_ROWS   = V_VISIBLE / CHAR_H;  // 30 screen rows
  localparam int unsigned SCROLL_ROWS = TEXT_ROWS - 1;       // 29 scrolling rows
  localparam int unsigned KBD_ROW     = TEXT_ROWS - 1;       // bottom row = input line
  localparam int unsigned ROW_W       = 5;    // bits of a row number (32-row ring)
  localparam int unsigned COL_W       = 7;    // bits of a column number (stride 128)
  localparam int unsigned LINE_LEN    = TEXT_COLS;           // keyboard line length

  typedef logic [ROW_W-1:0] row_t;
  typedef logic [COL_W-1:0] col_t;
  typedef logic [7:0]       ascii_t;

  // ---------------- ASCII codes ---------------------------------------------
  localparam ascii_t ASCII_SPACE = 8'h20;
  localparam ascii_t ASCII_CR    = 8'h0D;   // Enter
  localparam ascii_t ASCII_BS    = 8'h08;   // Backspace

  // ---------------- Processor register map of the video memory -----------
  // cpu_addr[12] = 0 : text ring,   cpu_addr[11:7] = logical row, [6:0] = column
  // cpu_addr[12] = 1 : control page
  //   0x1000..0x104F  keyboard input line, read only
  //   0x1080          line offset register, read/write
  //   0x1081          write: scroll up one line (offset <= offset + 1)
  //   0x1082          write: clear the keyboard line to spaces
  localparam int unsigned CPU_AW = 13;
  localparam logic [CPU_AW-1:0] REG_OFFSET = 13'h1080;
  localparam logic [CPU_AW-1:0] REG_SCROLL = 13'h1081;
  localparam logic [CPU_AW-1:0] REG_CLEAR  = 13'h1082;

  // ---------------- PS/2 keyboard commands / responses ----------------------
  localparam logic [7:0] PS2_CMD_RESET = 8'hFF;
  localparam logic [7:0] PS2_ACK       = 8'hFA;
  localparam logic [7:0] PS2_BAT_OK    = 8'hAA;
  localparam logic [7:0] PS2_BREAK     = 8'hF0;
  localparam logic [7:0] PS2_EXTENDED  = 8'hE0;

endpackage
