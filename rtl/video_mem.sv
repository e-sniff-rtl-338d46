// video_mem: ASCII "video" memory shared by the processor, the keyboard driver
// and the VGA text driver.
//
// Two partitions, as the design description lays them out:
//  * The text ring: a dual-port RAM of ASCII codes, written and read by the
//    processor and read by the VGA driver. Rows are addressed through a line
//    offset: physical row = logical row + offset (modulo the ring size). One
//    write to the scroll register adds one to the offset, which moves every
//    line on screen up by one row in a single clock; the processor then only
//    writes the new bottom line instead of redrawing the screen.
//  * The keyboard line: one line of LINE_LEN characters written by the PS/2
//    keyboard driver, readable by the processor and the VGA driver. It is kept
//    in flip-flops because it has an asynchronous reset that sets every
//    character to 0x20 (space); that reset is asserted by the system reset and
//    by a processor write to the clear register.
//
// Own choices: a ring of 2**ROW_W rows with a column stride of 2**COL_W
// (4096 bytes, so the offset wraps by itself), the VGA row KBD_ROW showing the
// keyboard line, and the register map in esniff_pkg. The processor and the
// keyboard driver have separate ports, so they never contend for an address
// bus.
//
// Timing: all reads have one clock of latency (cpu_rdata after a cycle with
// cpu_cs high and cpu_we low; vga_char after a cycle with vga_en high).
// Writes take effect at the clock edge. The line_cleared pulse is high for the
// cycle in which a processor clear is applied.
module video_mem
  import esniff_pkg::*;
#(
  parameter int unsigned ROWS_W      = ROW_W,       // ring rows = 2**ROWS_W
  parameter int unsigned COLS_W      = COL_W,       // column stride = 2**COLS_W
  parameter int unsigned LINE_CHARS  = LINE_LEN,    // keyboard line length
  parameter int unsigned SCREEN_ROWS = SCROLL_ROWS, // rows shown from the ring
  parameter int unsigned INPUT_ROW   = KBD_ROW      // screen row of the keyboard line
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor port
  input  logic                     cpu_cs,
  input  logic                     cpu_we,
  input  logic [CPU_AW-1:0]        cpu_addr,
  input  logic [7:0]               cpu_wdata,
  output logic [7:0]               cpu_rdata,
  // VGA read port
  input  logic                     vga_en,
  input  logic [ROWS_W-1:0]        vga_row,
  input  logic [COLS_W-1:0]        vga_col,
  output logic [7:0]               vga_char,
  // keyboard driver write port
  input  logic                     kbd_we,
  input  logic [COLS_W-1:0]        kbd_col,
  input  logic [7:0]               kbd_char,
  output logic                     line_cleared,
  // current scroll offset, for status
  output logic [ROWS_W-1:0]        offset
);

  localparam int unsigned DEPTH = 2 ** (ROWS_W + COLS_W);

  logic [7:0] ring [DEPTH];
  logic [7:0] line [LINE_CHARS];

  // ---------------- processor address decode ----------------
  logic              cpu_text, cpu_ctrl;
  logic [ROWS_W-1:0] cpu_row;
  logic [COLS_W-1:0] cpu_col;
  logic [ROWS_W-1:0] cpu_prow;

  assign cpu_text = ~cpu_addr[CPU_AW-1];
  assign cpu_ctrl =  cpu_addr[CPU_AW-1];
  assign cpu_row  = cpu_addr[COLS_W +: ROWS_W];
  assign cpu_col  = cpu_addr[COLS_W-1:0];
  assign cpu_prow = cpu_row + offset;

  // ---------------- line offset ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset <= '0;
    end else if (cpu_cs && cpu_we && cpu_ctrl) begin
      if (cpu_addr == REG_OFFSET)      offset <= cpu_wdata[ROWS_W-1:0];
      else if (cpu_addr == REG_SCROLL) offset <= offset + 1'b1;
    end
  end

  // ---------------- text ring: write port and two read ports ----------
  always_ff @(posedge clk) begin
    if (cpu_cs && cpu_we && cpu_text) ring[{cpu_prow, cpu_col}] <= cpu_wdata;
  end

  logic [7:0] cpu_ring_q;
  always_ff @(posedge clk) begin
    if (cpu_cs && !cpu_we && cpu_text) cpu_ring_q <= ring[{cpu_prow, cpu_col}];
  end

  logic [ROWS_W-1:0] vga_prow;
  logic [7:0]        vga_ring_q;
  assign vga_prow = vga_row + offset;
  always_ff @(posedge clk) begin
    if (vga_en) vga_ring_q <= ring[{vga_prow, vga_col}];
  end

  // ---------------- keyboard line with asynchronous clear ----------
  logic clr_q;        // registered processor clear request
  logic line_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clr_q <= 1'b0;
    else        clr_q <= cpu_cs && cpu_we && (cpu_addr == REG_CLEAR);
  end
  assign line_rst_n   = rst_n & ~clr_q;
  assign line_cleared = clr_q;

  always_ff @(posedge clk or negedge line_rst_n) begin
    if (!line_rst_n) begin
      for (int i = 0; i < LINE_CHARS; i++) line[i] <= ASCII_SPACE;
    end else if (kbd_we && (kbd_col < COLS_W'(LINE_CHARS))) begin
      line[kbd_col] <= kbd_char;
    end
  end

  // ---------------- read multiplexers ----------------
  function automatic logic [7:0] line_at(input logic [COLS_W-1:0] c);
    return (c < COLS_W'(LINE_CHARS)) ? line[c] : ASCII_SPACE;
  endfunction

  logic [7:0] cpu_line_q;
  logic       cpu_sel_text;
  always_ff @(posedge clk) begin
    if (cpu_cs && !cpu_we) begin
      cpu_sel_text <= cpu_text;
      cpu_line_q   <= cpu_addr[COLS_W] ? 8'(offset) : line_at(cpu_col);
    end
  end
  assign cpu_rdata = cpu_sel_text ? cpu_ring_q : cpu_line_q;

  logic [7:0] vga_line_q;
  logic       vga_sel;     // 0: ring, 1: keyboard line, 2: blank
  logic       vga_blank;
  always_ff @(posedge clk) begin
    if (vga_en) begin
      vga_sel    <= (vga_row == ROWS_W'(INPUT_ROW));
      vga_blank  <= (vga_row >= ROWS_W'(SCREEN_ROWS)) && (vga_row != ROWS_W'(INPUT_ROW));
      vga_line_q <= line_at(vga_col);
    end
  end
  assign vga_char = vga_blank ? ASCII_SPACE : (vga_sel ? vga_line_q : vga_ring_q);

endmodule
