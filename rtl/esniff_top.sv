// esniff_top: user-I/O hardware of the E-Sniff standalone Ethernet sniffer.
//
// The sniffer captures Ethernet frames with a DM9000A MAC/PHY, analyses them
// in a soft processor and shows one line of text per packet on a VGA monitor,
// taking commands ("start", "stop", "proto tcp", ...) from a PS/2 keyboard.
// To leave the processor free for packet capture, screen refresh and keyboard
// handling are done by dedicated hardware; that hardware is this module:
//
//   PS/2 keyboard --> ps2_keyboard --(input line)--> video_mem --> vga_driver --> VGA
//                          |  enter_irq                ^  text ring / offset
//                          v                           |
//                       processor bus  <---------------+   (ports of this module)
//
// The processor, the Ethernet controller, SDRAM/SRAM packet memory and flash
// are outside the FPGA fabric written here; their connections to these blocks
// are the ports below. The processor side is a simple memory-mapped slave
// (cpu_*, one-clock read latency, map in esniff_pkg), a keyboard command port
// (kbd_cmd_*) and status/interrupt lines.
//
// One clock domain (100 MHz, the processor clock the description names); the
// VGA pixel rate is clk / PIX_DIV.
module esniff_top
  import esniff_pkg::*;
#(
  parameter int unsigned PIX_DIV        = 4,
  parameter int unsigned IDLE_CYCLES    = 20_000,
  parameter int unsigned INHIBIT_CYCLES = 12_000,
  parameter int unsigned WAIT_CYCLES    = 2_000_000,
  parameter int unsigned DETECT_CYCLES  = 100_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // PS/2 connector (open collector: *_oe high drives the line low)
  input  logic              ps2_clk_i,
  input  logic              ps2_data_i,
  output logic              ps2_clk_oe,
  output logic              ps2_data_oe,
  // processor: video memory slave
  input  logic              cpu_cs,
  input  logic              cpu_we,
  input  logic [CPU_AW-1:0] cpu_addr,
  input  logic [7:0]        cpu_wdata,
  output logic [7:0]        cpu_rdata,
  // processor: keyboard command, status and interrupt
  input  logic              kbd_cmd_valid,
  input  logic [7:0]        kbd_cmd_data,
  output logic              kbd_cmd_ready,
  output logic              kbd_cmd_done,
  output logic              kbd_cmd_err,
  output logic              kbd_irq,
  output logic              kbd_present,
  output logic              auto_start,
  output logic              kbd_frame_err,
  output logic [ROW_W-1:0]  scroll_offset,
  // VGA connector / video DAC
  output logic              vga_pix_stb,
  output logic              vga_hsync_n,
  output logic              vga_vsync_n,
  output logic              vga_blank_n,
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic              vga_frame_start
);

  logic             line_we, line_clr;
  logic [COL_W-1:0] line_col;
  logic [7:0]       line_char;
  logic             mem_en;
  logic [ROW_W-1:0] mem_row;
  logic [COL_W-1:0] mem_col;
  logic [7:0]       mem_char;

  ps2_keyboard #(
    .IDLE_CYCLES   (IDLE_CYCLES),
    .INHIBIT_CYCLES(INHIBIT_CYCLES),
    .WAIT_CYCLES   (WAIT_CYCLES),
    .DETECT_CYCLES (DETECT_CYCLES)
  ) u_kbd (
    .clk, .rst_n,
    .ps2_clk_i, .ps2_data_i, .ps2_clk_oe, .ps2_data_oe,
    .cmd_valid  (kbd_cmd_valid),
    .cmd_data   (kbd_cmd_data),
    .cmd_ready  (kbd_cmd_ready),
    .cmd_done   (kbd_cmd_done),
    .cmd_err    (kbd_cmd_err),
    .enter_irq  (kbd_irq),
    .kbd_present(kbd_present),
    .auto_start (auto_start),
    .frame_err  (kbd_frame_err),
    .line_we, .line_col, .line_char, .line_clr
  );

  video_mem u_vmem (
    .clk, .rst_n,
    .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .vga_en      (mem_en),
    .vga_row     (mem_row),
    .vga_col     (mem_col),
    .vga_char    (mem_char),
    .kbd_we      (line_we),
    .kbd_col     (line_col),
    .kbd_char    (line_char),
    .line_cleared(line_clr),
    .offset      (scroll_offset)
  );

  vga_driver #(.PIX_DIV(PIX_DIV)) u_vga (
    .clk, .rst_n,
    .mem_en, .mem_row, .mem_col, .mem_char,
    .pix_stb    (vga_pix_stb),
    .hsync_n    (vga_hsync_n),
    .vsync_n    (vga_vsync_n),
    .blank_n    (vga_blank_n),
    .vga_r, .vga_g, .vga_b,
    .frame_start(vga_frame_start)
  );

endmodule
