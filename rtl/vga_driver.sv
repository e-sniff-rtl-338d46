// vga_driver: 640x480 60 Hz VGA text display driver.
//
// Generates the horizontal and vertical sync pulses for a 640x480 screen and
// the pixel colour. Because the screen shows only text, the driver works out
// for each pixel which character cell it lies in, fetches that cell's ASCII
// code from video memory, looks the code up in its font ROM and outputs the
// glyph's dot for the pixel. All of this is what the design description asks
// of the VGA driver; the refresh never depends on what the processor does.
//
// How it works: a pixel strobe (pix_en) fires every PIX_DIV clocks, giving a
// 25 MHz pixel rate from the 100 MHz system clock. On each strobe the
// horizontal and vertical counters advance and a three-stage pipeline moves:
//   stage 1 reads video memory at (row = v/16, col = h/8),
//   stage 2 reads the font ROM with the returned code,
//   stage 3 selects the dot and registers colour, syncs and blank together.
// Sync and blank travel through the same stages, so outputs stay aligned;
// they lag the counters by three pixels. The 5x8 glyph sits in the left five
// columns of an 8x16 cell, each glyph row shown on two scan lines.
//
// Own choices: the standard 640x480 timing (800x525 pixels per frame,
// negative sync pulses), the 8x16 cell, white text on black, 10-bit colour
// outputs of the board's video DAC, and the clock-enable scheme above.
// Bit 7 of a character code is not used: the font covers 7-bit ASCII.
module vga_driver
  import esniff_pkg::*;
#(
  parameter int unsigned PIX_DIV = 4,            // system clocks per pixel
  parameter logic [29:0] FG_RGB  = 30'h3FFF_FFFF, // text colour {R,G,B}
  parameter logic [29:0] BG_RGB  = 30'h0,         // background colour
  parameter string       FONT_FILE = "rtl/font5x8.hex"
) (
  input  logic             clk,
  input  logic             rst_n,
  // video memory read port (one clock latency)
  output logic             mem_en,
  output logic [ROW_W-1:0] mem_row,
  output logic [COL_W-1:0] mem_col,
  input  logic [7:0]       mem_char,
  // to the video DAC / connector
  output logic             pix_stb,   // high for one clock per pixel
  output logic             hsync_n,
  output logic             vsync_n,
  output logic             blank_n,   // high in the visible 640x480 area
  output logic [9:0]       vga_r,
  output logic [9:0]       vga_g,
  output logic [9:0]       vga_b,
  output logic             frame_start // one pulse at the first pixel of a frame
);

  // ---------------- pixel strobe ----------------
  localparam int unsigned DW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;
  logic [DW-1:0] div_q;
  logic          pix_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          div_q <= '0;
    else if (div_q == DW'(PIX_DIV - 1))  div_q <= '0;
    else                                 div_q <= div_q + 1'b1;
  end
  assign pix_en = (div_q == DW'(PIX_DIV - 1));

  // ---------------- counters ----------------
  logic [9:0] h_q, v_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q <= '0;
      v_q <= '0;
    end else if (pix_en) begin
      if (h_q == 10'(H_TOTAL - 1)) begin
        h_q <= '0;
        v_q <= (v_q == 10'(V_TOTAL - 1)) ? '0 : v_q + 1'b1;
      end else begin
        h_q <= h_q + 1'b1;
      end
    end
  end

  typedef struct packed {
    logic       hs;      // active-high sync in the pipeline
    logic       vs;
    logic       vis;
    logic       first;
    logic [2:0] xb;      // x within the cell
    logic [3:0] yb;      // y within the cell
  } pix_t;

  pix_t s0, s1, s2;
  always_comb begin
    s0.hs    = (h_q >= 10'(H_VISIBLE + H_FRONT)) && (h_q < 10'(H_VISIBLE + H_FRONT + H_SYNC));
    s0.vs    = (v_q >= 10'(V_VISIBLE + V_FRONT)) && (v_q < 10'(V_VISIBLE + V_FRONT + V_SYNC));
    s0.vis   = (h_q < 10'(H_VISIBLE)) && (v_q < 10'(V_VISIBLE));
    s0.first = (h_q == '0) && (v_q == '0);
    s0.xb    = h_q[2:0];
    s0.yb    = v_q[3:0];
  end

  // stage 1: video memory address
  assign mem_en  = pix_en;
  assign mem_row = v_q[8:4];
  assign mem_col = h_q[9:3];

  // stage 2: font ROM lookup of the returned code
  logic [39:0] glyph;
  font_rom #(.FONT_FILE(FONT_FILE)) u_font (
    .clk  (clk),
    .en   (pix_en),
    .addr (mem_char[6:0]),
    .glyph(glyph)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else if (pix_en) begin
      s1 <= s0;
      s2 <= s1;
    end
  end

  // stage 3: dot select and output registers
  logic dot;
  always_comb begin
    dot = 1'b0;
    if (s2.xb < 3'd5) dot = glyph[8 * (4 - 32'(s2.xb)) + 32'(s2.yb[3:1])];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      blank_n     <= 1'b0;
      frame_start <= 1'b0;
      {vga_r, vga_g, vga_b} <= '0;
    end else begin
      frame_start <= pix_en && s2.first;
      if (pix_en) begin
        hsync_n <= ~s2.hs;
        vsync_n <= ~s2.vs;
        blank_n <=  s2.vis;
        {vga_r, vga_g, vga_b} <= !s2.vis ? 30'h0 : (dot ? FG_RGB : BG_RGB);
      end
    end
  end

  // the outputs change one clock after pix_en; the strobe marks that clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pix_stb <= 1'b0;
    else        pix_stb <= pix_en;
  end

endmodule
