// font_rom: character glyph ROM of the VGA text driver.
//
// Holds one fixed-width glyph per 7-bit ASCII code, so that the display can
// turn the character code fetched from video memory into pixels. Keeping the
// font in a ROM inside the VGA hardware follows the design description; the
// glyph format is this design's own choice: a 5x8 dot matrix stored column by
// column, 40 bits per code. Bits [39:32] are column 0 (leftmost) and bit 0 of
// each column byte is the top pixel row. Codes 0x00-0x1F and 0x7F are blank.
// The contents come from font5x8.hex (128 lines of 10 hex digits).
//
// Interface: addr is the ASCII code (bit 7 ignored); glyph is the registered
// ROM word, valid one clock after a cycle with en high (synchronous ROM, maps
// to one block RAM).
module font_rom #(
  parameter string FONT_FILE = "rtl/font5x8.hex"
) (
  input  logic        clk,
  input  logic        en,
  input  logic [6:0]  addr,
  output logic [39:0] glyph
);

  logic [39:0] rom [128];

  initial $readmemh(FONT_FILE, rom);

  always_ff @(posedge clk) begin
    if (en) glyph <= rom[addr];
  end

endmodule
