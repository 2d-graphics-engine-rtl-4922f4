// char_rom: 8x8 character glyph ROM for the character drawing operation.
//
// How it works: 128 words of 64 bits, one per 7-bit ASCII code. Each word is
// a glyph, row 0 (top) in bits 63:56 down to row 7 in bits 7:0, and within a
// row the leftmost pixel in the most significant bit; a 1 is a lit pixel.
// Only upper- and lower-case letters hold glyphs, every other code reads as
// all zeros, which draws nothing. The glyph of 'A' is the one the engine's
// documentation shows (rows 38 44 44 44 7C 44 44 00 in hex); the other 51
// glyphs are this design's own 5x7 letter shapes placed in columns 1-5 and
// rows 0-6 in the same way. The contents are loaded from rtl/char_font.hex.
//
// Interface and timing: a synchronous block-RAM style read. When i_en is high
// at a clock edge, o_data shows the glyph of i_addr from the next cycle on
// and holds it until the next enabled read.
module char_rom #(
  parameter int unsigned AW = 7,
  parameter int unsigned DW = 64,
  parameter string       INIT_FILE = "rtl/char_font.hex"
) (
  input  logic          clk,
  input  logic          i_en,
  input  logic [AW-1:0] i_addr,
  output logic [DW-1:0] o_data
);

  logic [DW-1:0] rom [2**AW];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (i_en) o_data <= rom[i_addr];
  end

endmodule
