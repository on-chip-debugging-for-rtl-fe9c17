// font_rom: 8x16 bitmap font for 7-bit character codes, 16 bytes per character,
// one byte per pixel row with the most significant bit as the leftmost pixel.
// Address {code[6:0], row[3:0]}; synchronous read, one clock of latency. The
// contents are loaded from INIT_FILE. The default table holds the hex digits
// and the letters and punctuation the debug report uses (5x7 dot shapes drawn
// in columns 1..5 of the cell, every dot row doubled to fill rows 1..14); other
// codes, including the space, are blank.
module font_rom #(
  parameter string INIT_FILE = "rtl/font_rom.hex"
) (
  input  logic        clk,
  input  logic [10:0] addr,
  output logic [7:0]  data
);
  logic [7:0] rom [2048];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) data <= rom[addr];
endmodule
