// char_gen: character generator. The screen is a grid of 8x16-pixel cells,
// 128 columns by 48 rows at 1024x768. From the pixel position it forms the
// character-memory address {row = y[9:4], column[5:0] = x[8:3]} (the same
// address goes to both character memories), remembers for one clock which
// memory holds the column (x[9]) and which pixel row of the cell is drawn
// (y[3:0]), and then forms the font-ROM address {character code, pixel row}.
// Timing: mem_raddr is combinational from x, y; font_addr is valid one clock
// later, when the character memories return their data.
module char_gen (
  input  logic        clk,
  input  logic [10:0] x,
  input  logic [9:0]  y,
  output logic [11:0] mem_raddr,
  input  logic [6:0]  rdata_l,
  input  logic [6:0]  rdata_r,
  output logic [10:0] font_addr
);
  logic       right_d;
  logic [3:0] cell_row_d;
  logic [6:0] code;

  assign mem_raddr = {y[9:4], x[8:3]};

  always_ff @(posedge clk) begin
    right_d    <= x[9];
    cell_row_d <= y[3:0];
  end

  assign code      = right_d ? rdata_r : rdata_l;
  assign font_addr = {code, cell_row_d};
endmodule
