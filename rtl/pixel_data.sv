// pixel_data: turns the font row into a colour for the current pixel.
// video_on and the 3 low bits of x arrive with the pixel being addressed and
// are delayed by the 2 clocks the character memory and the font ROM take; the
// bit of the font byte under the pixel (bit 7 is the leftmost) then selects
// text colour FG_RGB or background BG_RGB. Text is green on black by default, as the display of the
// design shows it; outside the visible area the outputs are black and blank_n
// is low. Outputs are registered, so a pixel's colour appears 3 clocks after
// its x, y.
module pixel_data #(
  parameter logic [23:0] FG_RGB = 24'h00ff00,
  parameter logic [23:0] BG_RGB = 24'h000000
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       video_on,
  input  logic [2:0] x_lsb,
  input  logic [7:0] font_bits,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b,
  output logic       blank_n
);
  logic [1:0] on_d;
  logic [2:0] xl_d [2];
  logic       lit;

  always_ff @(posedge clk) begin
    if (reset) on_d <= '0;
    else       on_d <= {on_d[0], video_on};
    xl_d[0] <= x_lsb;
    xl_d[1] <= xl_d[0];
  end

  assign lit = on_d[1] && font_bits[3'd7 - xl_d[1]];

  always_ff @(posedge clk) begin
    if (reset) begin
      r <= '0; g <= '0; b <= '0; blank_n <= 1'b0;
    end else begin
      {r, g, b} <= lit ? FG_RGB : (on_d[1] ? BG_RGB : 24'h000000);
      blank_n   <= on_d[1];
    end
  end
endmodule
