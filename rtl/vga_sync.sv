// vga_sync: horizontal/vertical timing generator for the 1024x768 text display.
// Two counters run at the pixel clock: x counts pixels of a line (visible,
// front porch, sync pulse, back porch) and y counts lines of a frame. The block
// outputs the current pixel position (x, y) and video_on for the character
// generator, and the hsync/vsync pulses for the monitor. The resolution is the
// document's; the porch and pulse widths are the standard VESA 1024x768 at 60 Hz
// timing (65 MHz pixel clock, 1344 x 806 total, both pulses active low).
// x, y and video_on describe the pixel being addressed now; hsync and vsync are
// delayed by SYNC_DELAY clocks so that they line up with the colour that the
// character memory, font ROM and pixel register produce SYNC_DELAY clocks later.
module vga_sync #(
  parameter int H_VISIBLE  = 1024,
  parameter int H_FRONT    = 24,
  parameter int H_SYNC     = 136,
  parameter int H_BACK     = 160,
  parameter int V_VISIBLE  = 768,
  parameter int V_FRONT    = 3,
  parameter int V_SYNC     = 6,
  parameter int V_BACK     = 29,
  parameter int SYNC_DELAY = 3
) (
  input  logic        clk,
  input  logic        reset,
  output logic [10:0] x,
  output logic [9:0]  y,
  output logic        video_on,
  output logic        hsync,
  output logic        vsync
);
  localparam int H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic hs_now, vs_now;
  logic [SYNC_DELAY-1:0] hs_pipe, vs_pipe;

  always_ff @(posedge clk) begin
    if (reset) begin
      x <= '0;
      y <= '0;
    end else if (x == 11'(H_TOTAL - 1)) begin
      x <= '0;
      y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 10'd1;
    end else begin
      x <= x + 11'd1;
    end
  end

  assign video_on = (x < 11'(H_VISIBLE)) && (y < 10'(V_VISIBLE));
  assign hs_now   = !((x >= 11'(H_VISIBLE + H_FRONT)) && (x < 11'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vs_now   = !((y >= 10'(V_VISIBLE + V_FRONT)) && (y < 10'(V_VISIBLE + V_FRONT + V_SYNC)));

  always_ff @(posedge clk) begin
    if (reset) begin
      hs_pipe <= '1;
      vs_pipe <= '1;
    end else begin
      hs_pipe <= {hs_pipe[SYNC_DELAY-2:0], hs_now};
      vs_pipe <= {vs_pipe[SYNC_DELAY-2:0], vs_now};
    end
  end

  assign hsync = hs_pipe[SYNC_DELAY-1];
  assign vsync = vs_pipe[SYNC_DELAY-1];
endmodule
