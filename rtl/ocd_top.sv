// ocd_top: on-chip debug test suite. A single-cycle MIPS microprocessor system
// runs its test program while a debug bus - one typed record filled in at every
// level of the hierarchy - carries its internal signals up to this level. The
// report compiler prints the bus as one text row per processor clock into two
// character memories, and a 1024x768 VGA text display (sync generator,
// character generator, font ROM, pixel colour) shows the screen.
// Clocks: cpu_clk drives the processor and may be as slow as wanted (a push
// button or a divided clock); pix_clk is the 65 MHz pixel clock that a PLL makes
// from the board oscillator on an FPGA (the PLL itself is not part of this RTL).
// The processor clock must be slower than about 135 pixel clocks for every
// row to be shown; `overrun` tells when a row was dropped. `reset` is
// synchronous in both domains and must be held across at least one edge of
// each clock; after it the screen is cleared (6144 pixel clocks, `busy` high).
// Colour, blank_n, hsync and vsync all appear 3 pixel clocks after the
// internal pixel position they belong to, so they stay aligned.
module ocd_top
  import ocd_pkg::*;
(
  input  logic       cpu_clk,
  input  logic       pix_clk,
  input  logic       reset,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       memwrite,
  output word_t      dataadr,
  output word_t      writedata,
  output logic [5:0] report_row,
  output logic       report_busy,
  output logic       overrun
);
  sys_report_t report;

  // microprocessor system with its debug bus
  mips_system u_sys (
    .clk(cpu_clk), .reset(reset), .report(report),
    .memwrite(memwrite), .dataadr(dataadr), .writedata(writedata)
  );

  // report compilation
  logic       we;
  logic [6:0] wcol, wchar;
  logic [5:0] wrow;

  report_compiler u_rep (
    .cpu_clk(cpu_clk), .pix_clk(pix_clk), .reset(reset), .report(report),
    .we(we), .wcol(wcol), .wrow(wrow), .wchar(wchar),
    .row(report_row), .busy(report_busy), .overrun(overrun)
  );

  // VGA text display
  logic [10:0] x;
  logic [9:0]  y;
  logic        video_on;
  logic [11:0] raddr;
  logic [6:0]  rdata_l, rdata_r;
  logic [10:0] font_addr;
  logic [7:0]  font_bits;

  vga_sync u_sync (
    .clk(pix_clk), .reset(reset), .x(x), .y(y), .video_on(video_on),
    .hsync(vga_hs), .vsync(vga_vs)
  );

  char_mem u_cmem_l (
    .clk(pix_clk), .we(we && !wcol[6]), .waddr({wrow, wcol[5:0]}), .wdata(wchar),
    .raddr(raddr), .rdata(rdata_l)
  );

  char_mem u_cmem_r (
    .clk(pix_clk), .we(we && wcol[6]), .waddr({wrow, wcol[5:0]}), .wdata(wchar),
    .raddr(raddr), .rdata(rdata_r)
  );

  char_gen u_cgen (
    .clk(pix_clk), .x(x), .y(y), .mem_raddr(raddr),
    .rdata_l(rdata_l), .rdata_r(rdata_r), .font_addr(font_addr)
  );

  font_rom u_font (.clk(pix_clk), .addr(font_addr), .data(font_bits));

  pixel_data u_pix (
    .clk(pix_clk), .reset(reset), .video_on(video_on), .x_lsb(x[2:0]),
    .font_bits(font_bits), .r(vga_r), .g(vga_g), .b(vga_b), .blank_n(vga_blank_n)
  );
endmodule
