// tb_vga_sync: runs two full 1024x768 frames and checks the timing against
// the VESA numbers: 1344 clocks per line, 806 lines per frame, hsync low for
// 136 clocks starting 24 clocks after the visible part (plus the 3-clock
// output delay), vsync low for 6 lines starting 3 lines after the visible part,
// 1024x768 visible pixels per frame and x, y counting in step.
module tb_vga_sync;
  logic clk = 0, reset;
  logic [10:0] x;
  logic [9:0] y;
  logic video_on, hsync, vsync;
  int checks = 0, failures = 0;
  int cyc = 0, ex = 0, ey = 0, visible = 0, hs_low = 0, vs_low_lines = 0;

  vga_sync dut (.clk(clk), .reset(reset), .x(x), .y(y), .video_on(video_on),
                .hsync(hsync), .vsync(vsync));
  always #1 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d at x=%0d y=%0d", what, got, exp, ex, ey);
    end
  endtask

  // reference position of the pixel whose sync is on the outputs now (3 clocks back)
  int hx [4], hy [4];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1;
    repeat (3) @(posedge clk);
    #0.1 reset = 0;
    for (int f = 0; f < 2; f++) begin
      visible = 0;
      for (int n = 0; n < 1344 * 806; n++) begin
        @(negedge clk);
        chk(int'(x), ex, "x");
        chk(int'(y), ey, "y");
        chk(int'(video_on), int'(ex < 1024 && ey < 768), "video_on");
        visible += video_on;
        // sync outputs belong to the position 3 clocks ago
        hx[3] = hx[2]; hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = ex;
        hy[3] = hy[2]; hy[2] = hy[1]; hy[1] = hy[0]; hy[0] = ey;
        if (n >= 3 || f > 0) begin
          logic hs_exp, vs_exp;
          hs_exp = !(hx[3] >= 1048 && hx[3] < 1184);
          vs_exp = !(hy[3] >= 771 && hy[3] < 777);
          chk(int'(hsync), int'(hs_exp), "hsync");
          chk(int'(vsync), int'(vs_exp), "vsync");
          hs_low += !hsync;
        end
        ex++;
        if (ex == 1344) begin ex = 0; ey = (ey == 805) ? 0 : ey + 1; end
      end
      chk(visible, 1024 * 768, "visible pixels per frame");
    end
    chk(hs_low, 2 * 806 * 136 - 0, "hsync low clocks over two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
