// tb_pixel_data: feeds random video_on / pixel column / font bytes with the
// 2-clock latency the character and font memories have, and checks that each
// pixel's colour and blank_n are registered on the clock edge that takes in its
// font byte (3 clocks after the pixel's position): green where
// the font bit under the pixel is set, black elsewhere and outside video.
module tb_pixel_data;
  logic clk = 0, reset, video_on;
  logic [2:0] xl;
  logic [7:0] fb, r, g, b;
  logic blank_n;
  int checks = 0, failures = 0, lit = 0;
  logic       on_h [$];
  logic [2:0] x_h [$];

  pixel_data dut (.clk(clk), .reset(reset), .video_on(video_on), .x_lsb(xl), .font_bits(fb),
                  .r(r), .g(g), .b(b), .blank_n(blank_n));
  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] fb_h [$];
    reset = 1; video_on = 0; xl = 0; fb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 10000; n++) begin
      video_on = ($urandom_range(0, 7) != 0);
      xl = 3'($urandom);
      fb = 8'($urandom);   // font byte of the pixel presented two clocks earlier
      on_h.push_back(video_on); x_h.push_back(xl); fb_h.push_back(fb);
      @(posedge clk); #0.5;
      if (n >= 2) begin
        // after this edge the outputs show the pixel presented at edge n-2,
        // whose font byte was presented at edge n
        logic on3, bit3;
        on3  = on_h[n - 2];
        bit3 = fb_h[n][7 - x_h[n - 2]];
        checks++;
        if (blank_n !== on3 || {r, g, b} !== ((on3 && bit3) ? 24'h00ff00 : 24'h0)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d blank_n=%b rgb=%h exp on=%b bit=%b", n, blank_n, {r, g, b}, on3, bit3);
        end
        lit += (on3 && bit3);
      end
      @(negedge clk);
    end
    checks++;
    if (lit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
