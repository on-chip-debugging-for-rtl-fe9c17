// tb_font_rom: checks the one-clock read latency and the font's shape rules:
// every character the report prints has a glyph, all other codes are blank,
// pixel rows 0 and 15 and columns 0, 6, 7 are empty, and rows come in
// identical pairs (dot rows drawn twice). Also checks the rows of the digit '1'.
module tb_font_rom;
  logic clk = 0;
  logic [10:0] addr;
  logic [7:0] data;
  logic [7:0] g [16];
  int checks = 0, failures = 0;
  string used = "0123456789abcdefPCinstrRAWDluBO:";

  font_rom dut (.clk(clk), .addr(addr), .data(data));
  always #1 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      logic is_used, any;
      is_used = 0; any = 0;
      for (int k = 0; k < used.len(); k++) if (used[k] == c) is_used = 1;
      for (int r = 0; r < 16; r++) begin
        @(negedge clk);
        addr = {7'(c), 4'(r)};
        @(posedge clk); #0.5;
        g[r] = data;
        any |= (data != 0);
      end
      chk(any == is_used, $sformatf("code %0d glyph present=%0b", c, any));
      chk(g[0] == 0 && g[15] == 0, $sformatf("code %0d rows 0/15", c));
      for (int r = 0; r < 16; r++) chk((g[r] & 8'h83) == 0, $sformatf("code %0d row %0d columns", c, r));
      for (int r = 1; r < 15; r += 2) chk(g[r] == g[r + 1], $sformatf("code %0d rows %0d/%0d", c, r, r + 1));
      if (c == "1") begin
        chk(g[1] == 8'h10 && g[3] == 8'h30 && g[5] == 8'h10 && g[13] == 8'h38, "glyph of '1'");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
