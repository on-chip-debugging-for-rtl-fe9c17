// tb_char_gen: sweeps pixel positions, answers the character-memory reads
// from two model memories (one clock later, as the real ones do) and checks the
// memory address and the font address {code, pixel row}, including the choice
// between the left and right memory.
module tb_char_gen;
  logic clk = 0;
  logic [10:0] x;
  logic [9:0] y;
  logic [11:0] raddr;
  logic [6:0] rdl, rdr;
  logic [10:0] font_addr;
  int checks = 0, failures = 0;

  char_gen dut (.clk(clk), .x(x), .y(y), .mem_raddr(raddr), .rdata_l(rdl), .rdata_r(rdr),
                .font_addr(font_addr));
  always #1 clk = ~clk;

  function automatic logic [6:0] code_of(input int col, input int row);
    return 7'((col * 7 + row * 13) % 128);
  endfunction

  // model memories: left holds columns 0..63, right holds columns 64..127
  always @(posedge clk) begin
    rdl <= code_of(int'(raddr[5:0]), int'(raddr[11:6]));
    rdr <= code_of(int'(raddr[5:0]) + 64, int'(raddr[11:6]));
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int px, py, ppx, ppy;
    ppx = -1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      px = (n < 10000) ? n % 1024 : $urandom_range(0, 1023);
      py = (n < 10000) ? (n / 1024) * 37 % 768 : $urandom_range(0, 767);
      x = 11'(px); y = 10'(py);
      #0.1;
      checks++;
      if (raddr !== {6'(py / 16), 6'((px / 8) % 64)}) begin
        failures++; $display("FAIL raddr at %0d,%0d", px, py);
      end
      if (ppx >= 0) begin
        checks++;
        if (font_addr !== {code_of(ppx / 8, ppy / 16), 4'(ppy % 16)}) begin
          failures++; $display("FAIL font_addr at %0d,%0d: %h", ppx, ppy, font_addr);
        end
      end
      @(posedge clk);
      ppx = px; ppy = py;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
