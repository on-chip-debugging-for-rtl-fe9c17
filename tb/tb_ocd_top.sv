// tb_ocd_top: end-to-end test of the whole on-chip debug system at its full
// size (1024x768 display, 48x128 text screen). After reset it waits for the
// screen clear, then gives the processor 50 slow clocks (300 pixel clocks
// each): the 24 instructions of the test program and 26 zero words after it,
// so the 48-row screen wraps and rows 0 and 1 are overwritten. It checks the
// two stores the program makes on the memory port (7 to address 80, 126 to
// address 84) and the path taken (no branch at 0x18, branch at 0x20, jump at
// 0x3c). Then it watches one whole video frame on the VGA outputs and compares
// every visible pixel with the text the screen must hold - rows formatted
// here from the expected debug values and drawn with the font table - and
// checks the frame timing (1344 x 806 clocks, 1024 pixels x 768 lines visible,
// hsync 24 clocks after the end of the visible line). Finally two processor
// edges in quick succession must raise the overrun flag.
module tb_ocd_top;
  import ocd_pkg::*;
  import tb_trace_pkg::*;
  logic cpu_clk = 0, pix_clk = 0, reset;
  logic vga_hs, vga_vs, vga_blank_n, memwrite, report_busy, overrun;
  logic [7:0] vga_r, vga_g, vga_b;
  word_t dataadr, writedata;
  logic [5:0] report_row;
  logic [7:0] font [2048];
  string exp_screen [48];
  int checks = 0, failures = 0;
  int n_store = 0, n_taken = 0, n_jump = 0, n_shift = 0, n_wrap = 0, n_clear = 0, n_overrun = 0;
  int n_lit = 0;

  ocd_top dut (.cpu_clk(cpu_clk), .pix_clk(pix_clk), .reset(reset), .vga_hs(vga_hs), .vga_vs(vga_vs),
               .vga_blank_n(vga_blank_n), .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b),
               .memwrite(memwrite), .dataadr(dataadr), .writedata(writedata),
               .report_row(report_row), .report_busy(report_busy), .overrun(overrun));

  always #1 pix_clk = ~pix_clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic string pad(input string s);
    while (s.len() < 128) s = {s, " "};
    return s;
  endfunction

  task automatic cpu_tick();
    repeat (150) @(posedge pix_clk);
    cpu_clk = 1;
    repeat (150) @(posedge pix_clk);
    cpu_clk = 0;
  endtask

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, line, px, vis_lines, bad_pix, blank_fall;
    $readmemh("rtl/font_rom.hex", font);
    reset = 1;
    repeat (10) @(posedge pix_clk);
    cpu_tick();
    @(negedge pix_clk) reset = 0;
    @(posedge pix_clk);
    chk(report_busy, "screen clear running after reset");
    while (report_busy) @(posedge pix_clk);
    n_clear++;

    // ---- run the program, one processor clock at a time ----
    for (int k = 0; k < 50; k++) begin
      row_t e;
      word_t pc_before;
      e = exp_row(k);
      #0.1;
      pc_before = dut.u_sys.report.dp.pc;
      chk(pc_before == 32'(e.pc), $sformatf("tick %0d pc %h exp %h", k, pc_before, e.pc));
      if (memwrite) begin
        n_store++;
        chk((dataadr == 80 && writedata == 7) || (dataadr == 84 && writedata == 126),
            $sformatf("store %0d to %0d", writedata, dataadr));
      end
      if (e.instr[31:26] == 6'h00 && e.instr[5:3] == 3'b000 && e.instr != 0) n_shift++;
      cpu_tick();
      #0.1;
      if (dut.u_sys.report.dp.pc == pc_before + 8 && e.instr[31:26] == 6'h04) n_taken++;
      if (e.instr[31:26] == 6'h02 && dut.u_sys.report.dp.pc == 32'h44) n_jump++;
      if (k == 47) n_wrap += (report_row == 0);
      exp_screen[k % 48] = pad(fmt_row(e));
    end
    chk(n_store == 2 && n_taken == 1 && n_jump == 1 && n_shift == 3,
        $sformatf("stores=%0d taken=%0d jumps=%0d shifts=%0d", n_store, n_taken, n_jump, n_shift));
    chk(dut.u_sys.u_dmem.ram[21] == 32'd126, "mem[84] = 126");
    chk(report_row == 6'd2 && !overrun, "row pointer after 50 rows");
    repeat (300) @(posedge pix_clk);

    // ---- one frame on the VGA outputs ----
    @(negedge vga_vs);
    t0 = $time;
    line = -1; px = 0; vis_lines = 0; bad_pix = 0; blank_fall = -1;
    forever begin
      @(posedge pix_clk);
      #0.1;
      if (!vga_vs && line >= 0 && vis_lines == 768) begin t1 = $time; break; end
      if (vga_blank_n) begin
        if (px == 0) begin line++; vis_lines++; end
        begin
          byte c;
          logic bit_on;
          c = byte'(exp_screen[line / 16][px / 8]);
          bit_on = font[{7'(c), 4'(line % 16)}][7 - px % 8];
          if ({vga_r, vga_g, vga_b} !== (bit_on ? 24'h00ff00 : 24'h000000)) begin
            bad_pix++;
            if (bad_pix < 5) $display("pixel %0d,%0d rgb=%h exp bit %b", px, line, {vga_r, vga_g, vga_b}, bit_on);
          end
          n_lit += bit_on;
        end
        px++;
      end else begin
        if (px != 0) begin
          checks++;
          if (px != 1024) begin failures++; $display("FAIL line %0d has %0d pixels", line, px); end
          px = 0;
          blank_fall = 0;
        end else if (blank_fall >= 0) begin
          blank_fall++;
          if (!vga_hs) begin
            checks++;
            if (blank_fall != 24) begin failures++; $display("FAIL hsync %0d clocks after blank", blank_fall); end
            blank_fall = -1;
          end
        end
        if (vga_r != 0 || vga_g != 0 || vga_b != 0) bad_pix++;
      end
    end
    chk(vis_lines == 768, $sformatf("%0d visible lines", vis_lines));
    chk(bad_pix == 0, $sformatf("%0d wrong pixels", bad_pix));
    chk(n_lit > 0, "text drawn");
    chk((t1 - t0) / 2 == 1344 * 806, $sformatf("frame period %0d clocks", (t1 - t0) / 2));

    // ---- two processor edges too close together ----
    cpu_clk = 1; repeat (3) @(posedge pix_clk); cpu_clk = 0; repeat (3) @(posedge pix_clk);
    cpu_clk = 1; repeat (3) @(posedge pix_clk); cpu_clk = 0;
    repeat (400) @(posedge pix_clk);
    n_overrun += overrun;

    $display("clears=%0d stores=%0d branches=%0d jumps=%0d shifts=%0d wraps=%0d overruns=%0d lit=%0d",
             n_clear, n_store, n_taken, n_jump, n_shift, n_wrap, n_overrun, n_lit);
    chk(n_clear > 0, "screen clear happened");
    chk(n_wrap > 0, "row wrap happened");
    chk(n_overrun > 0, "overrun happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
