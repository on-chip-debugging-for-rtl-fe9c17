// tb_report_compiler: drives the debug bus with random values, one set per
// processor clock, and rebuilds the screen from the character writes. Checks:
// the screen is all spaces after the post-reset clear (and the clear takes
// 48*128 pixel clocks); no row is written for a processor edge during reset;
// each processor edge produces exactly one row holding the values present just
// before that edge, formatted independently here; the row pointer wraps from
// 47 to 0; two processor edges too close together drop the second row and set
// the overrun flag.
module tb_report_compiler;
  import ocd_pkg::*;
  import tb_trace_pkg::*;
  logic cpu_clk = 0, pix_clk = 0, reset;
  sys_report_t report;
  logic we, busy, overrun;
  logic [6:0] wcol, wchar;
  logic [5:0] wrow, row;
  byte screen [48][128];
  int checks = 0, failures = 0;
  int n_rows = 0, n_wrap = 0, n_overrun = 0, n_clear = 0, writes = 0;

  report_compiler dut (.cpu_clk(cpu_clk), .pix_clk(pix_clk), .reset(reset), .report(report),
                       .we(we), .wcol(wcol), .wrow(wrow), .wchar(wchar), .row(row),
                       .busy(busy), .overrun(overrun));

  always #1 pix_clk = ~pix_clk;

  always @(posedge pix_clk) if (we) begin
    screen[wrow][wcol] <= byte'(wchar);
    writes++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic string screen_row(input int r);
    string s = "";
    for (int c = 0; c < 128; c++) s = {s, string'(screen[r][c])};
    return s;
  endfunction

  function automatic string pad(input string s);
    while (s.len() < 128) s = {s, " "};
    return s;
  endfunction

  task automatic set_random(output row_t t);
    t.pc = $urandom_range(0, 255); t.instr = $urandom;
    t.ra1 = $urandom_range(0, 31); t.ra2 = $urandom_range(0, 31); t.wa3 = $urandom_range(0, 31);
    t.rd1 = $urandom; t.rd2 = $urandom; t.wd3 = $urandom;
    t.alua = $urandom; t.alub = $urandom; t.aluout = $urandom;
    report = sys_report_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom});
    report.dp.pc = {$urandom_range(0, 1) ? 24'h0 : 24'($urandom), 8'(t.pc)};
    report.dp.instr = t.instr;
    report.dp.ra1 = 5'(t.ra1); report.dp.ra2 = 5'(t.ra2); report.dp.wa3 = 5'(t.wa3);
    report.dp.rd1 = t.rd1; report.dp.rd2 = t.rd2; report.dp.wd3 = t.wd3;
    report.dp.alua = t.alua; report.dp.alub = t.alub; report.dp.aluout = t.aluout;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t t, junk;
    int clear_cycles;
    reset = 1;
    set_random(junk);
    repeat (5) @(posedge pix_clk);
    cpu_clk = 1; repeat (5) @(posedge pix_clk); cpu_clk = 0;   // edge during reset: no row
    repeat (5) @(posedge pix_clk);
    @(negedge pix_clk) reset = 0;
    clear_cycles = 0;
    while (busy) begin @(posedge pix_clk); clear_cycles++; end
    chk(clear_cycles >= 48 * 128 && clear_cycles <= 48 * 128 + 1, $sformatf("clear took %0d cycles", clear_cycles));
    begin
      int bad = 0;
      for (int r = 0; r < 48; r++) if (screen_row(r) != pad("")) bad++;
      chk(bad == 0, "screen blank after clear");
      if (bad == 0) n_clear++;
    end
    chk(row == 0 && writes == 48 * 128, "no row written for the edge in reset");
    for (int k = 0; k < 52; k++) begin
      int r;
      set_random(t);
      repeat (20) @(posedge pix_clk);
      cpu_clk = 1;
      #0.1 set_random(junk);        // the bus moves on right after the edge
      repeat (100) @(posedge pix_clk);
      cpu_clk = 0;
      repeat (100) @(posedge pix_clk);
      r = k % 48;
      chk(screen_row(r) == pad(fmt_row(t)), $sformatf("row %0d:\n  got %s\n  exp %s", r, screen_row(r), pad(fmt_row(t))));
      chk(row == 6'((k + 1) % 48), $sformatf("row pointer %0d after %0d rows", row, k + 1));
      chk(!busy && !overrun, "idle, no overrun");
      n_rows++;
      if (k == 47) n_wrap += (row == 0);
    end
    // two processor edges 6 pixel clocks apart: the second row is lost
    begin
      int r0;
      r0 = row;
      set_random(t);
      cpu_clk = 1; repeat (3) @(posedge pix_clk); cpu_clk = 0;
      set_random(junk);
      repeat (3) @(posedge pix_clk);
      cpu_clk = 1; repeat (3) @(posedge pix_clk); cpu_clk = 0;
      repeat (300) @(posedge pix_clk);
      chk(overrun, "overrun flag set");
      chk(row == 6'(r0 + 1), "only one row written");
      chk(screen_row(r0) == pad(fmt_row(t)), "first of the two rows kept");
      n_overrun += overrun;
    end
    $display("rows=%0d wraps=%0d clears=%0d overruns=%0d", n_rows, n_wrap, n_clear, n_overrun);
    chk(n_rows > 0 && n_wrap > 0 && n_clear > 0 && n_overrun > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
