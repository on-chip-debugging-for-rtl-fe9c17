// tb_mips_system: runs the test program on the microprocessor system and,
// for each processor clock, compares the debug bus with the expected values of
// every instruction (tb_trace_pkg). Checks the memory-access fields of the bus,
// the path taken (branch not taken at 0x18, taken at 0x20, jump at 0x3c), and
// the final result: 126 (0x7e) stored at data address 84 after 24 clocks, and
// 7 at address 80. It also prints the trace one line per clock, the way a
// simulation wrapper would show it next to the on-screen report.
module tb_mips_system;
  import ocd_pkg::*;
  import tb_trace_pkg::*;
  logic clk = 0, reset;
  sys_report_t report;
  logic memwrite;
  word_t dataadr, writedata;
  int checks = 0, failures = 0, n_store = 0, n_load = 0, n_shift_rows = 0;

  mips_system dut (.clk(clk), .reset(reset), .report(report), .memwrite(memwrite),
                   .dataadr(dataadr), .writedata(writedata));
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t t;
    reset = 1;
    @(negedge clk); @(negedge clk);
    reset = 0;
    for (int i = 0; i < NROWS + 4; i++) begin
      t = exp_row(i);
      #1;
      chk(report.dp.pc, 32'(t.pc), $sformatf("row %0d pc", i));
      chk(report.dp.instr, t.instr, $sformatf("row %0d instr", i));
      chk(32'(report.dp.ra1), 32'(t.ra1), $sformatf("row %0d RA1", i));
      chk(32'(report.dp.ra2), 32'(t.ra2), $sformatf("row %0d RA2", i));
      chk(32'(report.dp.wa3), 32'(t.wa3), $sformatf("row %0d WA3", i));
      chk(report.dp.rd1, t.rd1, $sformatf("row %0d RD1", i));
      chk(report.dp.rd2, t.rd2, $sformatf("row %0d RD2", i));
      chk(report.dp.wd3, t.wd3, $sformatf("row %0d WD3", i));
      chk(report.dp.alua, t.alua, $sformatf("row %0d aluA", i));
      chk(report.dp.alub, t.alub, $sformatf("row %0d aluB", i));
      chk(report.dp.aluout, t.aluout, $sformatf("row %0d aluO", i));
      chk(report.dataadr, t.aluout, "dataadr on bus");
      chk(report.writedata, t.rd2, "writedata on bus");
      chk(32'(report.memwrite), 32'(t.instr[31:26] == 6'h2b), "memwrite on bus");
      $display("pc=%02h, instr=%08h, A1=%02h, A2=%02h, A3=%02h, RD1=%08h, RD2=%08h, WD3=%08h, alua=%08h, alub=%08h, alout=%08h",
               report.dp.pc[7:0], report.dp.instr, report.dp.ra1, report.dp.ra2, report.dp.wa3,
               report.dp.rd1, report.dp.rd2, report.dp.wd3, report.dp.alua, report.dp.alub, report.dp.aluout);
      if (report.memwrite) n_store++;
      if (t.instr[31:26] == 6'h23) begin
        n_load++;
        chk(report.readdata, 32'h7, "lw read data");
      end
      if (t.instr[31:26] == 6'h00 && t.instr[5:3] == 3'b000 && t.instr != 0) n_shift_rows++;
      @(negedge clk);
    end
    chk(dut.u_dmem.ram[84 / 4], 32'd126, "mem[84]");
    chk(dut.u_dmem.ram[80 / 4], 32'd7, "mem[80]");
    chk(dut.u_mips.u_dp.u_rf.rf[2], 32'd126, "$2");
    chk(32'(n_store), 2, "stores");
    chk(32'(n_load), 1, "loads");
    chk(32'(n_shift_rows), 3, "shift instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
