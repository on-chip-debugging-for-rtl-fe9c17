// tb_datapath: drives the datapath with control words decoded here (not by
// the controller) and runs it on random programs (64 words, random data
// memory traffic, branches and jumps) with instruction and data memories
// modelled here, and compares every field of the debug record, the next PC and
// the data-memory writes with the reference model, one instruction per clock.
module tb_datapath;
  import ocd_pkg::*;
  import tb_mips_iss_pkg::*;
  logic clk = 0, reset;
  word_t pc, instr, aluout, writedata, readdata;
  logic memwrite;
  dp_report_t report;
  logic [31:0] prog [64];
  logic [31:0] mem [64];
  int checks = 0, failures = 0;
  int n_shift = 0, n_taken = 0, n_jump = 0, n_store = 0;

  ctrl_t ctrl;

  // control word for each instruction of the subset, written from the ISA
  always_comb begin
    logic [5:0] op, fn;
    op = instr[31:26]; fn = instr[5:0];
    ctrl = '0;
    ctrl.alucontrol = ALU_ADD;
    case (op)
      6'h00: begin
        ctrl.regwrite = 1; ctrl.regdst = 1;
        ctrl.alu_or_shift = (fn == 6'h00 || fn == 6'h02 || fn == 6'h03);
        case (fn)
          6'h22: ctrl.alucontrol = ALU_SUB;
          6'h24: ctrl.alucontrol = ALU_AND;
          6'h25: ctrl.alucontrol = ALU_OR;
          6'h2a: ctrl.alucontrol = ALU_SLT;
          default: ;
        endcase
      end
      6'h08: begin ctrl.regwrite = 1; ctrl.alusrc = 1; end
      6'h23: begin ctrl.regwrite = 1; ctrl.alusrc = 1; ctrl.memtoreg = 1; end
      6'h2b: begin ctrl.alusrc = 1; ctrl.memwrite = 1; end
      6'h04: begin ctrl.branch = 1; ctrl.alucontrol = ALU_SUB; end
      6'h02: ctrl.jump = 1;
      default: ;
    endcase
  end

  assign memwrite = ctrl.memwrite;

  datapath dut (.clk(clk), .reset(reset), .ctrl(ctrl), .pc(pc), .instr(instr),
                .aluout(aluout), .writedata(writedata), .readdata(readdata), .report(report));

  assign instr    = prog[pc[7:2]];
  assign readdata = mem[aluout[7:2]];
  always @(posedge clk) if (memwrite) mem[aluout[7:2]] <= writedata;
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mips_iss iss;
    exp_t e;
    for (int run = 0; run < 20; run++) begin
      iss = new();
      foreach (prog[i]) prog[i] = rand_instr();
      foreach (mem[i]) mem[i] = '0;
      reset = 1;
      @(negedge clk); @(negedge clk);
      reset = 0;
      for (int k = 0; k < 150; k++) begin
        #1;
        e = iss.step(instr);
        chk(report.pc, e.pc, "pc");
        chk(report.instr, e.instr, "instr");
        chk(32'(report.ra1), 32'(e.ra1), "ra1");
        chk(32'(report.ra2), 32'(e.ra2), "ra2");
        chk(32'(report.wa3), 32'(e.wa3), "wa3");
        chk(report.rd1, e.rd1, "rd1");
        chk(report.rd2, e.rd2, "rd2");
        chk(report.wd3, e.wd3, "wd3");
        chk(report.alua, e.alua, "alua");
        chk(report.alub, e.alub, "alub");
        chk(report.aluout, e.aluout, "aluout");
        chk(32'(memwrite), 32'(e.memwrite), "memwrite");
        n_shift += e.shift; n_taken += e.taken; n_jump += e.jump; n_store += e.memwrite;
        @(negedge clk);
        for (int i = 0; i < 32; i++) chk(report.regs.r[i], iss.r[i], $sformatf("reg%0d", i));
        chk(pc, iss.pc, "next pc");
      end
      foreach (mem[i]) chk(mem[i], iss.mem[i], "dmem");
    end
    $display("shifts=%0d branches taken=%0d jumps=%0d stores=%0d", n_shift, n_taken, n_jump, n_store);
    checks++;
    if (n_shift == 0 || n_taken == 0 || n_jump == 0 || n_store == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
