// datapath: single-cycle MIPS datapath extended with a shifter for sll, srl
// and sra, and tapped onto the debug bus.
// Each clock executes one instruction: the PC addresses the instruction memory,
// the register file is read at rs/rt, SrcB is rt's value or the sign-extended
// immediate, and the ALU result or - when ALU_or_Shift is set - the shifter
// output (SrcB shifted by instr[10:6] in the mode instr[1:0]) becomes ALUOut.
// ALUOut is the data-memory address and, unless the instruction is a load, the
// value written back. The next PC is PC+4, the branch target (beq taken) or the
// jump target. All of this is the textbook processor the document builds on, with
// the shifter and its multiplexer as the document draws them.
// The `report` output is this level's debug record: PC, instruction, register
// addresses RA1=rs, RA2=rt, WA3=write register, RD1=SrcA, RD2=write data,
// WD3=write-back value, the ALU inputs and ALUOut, and the register file's own
// record of all 32 registers. Everything it carries is combinational from the
// current state, so it shows the instruction in flight during the whole cycle.
module datapath
  import ocd_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  ctrl_t      ctrl,
  output word_t      pc,
  input  word_t      instr,
  output word_t      aluout,
  output word_t      writedata,
  input  word_t      readdata,
  output dp_report_t report
);
  word_t        pcnext, pcplus4, pcbranch, signimm;
  word_t        srca, srcb, result, alu_y, shift_y;
  logic [4:0]   writereg;
  logic         zero, pcsrc;
  regs_bundle_t regs;

  // next PC
  pc_reg u_pc (.clk(clk), .reset(reset), .d(pcnext), .q(pc));

  assign pcplus4  = pc + 32'd4;
  assign pcbranch = pcplus4 + {signimm[29:0], 2'b00};
  assign pcsrc    = ctrl.branch & zero;

  always_comb begin
    if (ctrl.jump)  pcnext = {pcplus4[31:28], instr[25:0], 2'b00};
    else if (pcsrc) pcnext = pcbranch;
    else            pcnext = pcplus4;
  end

  // register file
  assign writereg = ctrl.regdst ? instr[15:11] : instr[20:16];

  regfile u_rf (
    .clk(clk), .reset(reset), .we3(ctrl.regwrite),
    .ra1(instr[25:21]), .ra2(instr[20:16]), .wa3(writereg), .wd3(result),
    .rd1(srca), .rd2(writedata), .regs(regs)
  );

  signext u_se (.a(instr[15:0]), .y(signimm));

  // ALU, shifter and the ALU_or_Shift multiplexer
  assign srcb = ctrl.alusrc ? signimm : writedata;

  alu     u_alu (.a(srca), .b(srcb), .f(ctrl.alucontrol), .y(alu_y), .zero(zero));
  shifter u_sh  (.a(srcb), .shamt(instr[10:6]), .mode(instr[1:0]), .y(shift_y));

  assign aluout = ctrl.alu_or_shift ? shift_y : alu_y;
  assign result = ctrl.memtoreg ? readdata : aluout;

  // debug record of this level
  always_comb begin
    report.pc     = pc;
    report.instr  = instr;
    report.ra1    = instr[25:21];
    report.ra2    = instr[20:16];
    report.wa3    = writereg;
    report.rd1    = srca;
    report.rd2    = writedata;
    report.wd3    = result;
    report.alua   = srca;
    report.alub   = srcb;
    report.aluout = aluout;
    report.regs   = regs;
  end
endmodule
