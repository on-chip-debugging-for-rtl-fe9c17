// mips: the single-cycle MIPS processor, controller plus datapath. It runs
// add, sub, and, or, slt, lw, sw, beq, addi and j, and the shift instructions
// sll, srl and sra. Instruction and data memories are outside: `pc`/`instr`
// form the instruction port, `aluout` (address), `writedata`, `memwrite` and
// `readdata` the data port. One instruction completes per rising edge of clk.
// The datapath's debug record is passed up unchanged on `report`.
module mips
  import ocd_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  output word_t      pc,
  input  word_t      instr,
  output logic       memwrite,
  output word_t      aluout,
  output word_t      writedata,
  input  word_t      readdata,
  output dp_report_t report
);
  ctrl_t ctrl;

  controller u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  datapath u_dp (
    .clk(clk), .reset(reset), .ctrl(ctrl), .pc(pc), .instr(instr),
    .aluout(aluout), .writedata(writedata), .readdata(readdata), .report(report)
  );

  assign memwrite = ctrl.memwrite;
endmodule
