// controller: control unit of the single-cycle MIPS: main decoder, ALU decoder
// and the ALU_or_Shift select that the shift extension adds. The branch is
// resolved in the datapath (branch & zero), which keeps the ALU's zero flag
// from looping back through this block. ALU_or_Shift is decoded from instr[31:26] and
// instr[5:3], the fields the document feeds into it: it is 1 for an R-type
// instruction whose funct[5:3] is 000, which in this instruction set are exactly
// sll, srl and sra. Combinational.
module controller
  import ocd_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  maindec_t md;
  alu_op_e  alucontrol;

  maindec u_maindec (.op(op), .dec(md));
  aludec  u_aludec  (.funct(funct), .aluop(md.aluop), .alucontrol(alucontrol));

  always_comb begin
    ctrl.regwrite     = md.regwrite;
    ctrl.regdst       = md.regdst;
    ctrl.alusrc       = md.alusrc;
    ctrl.branch       = md.branch;
    ctrl.memwrite     = md.memwrite;
    ctrl.memtoreg     = md.memtoreg;
    ctrl.jump         = md.jump;
    ctrl.alu_or_shift = (op == OP_RTYPE) && (funct[5:3] == 3'b000);
    ctrl.alucontrol   = alucontrol;
  end
endmodule
