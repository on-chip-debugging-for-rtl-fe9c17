// aludec: ALU decoder of the MIPS controller. ALUOp 00 asks for add (loads,
// stores, addi), 01 for subtract (beq), 10 for the operation named by the funct
// field of an R-type instruction. Shift functs and unknown functs give add:
// for the shifts the ALU result is not used, the ALU_or_Shift multiplexer takes
// the shifter output instead. Combinational.
module aludec
  import ocd_pkg::*;
(
  input  logic [5:0] funct,
  input  aluop_e     aluop,
  output alu_op_e    alucontrol
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: alucontrol = ALU_ADD;
      ALUOP_SUB: alucontrol = ALU_SUB;
      default: begin
        unique case (funct)
          FN_SUB:  alucontrol = ALU_SUB;
          FN_AND:  alucontrol = ALU_AND;
          FN_OR:   alucontrol = ALU_OR;
          FN_SLT:  alucontrol = ALU_SLT;
          default: alucontrol = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
