// maindec: main decoder of the single-cycle MIPS controller. Maps the opcode
// instr[31:26] to the datapath controls (register write, register-destination
// select, ALU source, branch, memory write, memory-to-register, jump) and the
// 2-bit ALUOp handed to the ALU decoder. The table is that of the classic
// single-cycle MIPS (R-type, lw, sw, beq, addi, j); opcodes outside it give all
// controls 0, so they change no state. Combinational.
module maindec
  import ocd_pkg::*;
(
  input  logic [5:0] op,
  output maindec_t   dec
);
  always_comb begin
    dec = '0;
    unique case (op)
      OP_RTYPE: begin dec.regwrite = 1'b1; dec.regdst = 1'b1; dec.aluop = ALUOP_FUNCT; end
      OP_LW:    begin dec.regwrite = 1'b1; dec.alusrc = 1'b1; dec.memtoreg = 1'b1; end
      OP_SW:    begin dec.alusrc = 1'b1; dec.memwrite = 1'b1; end
      OP_BEQ:   begin dec.branch = 1'b1; dec.aluop = ALUOP_SUB; end
      OP_ADDI:  begin dec.regwrite = 1'b1; dec.alusrc = 1'b1; end
      OP_J:     begin dec.jump = 1'b1; end
      default:  ;
    endcase
  end
endmodule
