// tb_aludec: checks ALUControl for ALUOp 00 and 01 and for every funct code
// under ALUOp 10.
module tb_aludec;
  import ocd_pkg::*;
  logic [5:0] funct;
  aluop_e aluop;
  alu_op_e alucontrol;
  int checks = 0, failures = 0;

  aludec dut (.funct(funct), .aluop(aluop), .alucontrol(alucontrol));

  task automatic check(input logic [2:0] exp);
    #1;
    checks++;
    if (alucontrol !== exp) begin
      failures++;
      $display("FAIL aluop=%b funct=%b got=%b exp=%b", aluop, funct, alucontrol, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      funct = 6'(i);
      aluop = ALUOP_ADD; check(3'b010);
      aluop = ALUOP_SUB; check(3'b110);
      aluop = ALUOP_FUNCT;
      case (i)
        'h22:    check(3'b110);
        'h24:    check(3'b000);
        'h25:    check(3'b001);
        'h2a:    check(3'b111);
        default: check(3'b010);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
