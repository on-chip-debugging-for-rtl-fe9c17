// tb_maindec: checks the main decoder's outputs for every opcode of the
// instruction set and for all other opcodes (which must change no state).
module tb_maindec;
  import ocd_pkg::*;
  logic [5:0] op;
  maindec_t dec;
  int checks = 0, failures = 0;

  maindec dut (.op(op), .dec(dec));

  // expected {regwrite, regdst, alusrc, branch, memwrite, memtoreg, jump, aluop}
  function automatic logic [8:0] expect_of(input logic [5:0] o);
    case (o)
      6'b000000: return 9'b1_1_0_0_0_0_0_10;
      6'b100011: return 9'b1_0_1_0_0_1_0_00;
      6'b101011: return 9'b0_0_1_0_1_0_0_00;
      6'b000100: return 9'b0_0_0_1_0_0_0_01;
      6'b001000: return 9'b1_0_1_0_0_0_0_00;
      6'b000010: return 9'b0_0_0_0_0_0_1_00;
      default:   return 9'b0;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      #1;
      checks++;
      if ({dec.regwrite, dec.regdst, dec.alusrc, dec.branch, dec.memwrite, dec.memtoreg,
           dec.jump, dec.aluop} !== expect_of(op)) begin
        failures++;
        $display("FAIL op=%b dec=%b exp=%b", op, dec, expect_of(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
