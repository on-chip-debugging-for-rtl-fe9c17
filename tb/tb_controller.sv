// tb_controller: decodes every word of the test program plus random R-type
// words and checks the full control word, in particular ALU_or_Shift, which
// must be set for sll, srl and sra only.
module tb_controller;
  import ocd_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0, n_shift = 0;
  logic [31:0] prog [26];

  controller dut (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  // expected {regwrite, regdst, alusrc, branch, memwrite, memtoreg, jump, alu_or_shift, alucontrol}
  function automatic logic [10:0] expect_of(input logic [31:0] w);
    logic [5:0] op, fn;
    op = w[31:26]; fn = w[5:0];
    case (op)
      6'h00: case (fn)
        6'h20:   return {8'b1100_0000, 3'b010};
        6'h22:   return {8'b1100_0000, 3'b110};
        6'h24:   return {8'b1100_0000, 3'b000};
        6'h25:   return {8'b1100_0000, 3'b001};
        6'h2a:   return {8'b1100_0000, 3'b111};
        6'h00, 6'h02, 6'h03: return {8'b1100_0001, 3'b010};
        default: return {7'b1100_000, (fn[5:3] == 3'b000), 3'b010};
      endcase
      6'h23:   return {8'b1010_0100, 3'b010};
      6'h2b:   return {8'b0010_1000, 3'b010};
      6'h04:   return {8'b0001_0000, 3'b110};
      6'h08:   return {8'b1010_0000, 3'b010};
      6'h02:   return {8'b0000_0010, 3'b010};
      default: return {8'b0000_0000, 3'b010};
    endcase
  endfunction

  task automatic check(input logic [31:0] w);
    instr = w;
    #1;
    checks++;
    n_shift += ctrl.alu_or_shift;
    if (ctrl !== expect_of(w)) begin
      failures++;
      $display("FAIL instr=%h ctrl=%b exp=%b", w, ctrl, expect_of(w));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("rtl/mips_test.hex", prog);
    foreach (prog[i]) check(prog[i]);
    checks++;
    if (n_shift != 3) begin
      failures++;
      $display("FAIL ALU_or_Shift set for %0d program words, expected 3", n_shift);
    end
    for (int i = 0; i < 500; i++) check({6'($urandom_range(0, 1) ? 0 : $urandom), 20'($urandom), 6'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
