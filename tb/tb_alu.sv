// tb_alu: random and corner-case check of the ALU against a reference model
// for and, or, add, sub and slt, including the zero flag.
module tb_alu;
  import ocd_pkg::*;
  logic [31:0] a, b, y;
  logic        zero;
  alu_op_e     f;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .f(f), .y(y), .zero(zero));

  function automatic logic [31:0] ref_alu(input logic [31:0] x, input logic [31:0] z, input alu_op_e op);
    logic [31:0] d;
    d = x - z;
    unique case (op)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return d;
      default: return {31'b0, d[31]};
    endcase
  endfunction

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_e op);
    logic [31:0] e;
    a = ta; b = tb_; f = op;
    #1;
    e = ref_alu(ta, tb_, op);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h zero=%b", op.name(), ta, tb_, y, e, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    foreach (ops[k]) begin
      check(32'h0, 32'h0, ops[k]);
      check(32'hc, 32'h7, ops[k]);
      check(32'h7, 32'hc, ops[k]);
      check(32'hffffff00, 32'h5, ops[k]);
      check(32'h5, 32'hffffff00, ops[k]);
      for (int i = 0; i < 200; i++) check($urandom, $urandom, ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
