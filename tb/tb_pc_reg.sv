// tb_pc_reg: checks that the program counter loads its input on every clock
// edge and returns to 0 on reset.
module tb_pc_reg;
  logic clk = 0, reset;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  pc_reg dut (.clk(clk), .reset(reset), .d(d), .q(q));
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL q=%h exp=%h", q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; d = 32'h1234;
    @(posedge clk); #1 chk(32'h0);
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] v;
      v = $urandom; d = v;
      if (i % 50 == 49) reset = 1;
      @(posedge clk); #1;
      chk(reset ? 32'h0 : v);
      reset = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
