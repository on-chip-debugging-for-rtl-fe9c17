// tb_regfile: writes random values to random registers and checks both read
// ports and the 32-word debug tap against a model; checks that $0 stays 0,
// that nothing is written with we3 low, and that reset clears every register.
module tb_regfile;
  import ocd_pkg::*;
  logic clk = 0, reset, we3;
  logic [4:0] ra1, ra2, wa3;
  logic [31:0] wd3, rd1, rd2;
  regs_bundle_t regs;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .reset(reset), .we3(we3), .ra1(ra1), .ra2(ra2), .wa3(wa3),
               .wd3(wd3), .rd1(rd1), .rd2(rd2), .regs(regs));

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r);
      #1;
      chk(rd1, model[r], $sformatf("rd1[%0d]", r));
      chk(rd2, model[31 - r], $sformatf("rd2[%0d]", 31 - r));
      chk(regs.r[r], model[r], $sformatf("tap[%0d]", r));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we3 = 0; ra1 = 0; ra2 = 0; wa3 = 0; wd3 = 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk);
    reset = 0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we3 = ($urandom_range(0, 3) != 0);
      wa3 = 5'($urandom);
      wd3 = $urandom;
      @(posedge clk);
      if (we3 && wa3 != 0) model[wa3] = wd3;
      #1;
      ra1 = wa3; ra2 = 5'($urandom);
      #1;
      chk(rd1, model[ra1], "rd1 after write");
      chk(rd2, model[ra2], "rd2 random");
    end
    @(negedge clk); we3 = 0;
    check_all();
    reset = 1;
    @(negedge clk);
    reset = 0;
    foreach (model[i]) model[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
