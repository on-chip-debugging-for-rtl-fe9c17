// tb_dmem: random writes and reads against a model; checks that reads are
// combinational, that a write lands on the clock edge only when we is high,
// and that the byte offset bits a[1:0] are ignored.
module tb_dmem;
  logic clk = 0, we;
  logic [31:0] a, wd, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dmem dut (.clk(clk), .we(we), .a(a), .wd(wd), .rd(rd));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      a = 32'(i * 4); wd = $urandom; model[i] = wd;
    end
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      a = {24'($urandom), 6'($urandom), 2'($urandom)};
      wd = $urandom;
      #1;
      checks++;
      if (rd !== model[a[7:2]]) begin failures++; $display("FAIL read before edge a=%h", a); end
      @(posedge clk);
      if (we) model[a[7:2]] = wd;
      #1;
      checks++;
      if (rd !== model[a[7:2]]) begin failures++; $display("FAIL read after edge a=%h we=%b", a, we); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
