// tb_imem: checks that the instruction memory holds the 26-word test program
// at addresses 0..0x64 (word by word, as listed in the design's program) and
// zeros above it.
module tb_imem;
  logic [5:0] a;
  logic [31:0] rd;
  int checks = 0, failures = 0;
  logic [31:0] exp_prog [26] = '{
    32'h20020005, 32'h2003000c, 32'h2067fff7, 32'h00e22025, 32'h00642824, 32'h00a42820,
    32'h10a7000a, 32'h0064202a, 32'h10800001, 32'h20050000, 32'h00e2202a, 32'h00853820,
    32'h00e23822, 32'hac670044, 32'h8c020050, 32'h08000011, 32'h20020001, 32'h00024280,
    32'h21070100, 32'h00073982, 32'h20090500, 32'h00095022, 32'h000a59c3, 32'h000b6022,
    32'h00ec1020, 32'hac020054};

  imem dut (.a(a), .rd(rd));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = 6'(i);
      #1;
      checks++;
      if (rd !== ((i < 26) ? exp_prog[i] : 32'h0)) begin
        failures++;
        $display("FAIL word %0d = %h", i, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
