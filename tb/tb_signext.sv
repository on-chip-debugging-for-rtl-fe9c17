// tb_signext: checks sign extension of all 65536 immediates.
module tb_signext;
  logic [15:0] a;
  logic [31:0] y;
  int checks = 0, failures = 0;

  signext dut (.a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int signed e;
      a = 16'(i);
      #1;
      e = (i >= 32768) ? i - 65536 : i;
      checks++;
      if (y !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
