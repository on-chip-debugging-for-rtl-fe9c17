// tb_shifter: checks sll, srl and sra (modes 00, 10, 11) and the unused mode
// 01 against shifts computed bit by bit, plus the three shifts of the test program.
module tb_shifter;
  logic [31:0] a, y;
  logic [4:0]  sh;
  logic [1:0]  mode;
  int checks = 0, failures = 0;

  shifter dut (.a(a), .shamt(sh), .mode(mode), .y(y));

  function automatic logic [31:0] ref_sh(input logic [31:0] x, input int n, input logic [1:0] m);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      if (!m[1])              r[i] = (i - n >= 0) ? x[i - n] : 1'b0;
      else if (i + n <= 31)   r[i] = x[i + n];
      else                    r[i] = m[0] ? x[31] : 1'b0;
    end
    return r;
  endfunction

  task automatic check(input logic [31:0] ta, input int n, input logic [1:0] m, input logic [31:0] e);
    a = ta; sh = 5'(n); mode = m;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL a=%h sh=%0d mode=%b y=%h exp=%h", ta, n, m, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h7, 10, 2'b00, 32'h1c00);
    check(32'h1d00, 6, 2'b10, 32'h74);
    check(32'hfffffb00, 7, 2'b11, 32'hfffffff6);
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] v;
      int n;
      logic [1:0] m;
      v = $urandom; n = $urandom_range(0, 31); m = 2'($urandom);
      check(v, n, m, ref_sh(v, n, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
