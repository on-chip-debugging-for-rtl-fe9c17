// tb_char_mem: random writes and reads against a model; checks the one-clock
// read latency and read-during-write of another address.
module tb_char_mem;
  logic clk = 0, we;
  logic [11:0] waddr, raddr;
  logic [6:0] wdata, rdata;
  logic [6:0] model [4096];
  logic [6:0] exp_q;
  int checks = 0, failures = 0;

  char_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; raddr = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      waddr = 12'(i); wdata = 7'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 12'($urandom); wdata = 7'($urandom);
      raddr = 12'($urandom);
      if (raddr == waddr) raddr = raddr + 12'd1;
      exp_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #0.5;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL raddr=%h rdata=%h exp=%h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
