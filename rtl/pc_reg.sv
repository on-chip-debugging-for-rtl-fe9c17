// pc_reg: the program counter register. Loads `d` on every rising clock edge
// and returns to address 0 on a synchronous reset (the first instruction of the
// test program is at address 0).
module pc_reg
  import ocd_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  word_t d,
  output word_t q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
