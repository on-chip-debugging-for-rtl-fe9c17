// alu: 32-bit arithmetic logic unit of the single-cycle MIPS datapath.
// Operations and, or, add, sub and set-less-than, chosen by the 3-bit ALUControl
// (ocd_pkg::alu_op_e). Bit 2 of the control inverts B and sets the carry-in, so
// one adder serves add, sub and slt; slt takes the sign of a-b (overflow is
// ignored, as in the textbook processor the design extends). `zero` flags a
// zero result and drives the branch decision. Purely combinational.
module alu
  import ocd_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e f,
  output word_t   y,
  output logic    zero
);
  word_t bb, sum;

  always_comb begin
    bb  = f[2] ? ~b : b;
    sum = a + bb + {31'b0, f[2]};
    unique case (f[1:0])
      2'b00:   y = a & bb;
      2'b01:   y = a | bb;
      2'b10:   y = sum;
      default: y = {31'b0, sum[31]};
    endcase
  end

  assign zero = (y == '0);
endmodule
