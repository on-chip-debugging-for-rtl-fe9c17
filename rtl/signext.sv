// signext: sign-extends the 16-bit immediate field of an I-type instruction to
// 32 bits for the ALU and the branch-target adder. Combinational.
module signext (
  input  logic [15:0] a,
  output logic [31:0] y
);
  assign y = {{16{a[15]}}, a};
endmodule
