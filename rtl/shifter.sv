// shifter: the barrel shifter added to the MIPS datapath for sll, srl and sra.
// It shifts the register operand `a` (SrcB, which is rt for R-type
// instructions) by `shamt` (instr[10:6]); `mode` is instr[1:0] of the funct
// field: 00 shift left logical, 10 shift right logical, 11 shift right
// arithmetic. The operand, the shift amount and the mode bits are as the
// document draws them; mode 01 has no instruction and is treated here as a left
// shift (bit 1 chooses the direction, bit 0 sign fill). Combinational.
module shifter
  import ocd_pkg::*;
(
  input  word_t      a,
  input  logic [4:0] shamt,
  input  logic [1:0] mode,
  output word_t      y
);
  always_comb begin
    if (!mode[1])     y = a << shamt;
    else if (mode[0]) y = word_t'($signed(a) >>> shamt);
    else              y = a >> shamt;
  end
endmodule
