// regfile: the 32 x 32-bit register file of the MIPS datapath.
// Two combinational read ports (ra1/rd1, ra2/rd2) and one write port written on
// the rising clock edge when we3 is high; register 0 always reads 0 and is never
// written. Besides the normal ports it taps all 32 words onto the debug bus
// (`regs`), the lowest level of the debug record. A synchronous reset clears the
// registers; the document does not describe reset, this is chosen so that the
// values shown on screen are defined from the first instruction on.
module regfile
  import ocd_pkg::*;
#(
  parameter int NREGS = 32,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             we3,
  input  logic [4:0]       ra1,
  input  logic [4:0]       ra2,
  input  logic [4:0]       wa3,
  input  logic [WIDTH-1:0] wd3,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  output regs_bundle_t     regs
);
  logic [WIDTH-1:0] rf [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else if (we3 && wa3 != 5'd0) begin
      rf[wa3] <= wd3;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : rf[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : rf[ra2];

  always_comb begin
    regs = '0;
    for (int i = 1; i < NREGS && i < 32; i++) regs.r[i] = word_t'(rf[i]);
  end
endmodule
