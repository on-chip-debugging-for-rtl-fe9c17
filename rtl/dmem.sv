// dmem: data memory, WORDS 32-bit words addressed by the word part of the byte
// address (a[7:2] for 64 words). Reads are combinational, as a single-cycle
// processor needs; a write happens on the rising clock edge when we is high.
module dmem #(
  parameter int WORDS = 64
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] ram [WORDS];

  always_ff @(posedge clk) begin
    if (we) ram[a[AW+1:2]] <= wd;
  end

  assign rd = ram[a[AW+1:2]];
endmodule
