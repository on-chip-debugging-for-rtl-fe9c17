// char_mem: character (text) memory of the display, a simple dual-port RAM of
// 2**ADDR_W entries of DATA_W-bit character codes. The report compiler writes
// through the write port; the character generator reads through the read port
// with one clock of latency (registered output, as a block RAM has). Both ports
// use the pixel clock. The display uses two of these, one for the left and one
// for the right 64 columns of the 128-column screen; the address is
// {row[5:0], column[5:0]}.
module char_mem #(
  parameter int ADDR_W = 12,
  parameter int DATA_W = 7
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
