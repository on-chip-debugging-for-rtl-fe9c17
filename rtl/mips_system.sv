// mips_system: the complete microprocessor system - the MIPS processor with its
// instruction memory (holding the test program) and data memory. At this level
// the debug bus gains the data-memory access: the processor's record is wrapped
// in a sys_report_t together with memwrite, the data address, the write data and
// the read data. The memory port is also brought out so a board or testbench can
// watch stores. One instruction per rising edge of clk; reset is synchronous.
module mips_system
  import ocd_pkg::*;
#(
  parameter int    IMEM_WORDS = 64,
  parameter int    DMEM_WORDS = 64,
  parameter string IMEM_FILE  = "rtl/mips_test.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output sys_report_t report,
  output logic        memwrite,
  output word_t       dataadr,
  output word_t       writedata
);
  localparam int IAW = $clog2(IMEM_WORDS);
  word_t      pc, instr, readdata;
  dp_report_t cpu_report;

  mips u_mips (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr), .memwrite(memwrite),
    .aluout(dataadr), .writedata(writedata), .readdata(readdata), .report(cpu_report)
  );

  imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_FILE)) u_imem (.a(pc[IAW+1:2]), .rd(instr));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(memwrite), .a(dataadr), .wd(writedata), .rd(readdata)
  );

  always_comb begin
    report.dp        = cpu_report;
    report.memwrite  = memwrite;
    report.dataadr   = dataadr;
    report.writedata = writedata;
    report.readdata  = readdata;
  end
endmodule
