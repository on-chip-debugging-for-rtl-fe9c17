// ocd_pkg: types and constants shared by the on-chip debug MIPS system.
//
// The central idea of the design is a debug bus that is a single typed record:
// every level of the hierarchy that has signals worth watching fills in its part
// of the record and passes it up as one port, so adding a signal to the display
// means editing the type here, not the port lists of every module.
//   regs_bundle_t : the 32 register-file words (the register file's tap)
//   dp_report_t   : the datapath tap (PC, instruction, register-file addresses and
//                   data, ALU inputs and output) with the registers inside
//   sys_report_t  : the microprocessor-system tap, which adds the data-memory access
// The record fields and their grouping follow the document; the memory-access
// fields, the packing order and the control/ALU encodings are this design's own
// (the encodings follow the classic single-cycle MIPS the document builds on).
package ocd_pkg;

  typedef logic [31:0] word_t;

  // --- debug bus records --------------------------------------------------
  typedef struct packed {
    word_t [31:0] r;             // r[i] is register $i
  } regs_bundle_t;

  typedef struct packed {
    word_t        pc;
    word_t        instr;
    logic  [4:0]  ra1, ra2, wa3; // register-file addresses
    word_t        alua, alub, aluout;
    word_t        rd1, rd2, wd3; // register-file data
    regs_bundle_t regs;
  } dp_report_t;

  typedef struct packed {
    dp_report_t dp;
    logic       memwrite;
    word_t      dataadr;
    word_t      writedata;
    word_t      readdata;
  } sys_report_t;

  // --- instruction fields --------------------------------------------------
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_J     = 6'b000010;

  localparam logic [5:0] FN_SLL = 6'b000000;
  localparam logic [5:0] FN_SRL = 6'b000010;
  localparam logic [5:0] FN_SRA = 6'b000011;
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALUControl: bit 2 inverts B (subtract), bits 1:0 pick the result
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // ALUOp from the main decoder to the ALU decoder
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10
  } aluop_e;

  // shifter mode, instr[1:0]
  typedef enum logic [1:0] {
    SH_SLL = 2'b00,
    SH_SRL = 2'b10,
    SH_SRA = 2'b11
  } shift_mode_e;

  // main decoder outputs
  typedef struct packed {
    logic   regwrite;
    logic   regdst;
    logic   alusrc;
    logic   branch;
    logic   memwrite;
    logic   memtoreg;
    logic   jump;
    aluop_e aluop;
  } maindec_t;

  // controls into the datapath
  typedef struct packed {
    logic    regwrite;
    logic    regdst;
    logic    alusrc;
    logic    branch;
    logic    memwrite;
    logic    memtoreg;
    logic    jump;
    logic    alu_or_shift;
    alu_op_e alucontrol;
  } ctrl_t;

endpackage
