// imem: instruction memory, a ROM of WORDS 32-bit words read combinationally
// by word address (PC[7:2] for the default 64 words). Its contents are loaded
// from INIT_FILE, one hex word per line; the default file holds the test program
// of the design: the textbook single-cycle test extended with sll, srl and sra,
// which ends by storing 126 (0x7e) at data address 84. Words the file does not
// fill read as 0, which is sll $0,$0,0 and changes nothing.
module imem #(
  parameter int    WORDS     = 64,
  parameter string INIT_FILE = "rtl/mips_test.hex"
) (
  input  logic [$clog2(WORDS)-1:0] a,
  output logic [31:0]              rd
);
  logic [31:0] rom [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) rom[i] = '0;
    $readmemh(INIT_FILE, rom);
  end

  assign rd = rom[a];
endmodule
