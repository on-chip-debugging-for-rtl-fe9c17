// tb_trace_pkg: expected debug-bus values for the 24 executed instructions of the test
// program, one entry per processor clock, worked out by hand from the program
// (register $0..$12 start at 0 after reset). Fields: pc, instr, RA1, RA2, WA3,
// RD1, RD2, WD3, ALU A, ALU B, ALU out. Also a formatter that prints an entry
// the way the display row is laid out, written independently of the RTL.
package tb_trace_pkg;
  typedef struct {
    int unsigned pc;
    logic [31:0] instr;
    int unsigned ra1, ra2, wa3;
    logic [31:0] rd1, rd2, wd3, alua, alub, aluout;
  } row_t;

  localparam int NROWS = 24;  // instructions executed up to and including the final store

  function automatic row_t exp_row(input int i);
    row_t t;
    unique case (i)
      0:  t = '{'h00, 32'h20020005, 0, 2, 2, 32'h0, 32'h0, 32'h5, 32'h0, 32'h5, 32'h5};
      1:  t = '{'h04, 32'h2003000c, 0, 3, 3, 32'h0, 32'h0, 32'hc, 32'h0, 32'hc, 32'hc};
      2:  t = '{'h08, 32'h2067fff7, 3, 7, 7, 32'hc, 32'h0, 32'h3, 32'hc, 32'hfffffff7, 32'h3};
      3:  t = '{'h0c, 32'h00e22025, 7, 2, 4, 32'h3, 32'h5, 32'h7, 32'h3, 32'h5, 32'h7};
      4:  t = '{'h10, 32'h00642824, 3, 4, 5, 32'hc, 32'h7, 32'h4, 32'hc, 32'h7, 32'h4};
      5:  t = '{'h14, 32'h00a42820, 5, 4, 5, 32'h4, 32'h7, 32'hb, 32'h4, 32'h7, 32'hb};
      6:  t = '{'h18, 32'h10a7000a, 5, 7, 7, 32'hb, 32'h3, 32'h8, 32'hb, 32'h3, 32'h8};
      7:  t = '{'h1c, 32'h0064202a, 3, 4, 4, 32'hc, 32'h7, 32'h0, 32'hc, 32'h7, 32'h0};
      8:  t = '{'h20, 32'h10800001, 4, 0, 0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0};
      9:  t = '{'h28, 32'h00e2202a, 7, 2, 4, 32'h3, 32'h5, 32'h1, 32'h3, 32'h5, 32'h1};
      10: t = '{'h2c, 32'h00853820, 4, 5, 7, 32'h1, 32'hb, 32'hc, 32'h1, 32'hb, 32'hc};
      11: t = '{'h30, 32'h00e23822, 7, 2, 7, 32'hc, 32'h5, 32'h7, 32'hc, 32'h5, 32'h7};
      12: t = '{'h34, 32'hac670044, 3, 7, 7, 32'hc, 32'h7, 32'h50, 32'hc, 32'h44, 32'h50};
      13: t = '{'h38, 32'h8c020050, 0, 2, 2, 32'h0, 32'h5, 32'h7, 32'h0, 32'h50, 32'h50};
      14: t = '{'h3c, 32'h08000011, 0, 0, 0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0};
      15: t = '{'h44, 32'h00024280, 0, 2, 8, 32'h0, 32'h7, 32'h1c00, 32'h0, 32'h7, 32'h1c00};
      16: t = '{'h48, 32'h21070100, 8, 7, 7, 32'h1c00, 32'h7, 32'h1d00, 32'h1c00, 32'h100, 32'h1d00};
      17: t = '{'h4c, 32'h00073982, 0, 7, 7, 32'h0, 32'h1d00, 32'h74, 32'h0, 32'h1d00, 32'h74};
      18: t = '{'h50, 32'h20090500, 0, 9, 9, 32'h0, 32'h0, 32'h500, 32'h0, 32'h500, 32'h500};
      19: t = '{'h54, 32'h00095022, 0, 9, 10, 32'h0, 32'h500, 32'hfffffb00, 32'h0, 32'h500, 32'hfffffb00};
      20: t = '{'h58, 32'h000a59c3, 0, 10, 11, 32'h0, 32'hfffffb00, 32'hfffffff6, 32'h0, 32'hfffffb00, 32'hfffffff6};
      21: t = '{'h5c, 32'h000b6022, 0, 11, 12, 32'h0, 32'hfffffff6, 32'ha, 32'h0, 32'hfffffff6, 32'ha};
      22: t = '{'h60, 32'h00ec1020, 7, 12, 2, 32'h74, 32'ha, 32'h7e, 32'h74, 32'ha, 32'h7e};
      23: t = '{'h64, 32'hac020054, 0, 2, 2, 32'h0, 32'h7e, 32'h54, 32'h0, 32'h54, 32'h54};
      // after the program: zero words (sll $0,$0,0) at pc 0x68 onwards
      default: t = '{32'h68 + 4 * (i - 24), 32'h0, 0, 0, 0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0};
    endcase
    return t;
  endfunction

  function automatic string fmt_row(input row_t t);
    return $sformatf("PC:%02h instr:%08h RA1:%02h RA2:%02h WA3:%02h RD1:%08h RD2:%08h WD3:%08h aluA:%08h aluB:%08h aluO:%08h",
                     t.pc[7:0], t.instr, t.ra1[7:0], t.ra2[7:0], t.wa3[7:0], t.rd1, t.rd2, t.wd3,
                     t.alua, t.alub, t.aluout);
  endfunction
endpackage
