// report_compiler: lines up the tapped signals of one processor clock as a row
// of text and writes it into the character memories, one row per processor
// clock, as in
//   PC:00 instr:20020005 RA1:00 RA2:02 WA3:02 RD1:00000000 RD2:00000000 ...
//        ... WD3:00000005 aluA:00000000 aluB:00000005 aluO:00000005
// (122 characters; labels as the design's display prints them, lowercase hex,
// 2 digits for the PC and the register addresses, 8 for data words).
// Processor side (cpu_clk): at each rising edge out of reset the values the
// debug bus carries for the instruction completing at that edge are captured
// in a snapshot register and a toggle flag flips.
// Display side (pix_clk): the toggle is brought over by a two-flop
// synchronizer; its change copies the snapshot (stable by then) into a line
// register and marks a row pending; the row stays pending until its last
// character is written. The writer emits the COLS characters
// of the row, one per pixel clock, at the current row, and advances the row,
// wrapping from ROWS-1 to 0. After reset the writer first fills the whole
// screen with spaces. A snapshot that arrives while a row is still pending is
// dropped and sets the sticky `overrun` flag; the processor clock must
// therefore be slower than about COLS+5 pixel clocks (the document runs the
// processor from a slow clock for tracing). The two-clock handshake, the screen
// clear, the wrap and the overrun flag are this design's own choices.
module report_compiler
  import ocd_pkg::*;
#(
  parameter int COLS = 128,
  parameter int ROWS = 48
) (
  input  logic        cpu_clk,
  input  logic        pix_clk,
  input  logic        reset,
  input  sys_report_t report,
  output logic        we,
  output logic [6:0]  wcol,
  output logic [5:0]  wrow,
  output logic [6:0]  wchar,
  output logic [5:0]  row,
  output logic        busy,
  output logic        overrun
);
  localparam int TEXT_LEN = 122;

  typedef struct packed {
    logic [7:0] pc;
    word_t      instr;
    logic [4:0] ra1, ra2, wa3;
    word_t      rd1, rd2, wd3, alua, alub, aluout;
  } line_t;

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_WRITE} state_e;

  // ---------------- processor clock domain ----------------
  line_t snap;
  logic  snap_tgl;

  always_ff @(posedge cpu_clk) begin
    if (!reset) begin
      snap.pc     <= report.dp.pc[7:0];
      snap.instr  <= report.dp.instr;
      snap.ra1    <= report.dp.ra1;
      snap.ra2    <= report.dp.ra2;
      snap.wa3    <= report.dp.wa3;
      snap.rd1    <= report.dp.rd1;
      snap.rd2    <= report.dp.rd2;
      snap.wd3    <= report.dp.wd3;
      snap.alua   <= report.dp.alua;
      snap.alub   <= report.dp.alub;
      snap.aluout <= report.dp.aluout;
      snap_tgl    <= ~snap_tgl;
    end
  end

  // ---------------- pixel clock domain ----------------
  logic [2:0] tgl_sync;
  logic       arrived;
  line_t      line;
  logic       pending;
  state_e     state;
  logic [6:0] col;
  logic [5:0] clr_row;
  logic [8*COLS-1:0] text;

  assign arrived = tgl_sync[2] ^ tgl_sync[1];

  function automatic logic [7:0] hexc(input logic [3:0] v);
    return (v < 4'd10) ? (8'h30 + 8'(v)) : (8'h57 + 8'(v));  // '0'..'9', 'a'..'f'
  endfunction

  function automatic logic [15:0] hex2(input logic [7:0] v);
    return {hexc(v[7:4]), hexc(v[3:0])};
  endfunction

  function automatic logic [63:0] hex8(input word_t v);
    return {hex2(v[31:24]), hex2(v[23:16]), hex2(v[15:8]), hex2(v[7:0])};
  endfunction

  always_comb begin
    text = {8*COLS{1'b0}};
    text[8*COLS-1 -: 8*TEXT_LEN] = {
      "PC:",    hex2(line.pc),
      " instr:", hex8(line.instr),
      " RA1:",  hex2({3'b0, line.ra1}),
      " RA2:",  hex2({3'b0, line.ra2}),
      " WA3:",  hex2({3'b0, line.wa3}),
      " RD1:",  hex8(line.rd1),
      " RD2:",  hex8(line.rd2),
      " WD3:",  hex8(line.wd3),
      " aluA:", hex8(line.alua),
      " aluB:", hex8(line.alub),
      " aluO:", hex8(line.aluout)};
    for (int i = TEXT_LEN; i < COLS; i++) text[8*(COLS-1-i) +: 8] = 8'h20;
  end

  always_ff @(posedge pix_clk) begin
    tgl_sync <= {tgl_sync[1:0], snap_tgl};
    if (reset) begin
      state   <= S_CLEAR;
      col     <= '0;
      clr_row <= '0;
      row     <= '0;
      pending <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (arrived) begin
        if (pending) overrun <= 1'b1;
        else begin
          line    <= snap;
          pending <= 1'b1;
        end
      end
      unique case (state)
        S_CLEAR: begin
          col <= col + 7'd1;
          if (col == 7'(COLS - 1)) begin
            col <= '0;
            if (clr_row == 6'(ROWS - 1)) state <= S_IDLE;
            else                         clr_row <= clr_row + 6'd1;
          end
        end
        S_IDLE: begin
          col <= '0;
          if (pending) state <= S_WRITE;
        end
        S_WRITE: begin
          col <= col + 7'd1;
          if (col == 7'(COLS - 1)) begin
            col     <= '0;
            row     <= (row == 6'(ROWS - 1)) ? '0 : row + 6'd1;
            pending <= 1'b0;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    we    = !reset && ((state == S_CLEAR) || (state == S_WRITE));
    wcol  = col;
    wrow  = (state == S_CLEAR) ? clr_row : row;
    wchar = (state == S_CLEAR) ? 7'h20 : text[8*(COLS-1-int'(col)) +: 7];
    busy  = (state != S_IDLE) || pending;
  end

  // a row is only written while one is pending, and the row pointer stays on screen
  a_write_pending: assert property (@(posedge pix_clk) disable iff (reset) (state == S_WRITE) |-> pending);
  a_row_range:     assert property (@(posedge pix_clk) disable iff (reset) row < 6'(ROWS));
endmodule
