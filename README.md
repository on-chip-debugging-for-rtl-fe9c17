# On-chip debug display for a single-cycle MIPS

A small processor design is easiest to debug when you can see its internal
signals while it runs, not just its top-level pins. This design builds that
view into the hardware itself. A single-cycle MIPS processor carries its
interesting internal signals up the module hierarchy on one typed **debug bus**.
A **report compiler** turns the bus into one line of text per processor clock,
and a **VGA text display** (1024x768, 128 x 48 characters) shows the lines on a
monitor. You clock the processor as slowly as you like, for example from a push
button, and the screen fills with a trace like this:

```
PC:00 instr:20020005 RA1:00 RA2:02 WA3:02 RD1:00000000 RD2:00000000 WD3:00000005 aluA:00000000 aluB:00000005 aluO:00000005
PC:04 instr:2003000c RA1:00 RA2:03 WA3:03 RD1:00000000 RD2:00000000 WD3:0000000c aluA:00000000 aluB:0000000c aluO:0000000c
PC:08 instr:2067fff7 RA1:03 RA2:07 WA3:07 RD1:0000000c RD2:00000000 WD3:00000003 aluA:0000000c aluB:fffffff7 aluO:00000003
...
```

The values are the ones the hardware really had, so none of them is unknown or
undefined. The same approach works for any FPGA design: tap a signal into the
record, and it reaches the top without any port list changing.

Everything is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from the
testbenches. The PLL that makes the pixel clock, the board oscillator and the
monitor are outside the RTL.

## Block structure

```
ocd_top
 ├─ mips_system ─────────────── processor clock (cpu_clk)
 │   ├─ mips
 │   │   ├─ controller (maindec, aludec, ALU_or_Shift decode)
 │   │   └─ datapath (pc_reg, regfile, signext, alu, shifter, muxes)
 │   ├─ imem   (64 words, test program)
 │   └─ dmem   (64 words)
 ├─ report_compiler ─────────── cpu_clk → pix_clk handshake, text writer
 ├─ char_mem x2  (left / right 64 columns)
 ├─ vga_sync, char_gen, font_rom, pixel_data ─ pixel clock (pix_clk)
```

## The debug bus

The bus is a set of packed structs in `rtl/ocd_pkg.sv`, nested to follow the
hierarchy:

| record | filled in by | contents |
|---|---|---|
| `regs_bundle_t` | `regfile` | all 32 registers, `r[i]` = `$i` |
| `dp_report_t` | `datapath` | `pc`, `instr`, `ra1` (rs), `ra2` (rt), `wa3` (write register), `rd1` (SrcA), `rd2` (rt data = store data), `wd3` (write-back value), `alua`, `alub`, `aluout`, and the `regs` record |
| `sys_report_t` | `mips_system` | the `dp_report_t`, plus the data-memory access: `memwrite`, `dataadr`, `writedata`, `readdata` |

Each level drives exactly one output port of its record type. `mips` passes the
datapath record through unchanged. `mips_system` wraps it and adds the memory
fields. To watch another signal, add a field to the right struct and assign it
in the module that owns the signal. The ports in between do not change, because
they carry the whole struct.

Note two of the mappings. `aluout` is the output of the ALU/shifter
multiplexer, so it shows the shifted value for the shift instructions. `wd3` is
the write-back value whether or not the instruction writes a register: for
`sw`, `beq` and `j` it is the ALU output.

Everything on the bus is combinational from the processor state. During a
processor clock period it describes the instruction now executing.

## The processor

This is the classic single-cycle MIPS subset: `add sub and or slt lw sw beq
addi j`. It is extended with three R-type shifts, each written
`op rd, rt, shamt`:

| instr | funct | operation |
|---|---|---|
| `sll` | `000000` | `rd = rt << shamt` |
| `srl` | `000010` | `rd = rt >> shamt` (zero fill) |
| `sra` | `000011` | `rd = rt >>> shamt` (sign fill) |

`shamt` is `instr[10:6]`. The shifter takes SrcB, which is the rt value for
R-type instructions. Its mode is `instr[1:0]`: bit 1 selects right, and bit 0
selects arithmetic. Mode `01` belongs to no instruction and shifts left.

A multiplexer after the ALU picks either the ALU result or the shifter output.
Its select, `ALU_or_Shift`, is decoded from `instr[31:26]` and `instr[5:3]`. It
is 1 when the opcode is 0 and `funct[5:3] = 000`. In this instruction set, only
the three shifts meet that condition.

Control encodings follow the textbook design:

- `ALUControl`: `010` add, `110` sub, `000` and, `001` or, `111` slt.
- `ALUOp`: `00` add, `01` sub, `10` use funct.

An opcode outside the set drives all controls to 0, so it changes no state.
`slt` is the simple form, the sign bit of a − b, with overflow ignored.

Timing is one instruction per rising edge of `cpu_clk`. Reset is synchronous
and active high. It sets the PC to 0 and clears the register file. The
original description does not cover reset. Clearing the registers keeps the first
screen lines well defined.

The instruction memory is loaded from `rtl/mips_test.hex`. That file holds a
26-word test program:

1. The textbook single-cycle test, which exercises every original instruction,
   including one branch that must not be taken, one that is taken and one jump.
2. A block at `0x44`–`0x60` that exercises `sll`, `srl` and `sra`.

The program ends by storing **126 (0x7e) to data address 84**. If any
instruction were implemented wrongly, that final value would come out
different. After that store, the rest of the instruction memory reads as zero
(`sll $0,$0,0`, a no-op).

## Report compiler: crossing from the processor clock

The processor and the display run on unrelated clocks. `cpu_clk` may be
arbitrarily slow. `pix_clk` is 65 MHz. `report_compiler` crosses between them
with a toggle handshake:

1. **Processor side.** On each rising `cpu_clk` edge out of reset, the 11
   displayed fields of the bus are registered into a snapshot, and a toggle bit
   flips. Because the snapshot is taken on the same edge that completes the
   instruction, the row shows the values of the instruction that edge finished.
2. **Pixel side.** A two-flop synchronizer detects the toggle change. The
   snapshot, stable by then, is copied into a line register, and the row is
   marked pending.
3. **Writer.** It emits the 128 characters of the row at one per pixel clock:
   122 characters of text padded with spaces. It then advances the row pointer,
   and after row 47 it wraps to row 0.

Row layout is fixed in the `always_comb` that builds `text`:

- The labels are `PC: instr: RA1: RA2: WA3: RD1: RD2: WD3: aluA: aluB: aluO:`.
- Hex digits are lowercase.
- The PC is shown as its low byte, and register addresses as two digits.

After reset the writer first fills the screen with spaces. This takes 6144
pixel clocks, and `report_busy` is high meanwhile.

**Rate limit.** A row is pending from its arrival until its last character is
written, about 130 pixel clocks. A processor edge that arrives while a row is
pending is dropped, and the sticky `overrun` output is set. Keep `cpu_clk`
slower than about 2 µs per cycle at 65 MHz. Also keep it stopped until
`report_busy` falls after reset. In tracing use, with the processor clocked by
a button or a divided clock, this is never an issue.

## Text display pipeline

`vga_sync` generates standard VESA 1024x768 at 60 Hz timing:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (clocks) | 1024 | 24 | 136 | 160 | 1344 |
| vertical (lines) | 768 | 3 | 6 | 29 | 806 |

Both sync pulses are active low, at a 65 MHz pixel clock.

For the pixel at (x, y), the pipeline runs as follows:

| clock | stage |
|---|---|
| t | `vga_sync` presents x, y. `char_gen` addresses both character memories with `{y[9:4], x[8:3]}`: row 0–47, column within a 64-column half. |
| t+1 | The memories answer. `char_gen` keeps the right half if `x[9]` was set, and addresses `font_rom` with `{code[6:0], y[3:0]}`. |
| t+2 | The font byte arrives. `pixel_data` picks bit `7 − x[2:0]` with the delayed `video_on`, and registers the colour. |
| t+3 | The colour and `vga_blank_n` are on the outputs. `vga_sync` delays hsync and vsync by 3 clocks (`SYNC_DELAY`) to match. |

The two character memories each hold one half of every text row. Both are
simple dual-port RAMs with a registered read, so they map onto FPGA block RAM.
Each holds 4096 x 7 bits, of which 48 x 64 entries are used.

The font ROM stores 16 bytes per 7-bit character code, with the MSB as the
leftmost pixel. The shipped table, `rtl/font_rom.hex`, contains only the
characters the report prints: hex digits, the label letters and `:`. Each is a
5x7 dot shape drawn in columns 1–5 of the cell, with every dot row doubled
(rows 1–14). All other codes are blank. To show other text, replace the table.

Text is green on black by default (the `pixel_data` parameters `FG_RGB` and
`BG_RGB`). The colour outputs are 8 bits per channel, plus `vga_blank_n`.

## Top-level ports (`ocd_top`)

| port | dir | meaning |
|---|---|---|
| `cpu_clk` | in | processor clock, slow (see the rate limit above) |
| `pix_clk` | in | 65 MHz pixel clock (from a PLL on an FPGA board) |
| `reset` | in | synchronous, active high; hold it across at least one edge of each clock |
| `vga_hs`, `vga_vs` | out | sync pulses, active low |
| `vga_r/g/b[7:0]`, `vga_blank_n` | out | colour and blanking |
| `memwrite`, `dataadr`, `writedata` | out | the processor's data-memory port |
| `report_row` | out | screen row the next report line goes to |
| `report_busy` | out | screen clear or row write in progress |
| `overrun` | out | sticky: a report row was dropped |

## Design decisions beyond the original description

The organisation, the debug-record contents and grouping, the shift-instruction
datapath, the test program and the display arrangement follow the source
description. These details were not specified and are this design's own:

- The 64-word memories and the reset behaviour, as described above.
- The exact `ALU_or_Shift` decode. Only its inputs are given.
- The treatment of shifter mode `01`.
- The VGA porch and sync widths: standard VESA, since only the resolution is
  given.
- The 8x16 character cell and the 128 x 48 screen.
- The split of the screen between the two character memories: left and right
  halves. Two character memories are called for, but not how they share the
  text.
- The glyph shapes.
- The clock-domain handshake, screen clear, row wrap and overrun flag.
- The registered pipeline and the sync delay that keeps it aligned.

A PLL raises the board clock to the pixel clock. It is not included, because
it is a vendor clock macro. Feed `pix_clk` from your FPGA's PLL: 65 MHz for
1024x768 at 60 Hz.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Run them from the directory that holds `rtl/`
and `tb/`, because the memories load `rtl/mips_test.hex` and `rtl/font_rom.hex`
by relative path. For example, for the whole system:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/ocd_pkg.sv tb/tb_trace_pkg.sv tb/tb_mips_iss_pkg.sv tb/tb_ocd_top.sv \
  --top-module tb_ocd_top -Mdir obj_top
./obj_top/Vtb_ocd_top
```

For any other testbench, replace `tb_ocd_top`.

- **`tb_ocd_top`** runs the full-size design end to end in a few seconds:
  - screen clear;
  - 50 processor clocks: the whole program, then zero words until the screen
    wraps;
  - the two stores (7 to address 80, 126 to 84), the taken branch, the jump and
    the three shifts;
  - a whole video frame, in which every visible pixel is compared with the text
    the screen must hold, and the line and frame timing are checked;
  - finally, two processor edges close together, to provoke an overrun.
- **`tb_mips_system`** compares the debug bus, clock by clock, with a
  hand-derived table of all 24 executed instructions (`tb/tb_trace_pkg.sv`).
  It also prints the trace, one `pc=.., instr=.., A1=..` line per clock.
- **`tb_mips`** and **`tb_datapath`** run random programs against an
  instruction-level model (`tb/tb_mips_iss_pkg.sv`).
- The remaining testbenches cover one block each.

## Files

- `rtl/ocd_pkg.sv`: debug records, opcodes, control types.
- `rtl/*.sv`: one module per file, named after the module.
- `rtl/mips_test.hex`: the test program, one word per line, from address 0.
- `rtl/font_rom.hex`: the font, 2048 bytes, address `{code, row}`.
- `tb/tb_*.sv`: testbenches and their two helper packages.

Both ROMs are filled with `$readmemh` in an `initial` block, which FPGA
synthesis tools turn into initialised block RAM. Some open-source synthesis
front ends skip `$readmemh`. With such a front end the ROMs come out empty and
most of the processor is optimised away, so resource counts from that flow are
not meaningful.
