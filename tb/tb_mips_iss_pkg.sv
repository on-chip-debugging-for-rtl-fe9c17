// tb_mips_iss_pkg: instruction-level reference model of the MIPS subset
// (add, sub, and, or, slt, sll, srl, sra, addi, lw, sw, beq, j) used by the
// processor testbenches. step() executes one instruction on the model state and
// returns the values the debug record must show during that instruction.
// rand_instr() draws random instructions that keep data addresses inside a
// 64-word memory and jump targets inside a 64-word program.
package tb_mips_iss_pkg;
  typedef struct {
    logic [31:0] pc, instr;
    logic [4:0]  ra1, ra2, wa3;
    logic [31:0] rd1, rd2, wd3, alua, alub, aluout;
    logic        memwrite;
    logic        shift;   // the shifter result was selected
    logic        taken;   // a branch was taken
    logic        jump;
  } exp_t;

  class mips_iss;
    logic [31:0] r [32];
    logic [31:0] mem [64];
    logic [31:0] pc;

    function new();
      foreach (r[i]) r[i] = '0;
      foreach (mem[i]) mem[i] = '0;
      pc = '0;
    endfunction

    function exp_t step(input logic [31:0] instr);
      exp_t e;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd, sa;
      logic [31:0] imm, a, b, res, wd;
      logic        we;
      op = instr[31:26]; fn = instr[5:0];
      rs = instr[25:21]; rt = instr[20:16]; rd = instr[15:11]; sa = instr[10:6];
      imm = {{16{instr[15]}}, instr[15:0]};
      a = r[rs];
      e = '{default: '0};
      e.pc = pc; e.instr = instr; e.ra1 = rs; e.ra2 = rt; e.wa3 = rt;
      e.rd1 = a; e.rd2 = r[rt]; e.alua = a;
      b = r[rt];
      we = 0;
      pc = pc + 4;
      case (op)
        6'h00: begin
          e.wa3 = rd; we = 1;
          case (fn)
            6'h20: res = a + b;
            6'h22: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h2a: res = ($signed(a - b) < 0) ? 32'd1 : 32'd0;
            6'h00: begin res = b << sa; e.shift = 1; end
            6'h02: begin res = b >> sa; e.shift = 1; end
            6'h03: begin res = 32'($signed(b) >>> sa); e.shift = 1; end
            default: res = a + b;
          endcase
          wd = res;
        end
        6'h08: begin b = imm; res = a + imm; wd = res; we = 1; end
        6'h23: begin b = imm; res = a + imm; wd = mem[res[7:2]]; we = 1; end
        6'h2b: begin b = imm; res = a + imm; wd = res; mem[res[7:2]] = r[rt]; e.memwrite = 1; end
        6'h04: begin
          res = a - b; wd = res;
          if (res == 0) begin pc = pc + {imm[29:0], 2'b00}; e.taken = 1; end
        end
        6'h02: begin res = a + b; wd = res; pc = {pc[31:28], instr[25:0], 2'b00}; e.jump = 1; end
        default: begin res = a + b; wd = res; end
      endcase
      e.alub = b; e.aluout = res; e.wd3 = wd;
      if (we && e.wa3 != 0) r[e.wa3] = wd;
      return e;
    endfunction
  endclass

  function automatic logic [31:0] rand_instr();
    logic [4:0] rs, rt, rd;
    rs = 5'($urandom_range(0, 7)); rt = 5'($urandom_range(0, 7)); rd = 5'($urandom_range(0, 7));
    case ($urandom_range(0, 12))
      0:  return {6'h00, rs, rt, rd, 5'd0, 6'h20};
      1:  return {6'h00, rs, rt, rd, 5'd0, 6'h22};
      2:  return {6'h00, rs, rt, rd, 5'd0, 6'h24};
      3:  return {6'h00, rs, rt, rd, 5'd0, 6'h25};
      4:  return {6'h00, rs, rt, rd, 5'd0, 6'h2a};
      5:  return {6'h00, 5'd0, rt, rd, 5'($urandom), 6'h00};
      6:  return {6'h00, 5'd0, rt, rd, 5'($urandom), 6'h02};
      7:  return {6'h00, 5'd0, rt, rd, 5'($urandom), 6'h03};
      8:  return {6'h08, rs, rt, 16'($urandom)};
      9:  return {6'h23, 5'd0, rt, 8'd0, 6'($urandom), 2'b00};
      10: return {6'h2b, 5'd0, rt, 8'd0, 6'($urandom), 2'b00};
      11: return {6'h04, rs, rt, 16'($signed($urandom_range(0, 6)) - 16'sd3)};
      default: return {6'h02, 20'd0, 6'($urandom)};
    endcase
  endfunction
endpackage
