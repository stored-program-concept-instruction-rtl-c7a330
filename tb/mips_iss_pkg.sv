// mips_iss_pkg: instruction-level reference model and assembler helpers for
// the MIPS subset machine, used by the testbenches.
//
// mips_iss executes one instruction per step() on its own registers and a
// word memory of 2**MAW words (byte addresses wrap modulo its size) and
// reports the instruction's address and word, register write, store and
// clock count (lw 5, sw 4, R/I 4, beq/bne 3, j 2; unknown codes run as
// 4-clock no-ops). Written from the MIPS instruction definitions.
package mips_iss_pkg;

  function automatic logic [31:0] enc_r(int funct, int rd, int rs, int rt, int shamt = 0);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(shamt), 6'(funct)};
  endfunction

  function automatic logic [31:0] enc_i(int op, int rt, int rs, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(int addr_bytes);
    return {6'd2, 26'(addr_bytes >> 2)};
  endfunction

  class mips_iss;
    int unsigned maw;
    logic [31:0] r [32];
    logic [31:0] pc;
    logic [31:0] mem [];

    logic [31:0] o_pc, o_ir, o_wd, o_sa, o_sd;
    bit          o_wb, o_st, o_taken;
    logic [4:0]  o_wa;
    int          o_cycles;

    function new(int unsigned maw_i);
      maw = maw_i;
      mem = new[1 << maw];
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 32'h0;
      pc = 32'h0;
    endfunction

    function int unsigned widx(logic [31:0] byte_addr);
      return (byte_addr >> 2) & ((1 << maw) - 1);
    endfunction

    function void write_reg(logic [4:0] a, logic [31:0] d);
      o_wa = a; o_wd = d; o_wb = (a != 0);
      if (a != 0) r[a] = d;
    endfunction

    function void step();
      logic [31:0] ir, rs, rt, se, ze, npc, ea;
      logic [5:0]  op, fn;
      ir = mem[widx(pc)];
      o_pc = pc; o_ir = ir;
      o_wb = 0; o_st = 0; o_taken = 0; o_wa = 0; o_wd = 0; o_sa = 0; o_sd = 0;
      op = ir[31:26]; fn = ir[5:0];
      rs = r[ir[25:21]]; rt = r[ir[20:16]];
      if (ir[25:21] == 0) rs = 0;
      if (ir[20:16] == 0) rt = 0;
      se = 32'($signed(ir[15:0]));
      ze = {16'h0, ir[15:0]};
      npc = pc + 32'd4;
      o_cycles = 4;
      case (op)
        6'd0: begin
          case (fn)
            6'h20: write_reg(ir[15:11], rs + rt);
            6'h22: write_reg(ir[15:11], rs - rt);
            6'h24: write_reg(ir[15:11], rs & rt);
            6'h25: write_reg(ir[15:11], rs | rt);
            6'h2a: write_reg(ir[15:11], ($signed(rs) < $signed(rt)) ? 32'd1 : 32'd0);
            6'h00: write_reg(ir[15:11], rt << ir[10:6]);
            6'h02: write_reg(ir[15:11], rt >> ir[10:6]);
            default: ;
          endcase
        end
        6'd8:  write_reg(ir[20:16], rs + se);
        6'd10: write_reg(ir[20:16], ($signed(rs) < $signed(se)) ? 32'd1 : 32'd0);
        6'd12: write_reg(ir[20:16], rs & ze);
        6'd13: write_reg(ir[20:16], rs | ze);
        6'd35: begin
          ea = rs + se;
          write_reg(ir[20:16], mem[widx(ea)]);
          o_cycles = 5;
        end
        6'd43: begin
          ea = rs + se;
          mem[widx(ea)] = rt;
          o_st = 1; o_sa = widx(ea); o_sd = rt;
        end
        6'd4, 6'd5: begin
          o_taken = (op == 6'd4) ? (rs == rt) : (rs != rt);
          if (o_taken) npc = pc + 32'd4 + (se << 2);
          o_cycles = 3;
        end
        6'd2: begin
          npc = {npc[31:28], ir[25:0], 2'b00};
          o_cycles = 2;
        end
        default: ;
      endcase
      pc = npc;
    endfunction
  endclass

endpackage
