// ex16_iss_pkg: instruction-level reference model and assembler helpers for
// the example 16-bit machine, used by the testbenches.
//
// ex16_iss executes one instruction per step() call on its own copy of the
// registers and the 64K-word memory and reports what the hardware must show
// for that instruction: its address and word, the register write, the
// memory store and the number of clocks it takes (LW 5, SW 4, R/I/SHIFT 4,
// BEQ/BNE 3, JAL/JR 2). It is written from the instruction definitions, not
// from the RTL. The enc_* functions build instruction words.
package ex16_iss_pkg;

  function automatic logic [15:0] enc_r(int op, int r3, int r2, int r1);
    return {4'(op), 4'(r3), 4'(r2), 4'(r1)};
  endfunction

  function automatic logic [15:0] enc_i(int op, int v, int r2, int r1);
    return {4'(op), 4'(v), 4'(r2), 4'(r1)};
  endfunction

  function automatic logic [15:0] enc_jal(int addr);
    return {4'd15, 12'(addr)};
  endfunction

  class ex16_iss;
    logic [15:0] r [16];
    logic [15:0] pc;
    logic [15:0] mem [65536];

    // results of the last step
    logic [15:0] o_pc, o_ir;
    bit          o_wb;
    logic [3:0]  o_wa;
    logic [15:0] o_wd;
    bit          o_st;
    logic [15:0] o_sa, o_sd;
    int          o_cycles;
    bit          o_taken;

    function void reset();
      foreach (r[i]) r[i] = 16'h0;
      pc = 16'h0;
    endfunction

    function void write_reg(logic [3:0] a, logic [15:0] d);
      o_wa = a;
      o_wd = d;
      o_wb = (a != 4'd0);
      if (a != 4'd0) r[a] = d;
    endfunction

    function void step();
      logic [15:0] ir, a, b, sv, zv, npc, ea;
      logic [3:0]  op;
      int          sa, sb;
      ir   = mem[pc];
      o_pc = pc;
      o_ir = ir;
      o_wb = 0; o_st = 0; o_taken = 0;
      o_wa = 0; o_wd = 0; o_sa = 0; o_sd = 0;
      op  = ir[15:12];
      a   = (ir[3:0] == 0) ? 16'h0 : r[ir[3:0]];   // REG 1
      b   = (ir[7:4] == 0) ? 16'h0 : r[ir[7:4]];   // REG 2
      sv  = 16'($signed(ir[11:8]));
      zv  = {12'h0, ir[11:8]};
      npc = pc + 16'd1;
      sa  = $signed(a);
      sb  = $signed(b);
      o_cycles = 4;
      case (op)
        4'd0:  write_reg(ir[11:8], b + a);
        4'd1:  write_reg(ir[11:8], b - a);
        4'd2:  write_reg(ir[11:8], b & a);
        4'd3:  write_reg(ir[11:8], b | a);
        4'd4:  write_reg(ir[11:8], (sb < sa) ? 16'd1 : 16'd0);
        4'd5:  write_reg(ir[7:4], a + sv);
        4'd6:  write_reg(ir[7:4], a & zv);
        4'd7:  write_reg(ir[7:4], a | zv);
        4'd8:  write_reg(ir[7:4], (sa < $signed(sv)) ? 16'd1 : 16'd0);
        4'd9: begin
          ea = a + sv;
          write_reg(ir[7:4], mem[ea]);
          o_cycles = 5;
        end
        4'd10: begin
          ea = a + sv;
          mem[ea] = b;
          o_st = 1; o_sa = ea; o_sd = b;
        end
        4'd11, 4'd12: begin
          o_taken = (op == 4'd11) ? (a == b) : (a != b);
          if (o_taken) npc = pc + sv;
          o_cycles = 3;
        end
        4'd13: begin
          case (ir[11:8])
            4'd0: write_reg(ir[7:4], a * 16'd2);
            4'd1: write_reg(ir[7:4], a / 16'd2);
            4'd2: write_reg(ir[7:4], (a / 16'd2) | (a & 16'h8000));
            4'd3: write_reg(ir[7:4], (a * 16'd2) | (a >> 15));
            4'd4: write_reg(ir[7:4], (a / 16'd2) | (a << 15));
            4'd5: write_reg(ir[7:4], (a * 16'd2) + 16'd1);
            4'd6: write_reg(ir[7:4], (a / 16'd2) + 16'h8000);
            default: write_reg(ir[7:4], a);
          endcase
        end
        4'd14: begin
          npc = a;
          o_cycles = 2;
        end
        default: begin  // JAL
          write_reg(4'd15, pc + 16'd1);
          npc = {npc[15:12], ir[11:0]};
          o_cycles = 2;
        end
      endcase
      pc = npc;
    endfunction
  endclass

endpackage
