// ex16_control: multicycle fetch/execute controller of the example machine.
//
// Each instruction walks through the steps of the machine's operation table:
//   FETCH   READ INST: IR <= mem[PC], PC <= PC + 1            (all)
//   DECODE  READ REG 1 / REG 2 into A and B; JAL and JR jump and finish
//   EXEC    LW/SW: ALUOut <= REG 1 + OFFSET; R/I: OPERATE; SHIFT;
//           BEQ/BNE: SUB REG 2 from REG 1, branch if taken, finish
//   MEM     LW: MDR <= mem[ALUOut]; SW: mem[ALUOut] <= REG 2, finish
//   WB      LW: REG 2 <= MDR; R-type: REG 3 <= ALUOut; I/SHIFT: REG 2
// Steps the table leaves empty are skipped, so an instruction takes
// LW 5, SW 4, R/I/SHIFT 4, BEQ/BNE 3 and JAL/JR 2 clocks. A new instruction
// is fetched only while run is high; with run low the controller waits in
// FETCH with no side effects. ctl is a Moore output of state and opcode;
// retire marks the last clock of an instruction.
// The step sequence follows the operation table; skipping empty steps and
// finishing jumps in the register-read step are this design's choices.
module ex16_control
  import ex16_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    run,
  input  opcode_e opcode,
  output state_e  state,
  output ctl_t    ctl
);

  state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_FETCH;
    else        state_q <= state_d;
  end

  assign state = state_q;

  // Next state
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_FETCH:  state_d = run ? S_DECODE : S_FETCH;
      S_DECODE: state_d = (opcode inside {OP_JAL, OP_JR}) ? S_FETCH : S_EXEC;
      S_EXEC: begin
        if (opcode inside {OP_LW, OP_SW})        state_d = S_MEM;
        else if (opcode inside {OP_BEQ, OP_BNE}) state_d = S_FETCH;
        else                                     state_d = S_WB;
      end
      S_MEM:    state_d = (opcode == OP_LW) ? S_WB : S_FETCH;
      S_WB:     state_d = S_FETCH;
      default:  state_d = S_FETCH;
    endcase
  end

  // Control word
  always_comb begin
    ctl = '0;
    unique case (state_q)
      S_FETCH: ctl.fetch = run;
      S_DECODE: begin
        ctl.ab_we = 1'b1;
        if (opcode == OP_JAL) begin
          ctl.rf_we   = 1'b1;
          ctl.wb_sel  = WB_LINK;
          ctl.dst_sel = DST_LINK;
          ctl.pc_we   = 1'b1;
          ctl.pc_sel  = PC_JAL;
          ctl.retire  = 1'b1;
        end else if (opcode == OP_JR) begin
          ctl.pc_we   = 1'b1;
          ctl.pc_sel  = PC_JR;
          ctl.retire  = 1'b1;
        end
      end
      S_EXEC: begin
        ctl.alu_we = 1'b1;
        unique case (opcode)
          OP_ADD:  begin ctl.r_order = 1'b1; ctl.alu_op = ALU_ADD; end
          OP_SUB:  begin ctl.r_order = 1'b1; ctl.alu_op = ALU_SUB; end
          OP_AND:  begin ctl.r_order = 1'b1; ctl.alu_op = ALU_AND; end
          OP_OR:   begin ctl.r_order = 1'b1; ctl.alu_op = ALU_OR;  end
          OP_SLT:  begin ctl.r_order = 1'b1; ctl.alu_op = ALU_SLT; end
          OP_ADDI: begin ctl.imm_sel = IMM_SEXT; ctl.alu_op = ALU_ADD; end
          OP_ANDI: begin ctl.imm_sel = IMM_ZEXT; ctl.alu_op = ALU_AND; end
          OP_ORI:  begin ctl.imm_sel = IMM_ZEXT; ctl.alu_op = ALU_OR;  end
          OP_SLTI: begin ctl.imm_sel = IMM_SEXT; ctl.alu_op = ALU_SLT; end
          OP_LW, OP_SW: begin ctl.imm_sel = IMM_SEXT; ctl.alu_op = ALU_ADD; end
          OP_SHIFT: ctl.use_shift = 1'b1;
          OP_BEQ, OP_BNE: begin
            // A - B with the second operand taken from REG 2
            ctl.alu_we  = 1'b0;
            ctl.alu_op  = ALU_SUB;
            ctl.imm_sel = IMM_NONE;
            ctl.pc_we   = 1'b1;
            ctl.pc_sel  = PC_BR;
            ctl.br_ne   = (opcode == OP_BNE);
            ctl.retire  = 1'b1;
          end
          default: ;
        endcase
      end
      S_MEM: begin
        ctl.mem_data = 1'b1;
        if (opcode == OP_LW) begin
          ctl.mdr_we = 1'b1;
        end else begin
          ctl.mem_we = 1'b1;
          ctl.retire = 1'b1;
        end
      end
      S_WB: begin
        ctl.rf_we  = 1'b1;
        ctl.retire = 1'b1;
        if (opcode == OP_LW) begin
          ctl.wb_sel  = WB_MDR;
          ctl.dst_sel = DST_R2;
        end else if (opcode inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_SLT}) begin
          ctl.wb_sel  = WB_ALU;
          ctl.dst_sel = DST_R3;
        end else begin
          ctl.wb_sel  = WB_ALU;
          ctl.dst_sel = DST_R2;
        end
      end
      default: ;
    endcase
  end

  // Every instruction ends in exactly one retiring step, after which the
  // next step is FETCH; memory is written only in the MEM step.
  a_retire_to_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.retire |-> state_d == S_FETCH);
  a_fetch_next: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != S_FETCH && state_d == S_FETCH) |-> ctl.retire);
  a_mem_we_step: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.mem_we |-> state_q == S_MEM);

endmodule
