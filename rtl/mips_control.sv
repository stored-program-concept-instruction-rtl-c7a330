// mips_control: multicycle controller of the MIPS subset machine.
//
// The same step sequence as the example 16-bit machine:
//   FETCH   IR <= mem[PC], PC <= PC + 4
//   DECODE  A <= rs, B <= rt; j jumps and finishes
//   EXEC    lw/sw: ALUOut <= rs + offset; R-type and immediates: operate;
//           beq/bne: rs - rt, branch if taken, finish
//   MEM     lw: MDR <= mem[ALUOut]; sw: mem[ALUOut] <= rt, finish
//   WB      lw: rt <= MDR; R-type: rd <= ALUOut; immediates: rt <= ALUOut
// giving lw 5, sw 4, R/I 4, beq/bne 3 and j 2 clocks. A new instruction is
// fetched only while run is high. An opcode or funct outside the subset
// runs as a no-op (4 clocks, nothing written), which is this design's
// choice.
module mips_control
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output state_e     state,
  output ctl_t       ctl
);

  state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_FETCH;
    else        state_q <= state_d;
  end

  assign state = state_q;

  logic is_mem, is_br, is_rtype, rtype_ok, is_imm;
  assign is_mem   = (opcode == OPC_LW) || (opcode == OPC_SW);
  assign is_br    = (opcode == OPC_BEQ) || (opcode == OPC_BNE);
  assign is_rtype = (opcode == OPC_RTYPE);
  assign rtype_ok = funct inside {FN_SLL, FN_SRL, FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
  assign is_imm   = opcode inside {OPC_ADDI, OPC_SLTI, OPC_ANDI, OPC_ORI};

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_FETCH:  state_d = run ? S_DECODE : S_FETCH;
      S_DECODE: state_d = (opcode == OPC_J) ? S_FETCH : S_EXEC;
      S_EXEC:   state_d = is_mem ? S_MEM : (is_br ? S_FETCH : S_WB);
      S_MEM:    state_d = (opcode == OPC_LW) ? S_WB : S_FETCH;
      S_WB:     state_d = S_FETCH;
      default:  state_d = S_FETCH;
    endcase
  end

  always_comb begin
    ctl = '0;
    unique case (state_q)
      S_FETCH: ctl.fetch = run;
      S_DECODE: begin
        ctl.ab_we = 1'b1;
        if (opcode == OPC_J) begin
          ctl.pc_we  = 1'b1;
          ctl.pc_sel = PC_J;
          ctl.retire = 1'b1;
        end
      end
      S_EXEC: begin
        ctl.alu_we = 1'b1;
        if (is_mem) begin
          ctl.srcb = SRCB_SEXT; ctl.alu_op = ALU_ADD;
        end else if (is_br) begin
          ctl.alu_we = 1'b0;
          ctl.srcb   = SRCB_REG;
          ctl.alu_op = ALU_SUB;
          ctl.pc_we  = 1'b1;
          ctl.pc_sel = PC_BR;
          ctl.br_ne  = (opcode == OPC_BNE);
          ctl.retire = 1'b1;
        end else if (is_rtype) begin
          ctl.srcb = SRCB_REG;
          unique case (funct)
            FN_SLL:  ctl.alu_op = ALU_SLL;
            FN_SRL:  ctl.alu_op = ALU_SRL;
            FN_SUB:  ctl.alu_op = ALU_SUB;
            FN_AND:  ctl.alu_op = ALU_AND;
            FN_OR:   ctl.alu_op = ALU_OR;
            FN_SLT:  ctl.alu_op = ALU_SLT;
            default: ctl.alu_op = ALU_ADD;
          endcase
        end else begin
          unique case (opcode)
            OPC_SLTI: begin ctl.srcb = SRCB_SEXT; ctl.alu_op = ALU_SLT; end
            OPC_ANDI: begin ctl.srcb = SRCB_ZEXT; ctl.alu_op = ALU_AND; end
            OPC_ORI:  begin ctl.srcb = SRCB_ZEXT; ctl.alu_op = ALU_OR;  end
            default:  begin ctl.srcb = SRCB_SEXT; ctl.alu_op = ALU_ADD; end
          endcase
        end
      end
      S_MEM: begin
        ctl.mem_data = 1'b1;
        if (opcode == OPC_LW) ctl.mdr_we = 1'b1;
        else begin
          ctl.mem_we = 1'b1;
          ctl.retire = 1'b1;
        end
      end
      S_WB: begin
        ctl.retire = 1'b1;
        ctl.rf_we  = (opcode == OPC_LW) || is_imm || (is_rtype && rtype_ok);
        ctl.wb_mdr = (opcode == OPC_LW);
        ctl.dst_rd = is_rtype;
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
