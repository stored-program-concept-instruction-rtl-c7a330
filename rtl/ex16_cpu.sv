// ex16_cpu: the example 16-bit stored-program processor.
//
// A multicycle machine with 16 registers of 16 bits (R0 reads as zero), a
// 16-bit PC, a 16-bit instruction register and the internal latches A, B
// (the two registers read), ALUOut and MDR (memory data). ex16_control
// sequences each instruction through FETCH, DECODE, EXEC, MEM and WB; this
// module holds the datapath those steps drive.
//   LW  R2, v(R1)     R2 <- mem[R1 + v]            5 clocks
//   SW  R2, v(R1)     mem[R1 + v] <- R2            4 clocks
//   ADD/SUB/AND/OR/SLT R3, R2, R1   R3 <- R2 op R1  4 clocks
//   ADDI/ANDI/ORI/SLTI R2, R1, v    R2 <- R1 op v   4 clocks
//   SHIFT type R2, R1 R2 <- R1 shifted one bit     4 clocks
//   BEQ/BNE R2, R1, v if taken PC <- (own address) + v   3 clocks
//   JAL addr          R15 <- own address + 1, PC <- {PC[15:12], addr}  2
//   JR  R1            PC <- R1                     2 clocks
// v is a 4-bit field, sign-extended except for ANDI and ORI (zero-extended).
// Memory is addressed in 16-bit words through one port shared by fetch and
// data accesses (mem_addr/mem_we/mem_wdata out, mem_rdata in,
// combinational read). run starts a new instruction at each FETCH; idle is
// high while the processor waits in FETCH with run low.
// retire_* report each completed instruction and wb_* each register write,
// for observation and tests.
// Field layout, operations, step table and the PC-relative branch follow the
// machine's specification; immediate extension, the link register and the
// opcode numbering (ex16_pkg) are this design's choices.
module ex16_cpu
  import ex16_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic [XLEN-1:0] mem_addr,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  output logic            idle,
  output logic [XLEN-1:0] pc,
  output logic            retire_valid,
  output logic [XLEN-1:0] retire_pc,
  output logic [XLEN-1:0] retire_ir,
  output logic            wb_we,
  output logic [RAW-1:0]  wb_addr,
  output logic [XLEN-1:0] wb_data
);

  logic [XLEN-1:0] pc_q, ir_q, irpc_q, a_q, b_q, aluout_q, mdr_q;
  state_e          state;
  ctl_t            ctl;
  opcode_e         opcode;

  logic [RAW-1:0]  f_r1, f_r2, f_r3;
  logic [3:0]      f_v;
  logic [11:0]     f_jaddr;

  assign opcode  = opcode_e'(ir_q[15:12]);
  assign f_v     = ir_q[11:8];
  assign f_r3    = ir_q[11:8];
  assign f_r2    = ir_q[7:4];
  assign f_r1    = ir_q[3:0];
  assign f_jaddr = ir_q[11:0];

  ex16_control u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .run   (run),
    .opcode(opcode),
    .state (state),
    .ctl   (ctl)
  );

  // Register file
  logic [XLEN-1:0] rd1, rd2, rf_wd;
  logic [RAW-1:0]  rf_wa;

  always_comb begin
    unique case (ctl.dst_sel)
      DST_R3:   rf_wa = f_r3;
      DST_R2:   rf_wa = f_r2;
      default:  rf_wa = LINK_REG;
    endcase
    unique case (ctl.wb_sel)
      WB_MDR:   rf_wd = mdr_q;
      WB_LINK:  rf_wd = pc_q;       // PC already points past the JAL
      default:  rf_wd = aluout_q;
    endcase
  end

  regfile #(.W(XLEN), .NREGS(NREGS)) u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra1  (f_r1),
    .rd1  (rd1),
    .ra2  (f_r2),
    .rd2  (rd2),
    .we   (ctl.rf_we),
    .wa   (rf_wa),
    .wd   (rf_wd)
  );

  // ALU and shifter
  logic [XLEN-1:0] imm, alu_a, alu_b, alu_y, sh_y;
  logic            alu_zero;

  always_comb begin
    unique case (ctl.imm_sel)
      IMM_SEXT: imm = {{(XLEN-4){f_v[3]}}, f_v};
      IMM_ZEXT: imm = {{(XLEN-4){1'b0}}, f_v};
      default:  imm = b_q;
    endcase
    alu_a = ctl.r_order ? b_q : a_q;
    alu_b = ctl.r_order ? a_q : imm;
  end

  ex16_alu #(.W(XLEN)) u_alu (
    .a   (alu_a),
    .b   (alu_b),
    .op  (ctl.alu_op),
    .y   (alu_y),
    .zero(alu_zero)
  );

  ex16_shifter #(.W(XLEN)) u_sh (
    .a     (a_q),
    .shtype(f_v),
    .y     (sh_y)
  );

  // Next PC
  logic            br_taken;
  logic [XLEN-1:0] pc_next;

  assign br_taken = ctl.br_ne ? !alu_zero : alu_zero;

  always_comb begin
    pc_next = pc_q;
    if (ctl.fetch) pc_next = pc_q + XLEN'(1);
    else if (ctl.pc_we) begin
      unique case (ctl.pc_sel)
        PC_BR:   if (br_taken) pc_next = irpc_q + {{(XLEN-4){f_v[3]}}, f_v};
        PC_JAL:  pc_next = {pc_q[XLEN-1:12], f_jaddr};
        PC_JR:   pc_next = rd1;
        default: pc_next = pc_q;
      endcase
    end
  end

  // Datapath latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      ir_q     <= '0;
      irpc_q   <= '0;
      a_q      <= '0;
      b_q      <= '0;
      aluout_q <= '0;
      mdr_q    <= '0;
    end else begin
      pc_q <= pc_next;
      if (ctl.fetch) begin
        ir_q   <= mem_rdata;
        irpc_q <= pc_q;
      end
      if (ctl.ab_we) begin
        a_q <= rd1;
        b_q <= rd2;
      end
      if (ctl.alu_we) aluout_q <= ctl.use_shift ? sh_y : alu_y;
      if (ctl.mdr_we) mdr_q <= mem_rdata;
    end
  end

  // Memory port: instruction fetch from PC, data access at ALUOut
  assign mem_addr  = ctl.mem_data ? aluout_q : pc_q;
  assign mem_we    = ctl.mem_we;
  assign mem_wdata = b_q;

  assign idle         = (state == S_FETCH) && !run;
  assign pc           = pc_q;
  assign retire_valid = ctl.retire;
  assign retire_pc    = irpc_q;
  assign retire_ir    = ir_q;
  assign wb_we        = ctl.rf_we && (rf_wa != '0);
  assign wb_addr      = rf_wa;
  assign wb_data      = rf_wd;

endmodule
