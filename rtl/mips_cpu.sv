// mips_cpu: 32-bit multicycle processor for a subset of the MIPS ISA.
//
// Executes add, sub, and, or, slt, sll, srl (R-type), addi, slti, andi, ori
// (immediate), lw, sw (base register + 16-bit offset), beq, bne and j, with
// 32 registers of 32 bits ($0 reads as zero). mips_control steps each
// instruction through FETCH, DECODE, EXEC, MEM, WB; this module holds the
// PC, IR, A, B, ALUOut and MDR latches, the register file and the ALU.
// Addresses are in bytes; memory is a word array, so the port carries a
// word address (byte address / 4) and the two low bits of a load/store
// address are ignored. The 16-bit load/store offset is a byte offset, as in
// the encoding of lw $t0, 32($s2). Branch target: PC + 4 + (offset << 2).
// Jump target: the top four bits of PC + 4 followed by the 26-bit address
// and 00, so a jump stays inside its 256 MB region. Immediates of addi,
// slti, lw, sw, beq, bne are sign-extended, andi and ori zero-extended.
// Clocks per instruction: lw 5, sw 4, R/I 4, beq/bne 3, j 2. The memory
// port has combinational read and is shared by fetch and data accesses.
// The formats, the instruction list and the jump rule follow the MIPS
// machine described; the byte offset of lw/sw and the branch arithmetic
// follow the standard MIPS architecture, and the multicycle organisation,
// word-only accesses and the absence of exceptions are this design's
// choices.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned MAW = 30  // word-address width of the memory port
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic [MAW-1:0]  mem_addr,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  output logic            idle,
  output logic [XLEN-1:0] pc,
  output logic            retire_valid,
  output logic [XLEN-1:0] retire_pc,
  output logic [XLEN-1:0] retire_ir,
  output logic            wb_we,
  output logic [4:0]      wb_addr,
  output logic [XLEN-1:0] wb_data
);

  logic [XLEN-1:0] pc_q, ir_q, irpc_q, a_q, b_q, aluout_q, mdr_q;
  state_e          state;
  ctl_t            ctl;

  logic [5:0]  f_op, f_funct;
  logic [4:0]  f_rs, f_rt, f_rd, f_shamt;
  logic [15:0] f_imm;
  logic [25:0] f_jaddr;

  assign f_op    = ir_q[31:26];
  assign f_rs    = ir_q[25:21];
  assign f_rt    = ir_q[20:16];
  assign f_rd    = ir_q[15:11];
  assign f_shamt = ir_q[10:6];
  assign f_funct = ir_q[5:0];
  assign f_imm   = ir_q[15:0];
  assign f_jaddr = ir_q[25:0];

  mips_control u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .run   (run),
    .opcode(f_op),
    .funct (f_funct),
    .state (state),
    .ctl   (ctl)
  );

  logic [XLEN-1:0] rd1, rd2, rf_wd;
  logic [4:0]      rf_wa;

  assign rf_wa = ctl.dst_rd ? f_rd : f_rt;
  assign rf_wd = ctl.wb_mdr ? mdr_q : aluout_q;

  regfile #(.W(XLEN), .NREGS(NREGS)) u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra1  (f_rs),
    .rd1  (rd1),
    .ra2  (f_rt),
    .rd2  (rd2),
    .we   (ctl.rf_we),
    .wa   (rf_wa),
    .wd   (rf_wd)
  );

  logic [XLEN-1:0] sext, alu_b, alu_y;
  logic            alu_zero;

  assign sext = {{(XLEN-16){f_imm[15]}}, f_imm};

  always_comb begin
    unique case (ctl.srcb)
      SRCB_SEXT: alu_b = sext;
      SRCB_ZEXT: alu_b = {{(XLEN-16){1'b0}}, f_imm};
      default:   alu_b = b_q;
    endcase
  end

  mips_alu #(.W(XLEN)) u_alu (
    .a    (a_q),
    .b    (alu_b),
    .shamt(f_shamt),
    .op   (ctl.alu_op),
    .y    (alu_y),
    .zero (alu_zero)
  );

  logic            br_taken;
  logic [XLEN-1:0] pc_next;

  assign br_taken = ctl.br_ne ? !alu_zero : alu_zero;

  always_comb begin
    pc_next = pc_q;
    if (ctl.fetch) pc_next = pc_q + XLEN'(4);
    else if (ctl.pc_we) begin
      unique case (ctl.pc_sel)
        PC_BR:   if (br_taken) pc_next = pc_q + {sext[XLEN-3:0], 2'b00};
        PC_J:    pc_next = {pc_q[XLEN-1:28], f_jaddr, 2'b00};
        default: pc_next = pc_q;
      endcase
    end
  end

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
      if (ctl.alu_we) aluout_q <= alu_y;
      if (ctl.mdr_we) mdr_q <= mem_rdata;
    end
  end

  logic [XLEN-1:0] byte_addr;
  assign byte_addr = ctl.mem_data ? aluout_q : pc_q;
  assign mem_addr  = byte_addr[MAW+1:2];
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
