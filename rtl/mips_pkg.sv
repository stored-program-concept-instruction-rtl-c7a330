// mips_pkg: types and constants of the 32-bit MIPS subset machine.
//
// Three instruction formats, all 32 bits:
//   R  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
//   I  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
//   J  op[31:26] addr26[25:0]
// Opcode 0 (R-type), funct 100000 (add) and lw = 35 are the values shown in
// the machine-language examples; the other codes are the standard MIPS
// assignments.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;

  typedef enum logic [5:0] {
    OPC_RTYPE = 6'd0,
    OPC_J     = 6'd2,
    OPC_BEQ   = 6'd4,
    OPC_BNE   = 6'd5,
    OPC_ADDI  = 6'd8,
    OPC_SLTI  = 6'd10,
    OPC_ANDI  = 6'd12,
    OPC_ORI   = 6'd13,
    OPC_LW    = 6'd35,
    OPC_SW    = 6'd43
  } opcode_e;

  typedef enum logic [5:0] {
    FN_SLL = 6'h00,
    FN_SRL = 6'h02,
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_SLT = 6'h2a
  } funct_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4,
    ALU_SLL = 3'd5,
    ALU_SRL = 3'd6
  } alu_op_e;

  typedef enum logic [2:0] {
    S_FETCH  = 3'd0,
    S_DECODE = 3'd1,
    S_EXEC   = 3'd2,
    S_MEM    = 3'd3,
    S_WB     = 3'd4
  } state_e;

  typedef enum logic [1:0] {
    PC_INC = 2'd0,
    PC_BR  = 2'd1,
    PC_J   = 2'd2
  } pc_sel_e;

  typedef enum logic [1:0] {
    SRCB_REG  = 2'd0,  // rt
    SRCB_SEXT = 2'd1,  // sign-extended imm16
    SRCB_ZEXT = 2'd2   // zero-extended imm16
  } srcb_e;

  typedef struct packed {
    logic    fetch;     // IR <= mem[PC], PC <= PC + 4
    logic    ab_we;     // A <= rs, B <= rt
    logic    alu_we;    // ALUOut <= ALU
    srcb_e   srcb;
    alu_op_e alu_op;
    logic    mem_data;  // memory address = ALUOut (else PC)
    logic    mdr_we;
    logic    mem_we;
    logic    rf_we;
    logic    wb_mdr;    // write MDR (else ALUOut)
    logic    dst_rd;    // destination rd (else rt)
    logic    pc_we;
    pc_sel_e pc_sel;
    logic    br_ne;
    logic    retire;
  } ctl_t;

endpackage
