// ex16_pkg: types and constants shared by the blocks of the example 16-bit
// machine.
//
// Instruction word (16 bits, one-level 4-bit opcode):
//   [15:12] opcode
//   [11:8]  REG 3 (R-type) / IMMED (I-type) / OFFSET (LW, SW, BEQ, BNE) /
//           TYPE (SHIFT)
//   [7:4]   REG 2
//   [3:0]   REG 1
//   JAL uses [11:0] as a 12-bit jump address.
// The field layout follows the machine's instruction format. The numbering
// of the sixteen opcodes, the list of shift types and the choice of R15 as
// the JAL link register are this design's own choices.
package ex16_pkg;

  localparam int unsigned XLEN   = 16;  // data path, instruction and PC width
  localparam int unsigned NREGS  = 16;  // general-purpose registers
  localparam int unsigned RAW    = 4;   // register address width
  localparam logic [RAW-1:0] LINK_REG = 4'd15;  // written by JAL

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_AND   = 4'd2,
    OP_OR    = 4'd3,
    OP_SLT   = 4'd4,
    OP_ADDI  = 4'd5,
    OP_ANDI  = 4'd6,
    OP_ORI   = 4'd7,
    OP_SLTI  = 4'd8,
    OP_LW    = 4'd9,
    OP_SW    = 4'd10,
    OP_BEQ   = 4'd11,
    OP_BNE   = 4'd12,
    OP_SHIFT = 4'd13,
    OP_JR    = 4'd14,
    OP_JAL   = 4'd15
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // One-bit shift types selected by the 4-bit TYPE field. Codes 7..15 are
  // reserved and copy the operand unchanged.
  typedef enum logic [3:0] {
    SH_SLL  = 4'd0,  // shift left, fill 0
    SH_SRL  = 4'd1,  // shift right, fill 0
    SH_SRA  = 4'd2,  // shift right, fill sign
    SH_ROL  = 4'd3,  // rotate left
    SH_ROR  = 4'd4,  // rotate right
    SH_SL1  = 4'd5,  // shift left, fill 1
    SH_SR1  = 4'd6   // shift right, fill 1
  } shift_e;

  // Steps of the fetch/execute cycle.
  typedef enum logic [2:0] {
    S_FETCH  = 3'd0,  // READ INST
    S_DECODE = 3'd1,  // READ REG 1 / READ REG 2 (JAL, JR finish here)
    S_EXEC   = 3'd2,  // ADD / OPERATE / SUB (branches finish here)
    S_MEM    = 3'd3,  // READ MEM / WRITE MEM (SW finishes here)
    S_WB     = 3'd4   // WRITE REG 2 / WRITE DST
  } state_e;

  typedef enum logic [1:0] {
    PC_INC  = 2'd0,   // PC + 1 (fetch)
    PC_BR   = 2'd1,   // address of the branch + V, if the condition holds
    PC_JAL  = 2'd2,   // {PC[15:12], addr12}
    PC_JR   = 2'd3    // REG 1
  } pc_sel_e;

  typedef enum logic [1:0] {
    WB_ALU  = 2'd0,
    WB_MDR  = 2'd1,
    WB_LINK = 2'd2
  } wb_sel_e;

  typedef enum logic [1:0] {
    DST_R3   = 2'd0,  // IR[11:8]
    DST_R2   = 2'd1,  // IR[7:4]
    DST_LINK = 2'd2   // R15
  } dst_sel_e;

  typedef enum logic [1:0] {
    IMM_NONE = 2'd0,  // second operand is a register
    IMM_SEXT = 2'd1,  // sign-extended 4-bit field
    IMM_ZEXT = 2'd2   // zero-extended 4-bit field
  } imm_sel_e;

  // Control word issued by ex16_control for one clock.
  typedef struct packed {
    logic     fetch;      // load IR with mem[PC], remember PC, PC <= PC + 1
    logic     ab_we;      // latch A <= REG 1, B <= REG 2
    logic     alu_we;     // latch ALUOut
    logic     r_order;    // ALU operands (B, A) instead of (A, imm)
    imm_sel_e imm_sel;    // immediate extension for the second operand
    alu_op_e  alu_op;
    logic     use_shift;  // ALUOut takes the shifter result
    logic     mem_data;   // memory address = ALUOut (else PC)
    logic     mdr_we;     // latch MDR <= memory read data
    logic     mem_we;     // write B to memory
    logic     rf_we;
    wb_sel_e  wb_sel;
    dst_sel_e dst_sel;
    logic     pc_we;      // update PC from pc_sel (branches: if taken)
    pc_sel_e  pc_sel;
    logic     br_ne;      // branch on not-equal (BNE) instead of equal
    logic     retire;     // last step of the instruction
  } ctl_t;

endpackage
