// mips_alu: 32-bit ALU of the MIPS subset machine.
//
// y = a OP b for add, sub, and, or, slt (signed, result 1 or 0), and the
// shifts sll/srl, which move b by shamt bits (the R-type SHIFT AMOUNT
// field). zero flags a zero result; beq and bne use it after a subtract.
// Combinational. Arithmetic wraps: the machine raises no overflow
// exception, which is this design's simplification.
module mips_alu
  import mips_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   shamt,
  input  alu_op_e      op,
  output logic [W-1:0] y,
  output logic         zero
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = W'($signed(a) < $signed(b));
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
