// ex16_alu: arithmetic/logic unit of the example 16-bit machine.
//
// Computes y = a OP b for the five operations of the machine: ADD, SUB,
// AND, OR and SLT (set-less-than, giving 1 or 0). The zero flag is set when
// the result is 0; BEQ and BNE use it after a SUB, as in the machine's
// "SUB REG 2 from REG 1" branch step. Purely combinational.
// The operation list follows the machine's specification; SLT comparing
// signed two's-complement values and wrapping arithmetic are this design's
// choices.
module ex16_alu
  import ex16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
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
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
