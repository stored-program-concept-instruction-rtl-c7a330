// ex16_shifter: one-bit shift/rotate unit of the example 16-bit machine.
//
// The SHIFT instruction carries a 4-bit TYPE field (16 possible types) and
// moves the operand by one bit per instruction. This unit implements seven
// types (see ex16_pkg::shift_e): logical left/right, arithmetic right,
// rotate left/right, and left/right shifts that fill with a 1. The other
// nine codes are reserved and return the operand unchanged, which makes
// them register moves. Purely combinational.
// The 4-bit type field and the one-bit step follow the machine's
// specification; which types exist is this design's choice.
module ex16_shifter
  import ex16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [3:0]   shtype,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (shtype)
      SH_SLL:  y = {a[W-2:0], 1'b0};
      SH_SRL:  y = {1'b0, a[W-1:1]};
      SH_SRA:  y = {a[W-1], a[W-1:1]};
      SH_ROL:  y = {a[W-2:0], a[W-1]};
      SH_ROR:  y = {a[0], a[W-1:1]};
      SH_SL1:  y = {a[W-2:0], 1'b1};
      SH_SR1:  y = {1'b1, a[W-1:1]};
      default: y = a;
    endcase
  end

endmodule
