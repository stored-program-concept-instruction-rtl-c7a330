// regfile: general-purpose register file with register 0 fixed at zero.
//
// NREGS registers of W bits, two combinational read ports (the "READ REG 1"
// and "READ REG 2" step of every instruction) and one write port that
// writes on the rising clock edge. Register 0 always reads as zero and
// writes to it are dropped, so an instruction that needs no base register
// or no result names register 0. Reset clears every register.
// Used with 16 x 16 bits by the example machine and 32 x 32 bits by the
// MIPS machine. The zero register follows the MIPS convention described for
// addressing; reset and port count are this design's choices.
module regfile #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
