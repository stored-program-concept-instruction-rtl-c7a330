// isa_machines_top: the two stored-program machines side by side.
//
// u_ex16 is the example 16-bit machine (16 registers, 16-bit instructions,
// 64K words of program/data memory); u_mips is the 32-bit MIPS subset
// machine (32 registers, 16K words). They are independent and share only
// clock and reset; each has its own run input, idle output, loader port
// (usable while idle) and retirement/status outputs, prefixed ex16_ and
// mips_. See ex16_computer and mips_computer for the port protocols.
// Building the two machines as independent units is this design's choice;
// their instruction sets and sizes are described in their own modules.
module isa_machines_top (
  input  logic        clk,
  input  logic        rst_n,
  // example 16-bit machine
  input  logic        ex16_run,
  output logic        ex16_idle,
  input  logic        ex16_ld_we,
  input  logic [15:0] ex16_ld_addr,
  input  logic [15:0] ex16_ld_wdata,
  output logic [15:0] ex16_ld_rdata,
  output logic [15:0] ex16_pc,
  output logic        ex16_retire_valid,
  output logic [15:0] ex16_retire_pc,
  output logic [15:0] ex16_retire_ir,
  output logic        ex16_wb_we,
  output logic [3:0]  ex16_wb_addr,
  output logic [15:0] ex16_wb_data,
  // MIPS subset machine
  input  logic        mips_run,
  output logic        mips_idle,
  input  logic        mips_ld_we,
  input  logic [13:0] mips_ld_addr,
  input  logic [31:0] mips_ld_wdata,
  output logic [31:0] mips_ld_rdata,
  output logic [31:0] mips_pc,
  output logic        mips_retire_valid,
  output logic [31:0] mips_retire_pc,
  output logic [31:0] mips_retire_ir,
  output logic        mips_wb_we,
  output logic [4:0]  mips_wb_addr,
  output logic [31:0] mips_wb_data
);

  ex16_computer #(.DEPTH(65536)) u_ex16 (
    .clk         (clk),
    .rst_n       (rst_n),
    .run         (ex16_run),
    .idle        (ex16_idle),
    .ld_we       (ex16_ld_we),
    .ld_addr     (ex16_ld_addr),
    .ld_wdata    (ex16_ld_wdata),
    .ld_rdata    (ex16_ld_rdata),
    .pc          (ex16_pc),
    .retire_valid(ex16_retire_valid),
    .retire_pc   (ex16_retire_pc),
    .retire_ir   (ex16_retire_ir),
    .wb_we       (ex16_wb_we),
    .wb_addr     (ex16_wb_addr),
    .wb_data     (ex16_wb_data)
  );

  mips_computer #(.DEPTH(16384)) u_mips (
    .clk         (clk),
    .rst_n       (rst_n),
    .run         (mips_run),
    .idle        (mips_idle),
    .ld_we       (mips_ld_we),
    .ld_addr     (mips_ld_addr),
    .ld_wdata    (mips_ld_wdata),
    .ld_rdata    (mips_ld_rdata),
    .pc          (mips_pc),
    .retire_valid(mips_retire_valid),
    .retire_pc   (mips_retire_pc),
    .retire_ir   (mips_retire_ir),
    .wb_we       (mips_wb_we),
    .wb_addr     (mips_wb_addr),
    .wb_data     (mips_wb_data)
  );

endmodule
