// mips_computer: the MIPS subset processor with its memory.
//
// mips_cpu plus one sp_memory of DEPTH 32-bit words that holds program and
// data together (DEPTH * 4 bytes, byte addresses wrap modulo that size). A
// loader port reaches the memory while the processor is stopped: drop run,
// wait for idle, then write words with ld_we/ld_addr/ld_wdata or read them
// on ld_rdata. ld_addr is a word address. Execution starts at byte address 0
// after reset. The memory size and the loader port are this design's
// choices.
module mips_computer
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned MAW  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic            idle,
  input  logic            ld_we,
  input  logic [MAW-1:0]  ld_addr,
  input  logic [XLEN-1:0] ld_wdata,
  output logic [XLEN-1:0] ld_rdata,
  output logic [XLEN-1:0] pc,
  output logic            retire_valid,
  output logic [XLEN-1:0] retire_pc,
  output logic [XLEN-1:0] retire_ir,
  output logic            wb_we,
  output logic [4:0]      wb_addr,
  output logic [XLEN-1:0] wb_data
);

  logic [MAW-1:0]  c_addr, m_addr;
  logic [XLEN-1:0] c_wdata, m_wdata, m_rdata;
  logic            c_we, m_we;

  mips_cpu #(.MAW(MAW)) u_cpu (
    .clk         (clk),
    .rst_n       (rst_n),
    .run         (run),
    .mem_addr    (c_addr),
    .mem_we      (c_we),
    .mem_wdata   (c_wdata),
    .mem_rdata   (m_rdata),
    .idle        (idle),
    .pc          (pc),
    .retire_valid(retire_valid),
    .retire_pc   (retire_pc),
    .retire_ir   (retire_ir),
    .wb_we       (wb_we),
    .wb_addr     (wb_addr),
    .wb_data     (wb_data)
  );

  assign m_addr  = idle ? ld_addr  : c_addr;
  assign m_we    = idle ? ld_we    : c_we;
  assign m_wdata = idle ? ld_wdata : c_wdata;

  sp_memory #(.W(XLEN), .DEPTH(DEPTH), .AW(MAW)) u_mem (
    .clk  (clk),
    .addr (m_addr),
    .we   (m_we),
    .wdata(m_wdata),
    .rdata(m_rdata)
  );

  assign ld_rdata = m_rdata;

  // The processor never writes memory while it is idle, so the loader has
  // the port to itself.
  a_no_cpu_write_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    idle |-> !c_we);

endmodule
