// sp_memory: unified program/data memory of a stored-program machine.
//
// Instructions and data live in the same array, so a program can be read
// and written just like data. DEPTH words of W bits, one port: the word at
// addr is presented on rdata combinationally (one clock per READ INST or
// READ MEM step), and wdata is written at addr on the rising clock edge when
// we is high. Address bits above log2(DEPTH) are ignored. Contents are not
// reset; a loader writes the program.
// The single shared memory follows the stored-program idea; combinational
// read and the default size (the 64K words a 16-bit PC can reach) are this
// design's choices.
module sp_memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [IW-1:0] idx;

  assign idx = IW'(addr);

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wdata;
  end

  assign rdata = mem[idx];

endmodule
