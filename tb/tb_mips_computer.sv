// tb_mips_computer: end-to-end test of the MIPS subset machine with its
// memory, through the loader port.
//
// The program, loaded while the processor is stopped, sums an array of N
// words with a counted loop (lw, add, addi, bne), finds the array's
// maximum with slt and beq, computes "if (i == j) h = i + j" for i == j and
// i != j, updates the constants A = A + 5, B = B + 1, C = C - 18 in memory,
// stores the results with sw and ends in a j-to-itself. The
// testbench reads the results back through the loader port and compares
// them with values it computes from the same data.
module tb_mips_computer;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  localparam int DEPTH = 1024;
  localparam int N = 12;
  localparam int ARR = 512;   // byte address of the array (word 128)
  localparam int RES = 256;   // byte address of the results (word 64)

  logic        clk = 0, rst_n = 0, run = 0, idle, ld_we = 0;
  logic [9:0]  ld_addr = 0;
  logic [31:0] ld_wdata = 0, ld_rdata, pc, retire_pc, retire_ir, wb_data;
  logic        retire_valid, wb_we;
  logic [4:0]  wb_addr;
  int          checks = 0, failures = 0, cycles = 0;

  mips_computer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .idle(idle),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata), .ld_rdata(ld_rdata),
    .pc(pc), .retire_valid(retire_valid), .retire_pc(retire_pc), .retire_ir(retire_ir),
    .wb_we(wb_we), .wb_addr(wb_addr), .wb_data(wb_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (run) cycles++;

  task automatic load(int wa, logic [31:0] d);
    @(negedge clk);
    ld_addr = 10'(wa); ld_wdata = d; ld_we = 1;
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic peek(int wa, logic [31:0] exp, string what);
    @(negedge clk);
    ld_addr = 10'(wa); #1;
    checks++;
    if (ld_rdata !== exp) begin
      failures++;
      $display("FAIL %s: word %0d = %h, expected %h", what, wa, ld_rdata, exp);
    end
  endtask

  initial begin
    logic [31:0] p [$];
    logic [31:0] arr [N];
    logic [31:0] sum, mx;
    int stop_pc;
    // $8 pointer, $9 count, $10 sum, $11 element, $12 max, $13 flag
    p.push_back(enc_i(8, 8, 0, ARR));        // 0  addi $8, $0, ARR
    p.push_back(enc_i(8, 9, 0, N));          // 1  addi $9, $0, N
    p.push_back(enc_r('h20, 10, 0, 0));      // 2  add  $10, $0, $0
    p.push_back(enc_r('h20, 12, 0, 0));      // 3  add  $12, $0, $0
    // loop: byte 16
    p.push_back(enc_i(35, 11, 8, 0));        // 4  lw   $11, 0($8)
    p.push_back(enc_r('h20, 10, 10, 11));    // 5  add  $10, $10, $11
    p.push_back(enc_r('h2a, 13, 12, 11));    // 6  slt  $13, $12, $11
    p.push_back(enc_i(4, 13, 0, 1));         // 7  beq  $13, $0, +1
    p.push_back(enc_r('h20, 12, 11, 0));     // 8  add  $12, $11, $0
    p.push_back(enc_i(8, 8, 8, 4));          // 9  addi $8, $8, 4
    p.push_back(enc_i(8, 9, 9, -1));         // 10 addi $9, $9, -1
    p.push_back(enc_i(5, 9, 0, -8));         // 11 bne  $9, $0, loop (-8)
    p.push_back(enc_i(43, 10, 0, RES));      // 12 sw   $10, RES($0)
    p.push_back(enc_i(43, 12, 0, RES + 4));  // 13 sw   $12, RES+4($0)
    // if (i == j) h = i + j : $16 i, $17 j, $19 h
    p.push_back(enc_i(8, 16, 0, 21));        // 14
    p.push_back(enc_i(8, 17, 0, 21));        // 15
    p.push_back(enc_r('h20, 19, 0, 0));      // 16
    p.push_back(enc_i(5, 16, 17, 1));        // 17 bne $16, $17, +1
    p.push_back(enc_r('h20, 19, 16, 17));    // 18 add $19, $16, $17
    p.push_back(enc_i(43, 19, 0, RES + 8));  // 19
    p.push_back(enc_i(8, 17, 17, 1));        // 20 j = 22
    p.push_back(enc_r('h20, 19, 0, 0));      // 21
    p.push_back(enc_i(5, 16, 17, 1));        // 22
    p.push_back(enc_r('h20, 19, 16, 17));    // 23 (skipped)
    p.push_back(enc_i(43, 19, 0, RES + 12)); // 24
    p.push_back(enc_r('h00, 20, 0, 10, 2));  // 25 sll $20, $10, 2
    p.push_back(enc_i(13, 20, 20, 3));       // 26 ori $20, $20, 3
    p.push_back(enc_i(43, 20, 0, RES + 16)); // 27
    // constants: A = A + 5; B = B + 1; C = C - 18
    p.push_back(enc_i(35, 21, 0, RES + 20)); // 28 lw   $21, A
    p.push_back(enc_i(8, 21, 21, 5));        // 29 addi $21, $21, 5
    p.push_back(enc_i(43, 21, 0, RES + 20)); // 30 sw
    p.push_back(enc_i(35, 22, 0, RES + 24)); // 31 lw   $22, B
    p.push_back(enc_i(8, 22, 22, 1));        // 32 addi $22, $22, 1
    p.push_back(enc_i(43, 22, 0, RES + 24)); // 33 sw
    p.push_back(enc_i(35, 23, 0, RES + 28)); // 34 lw   $23, C
    p.push_back(enc_i(8, 23, 23, -18));      // 35 addi $23, $23, -18
    p.push_back(enc_i(43, 23, 0, RES + 28)); // 36 sw
    p.push_back(enc_j(37 * 4));              // 37 j 37
    stop_pc = 37 * 4;

    #12 rst_n = 1;
    foreach (p[i]) load(i, p[i]);
    sum = 0; mx = 0;
    for (int i = 0; i < N; i++) begin
      arr[i] = $urandom_range(0, 100000);
      sum += arr[i];
      if (arr[i] > mx) mx = arr[i];
      load(ARR / 4 + i, arr[i]);
    end
    load(RES / 4 + 5, 32'd1000);
    load(RES / 4 + 6, 32'hffffffff);
    load(RES / 4 + 7, 32'd7);
    @(negedge clk);
    run = 1;
    while (!(retire_valid && retire_pc == 32'(stop_pc))) @(negedge clk);
    run = 0;
    wait (idle);
    $display("program finished after %0d clocks", cycles);
    peek(RES / 4, sum, "sum");
    peek(RES / 4 + 1, mx, "max");
    peek(RES / 4 + 2, 32'd42, "h when i == j");
    peek(RES / 4 + 3, 32'd0, "h when i != j");
    peek(RES / 4 + 4, (sum << 2) | 32'd3, "sll/ori");
    peek(RES / 4 + 5, 32'd1005, "A = A + 5");
    peek(RES / 4 + 6, 32'd0, "B = B + 1");
    peek(RES / 4 + 7, 32'hfffffff5, "C = C - 18");
    peek(0, p[0], "program word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
