// tb_ex16_computer: end-to-end test of the example 16-bit machine with its
// memory, through the loader port.
//
// The testbench writes a program and its data into memory while the
// processor is stopped, runs it until it reaches its final self-jump, stops
// it, and reads the results back through the loader port. The program
//   - sums the N words of an array with a counted loop (LW, ADD, ADDI, BNE),
//   - calls a subroutine with JAL that doubles the sum with a SHIFT and
//     returns with JR,
//   - does "if (i == j) h = i + j" with BNE, once with i == j and once not,
//   - stores each result with SW,
//   - updates constants in memory: A = A + 5, B = B + 1, C = C - 18.
// Expected values are computed in the testbench from the same data.
module tb_ex16_computer;
  import ex16_pkg::*;
  import ex16_iss_pkg::*;

  localparam int DEPTH = 4096;
  localparam int N = 10;
  localparam int ARR = 200, RES = 100;

  logic        clk = 0, rst_n = 0, run = 0, idle, ld_we = 0;
  logic [15:0] ld_addr = 0, ld_wdata = 0, ld_rdata, pc, retire_pc, retire_ir, wb_data;
  logic        retire_valid, wb_we;
  logic [3:0]  wb_addr;
  int          checks = 0, failures = 0, cycles = 0, retired = 0;

  ex16_computer #(.DEPTH(DEPTH)) dut (
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

  always @(posedge clk) if (run) begin
    cycles++;
    if (retire_valid) retired++;
  end

  task automatic load(int a, logic [15:0] d);
    @(negedge clk);
    ld_addr = 16'(a); ld_wdata = d; ld_we = 1;
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic peek(int a, logic [15:0] exp, string what);
    @(negedge clk);
    ld_addr = 16'(a); #1;
    checks++;
    if (ld_rdata !== exp) begin
      failures++;
      $display("FAIL %s: mem[%0d] = %h, expected %h", what, a, ld_rdata, exp);
    end
  endtask

  initial begin
    logic [15:0] prog [$];
    logic [15:0] arr [N];
    logic [15:0] sum;
    int done_at;
    // registers: R1 pointer, R2 count, R3 sum, R4 tmp, R5 i, R6 j, R7 h
    // R1 = ARR (200 = 0xC8) built from 4-bit immediates: R1 = 12, shift left 4 times, +8
    prog.push_back(enc_i(5, 6, 1, 0));      // ADDI R1 <- 6
    prog.push_back(enc_r(0, 1, 1, 1));      // ADD  R1 <- R1 + R1 = 12
    prog.push_back(enc_i(13, 0, 1, 1));     // SHIFT SLL R1 = 24
    prog.push_back(enc_i(13, 0, 1, 1));     // 48
    prog.push_back(enc_i(13, 0, 1, 1));     // 96
    prog.push_back(enc_i(13, 0, 1, 1));     // 192
    prog.push_back(enc_i(5, 7, 1, 1));      // ADDI R1 <- 199
    prog.push_back(enc_i(5, 1, 1, 1));      // ADDI R1 <- 200
    prog.push_back(enc_i(5, 5, 2, 0));      // ADDI R2 <- 5
    prog.push_back(enc_r(0, 2, 2, 2));      // ADD  R2 <- 10 = N
    prog.push_back(enc_r(0, 3, 0, 0));      // ADD  R3 <- 0
    // loop (address 11)
    prog.push_back(enc_i(9, 0, 4, 1));      // 11 LW   R4 <- mem[R1]
    prog.push_back(enc_r(0, 3, 3, 4));      // 12 ADD  R3 <- R3 + R4
    prog.push_back(enc_i(5, 1, 1, 1));      // 13 ADDI R1 <- R1 + 1
    prog.push_back(enc_i(5, 4'hf, 2, 2));   // 14 ADDI R2 <- R2 - 1
    prog.push_back(enc_i(12, 4'hc, 0, 2));  // 15 BNE  R0, R2: back to 11 (-4)
    // call the doubling subroutine at 40
    prog.push_back(enc_jal(40));            // 16 JAL 40
    // R8 = RES (100 = 0x64): 3 -> SLL*5 = 96, +4
    prog.push_back(enc_i(5, 3, 8, 0));      // 17
    prog.push_back(enc_i(13, 0, 8, 8));     // 18
    prog.push_back(enc_i(13, 0, 8, 8));     // 19
    prog.push_back(enc_i(13, 0, 8, 8));     // 20
    prog.push_back(enc_i(13, 0, 8, 8));     // 21
    prog.push_back(enc_i(13, 0, 8, 8));     // 22 R8 = 96
    prog.push_back(enc_i(5, 4, 8, 8));      // 23 R8 = 100
    prog.push_back(enc_i(10, 0, 3, 8));     // 24 SW R3 -> mem[R8+0]
    // if (i == j) h = i + j, with i = j = 3, then i = 3, j = 4
    prog.push_back(enc_i(5, 3, 5, 0));      // 25 R5 = 3
    prog.push_back(enc_i(5, 3, 6, 0));      // 26 R6 = 3
    prog.push_back(enc_r(0, 7, 0, 0));      // 27 R7 = 0
    prog.push_back(enc_i(12, 2, 6, 5));     // 28 BNE R6, R5 -> 30
    prog.push_back(enc_r(0, 7, 5, 6));      // 29 R7 = R5 + R6
    prog.push_back(enc_i(10, 1, 7, 8));     // 30 SW R7 -> mem[R8+1]
    prog.push_back(enc_i(5, 1, 6, 6));      // 31 R6 = 4
    prog.push_back(enc_r(0, 7, 0, 0));      // 32 R7 = 0
    prog.push_back(enc_i(12, 2, 6, 5));     // 33 BNE R6, R5 -> 35
    prog.push_back(enc_r(0, 7, 5, 6));      // 34 (skipped)
    prog.push_back(enc_i(10, 2, 7, 8));     // 35 SW R7 -> mem[R8+2]
    prog.push_back(enc_r(4, 9, 6, 5));      // 36 SLT R9 = R6 < R5 = 0
    prog.push_back(enc_r(4, 10, 5, 6));     // 37 SLT R10 = R5 < R6 = 1
    prog.push_back(enc_r(0, 9, 9, 10));     // 38 R9 = R9 + R10 ... stored next
    prog.push_back(enc_jal(45));            // 39 JAL 45 (store and stop)
    prog.push_back(enc_i(13, 0, 3, 3));     // 40 SLL R3 (sum * 2)
    prog.push_back(enc_i(14, 0, 0, 15));    // 41 JR R15
    prog.push_back(16'h0);                  // 42
    prog.push_back(16'h0);                  // 43
    prog.push_back(16'h0);                  // 44
    prog.push_back(enc_i(10, 3, 9, 8));     // 45 SW R9 -> mem[R8+3]
    // constants: A = A + 5; B = B + 1; C = C - 18 (-18 does not fit a
    // 4-bit immediate and is split into -8, -8, -2)
    prog.push_back(enc_i(9, 4, 11, 8));     // 46 LW   R11 <- A
    prog.push_back(enc_i(5, 5, 11, 11));    // 47 ADDI R11 + 5
    prog.push_back(enc_i(10, 4, 11, 8));    // 48 SW   A
    prog.push_back(enc_i(9, 5, 12, 8));     // 49 LW   R12 <- B
    prog.push_back(enc_i(5, 1, 12, 12));    // 50 ADDI R12 + 1
    prog.push_back(enc_i(10, 5, 12, 8));    // 51 SW   B
    prog.push_back(enc_i(9, 6, 13, 8));     // 52 LW   R13 <- C
    prog.push_back(enc_i(5, 4'h8, 13, 13)); // 53 ADDI R13 - 8
    prog.push_back(enc_i(5, 4'h8, 13, 13)); // 54 ADDI R13 - 8
    prog.push_back(enc_i(5, 4'he, 13, 13)); // 55 ADDI R13 - 2
    prog.push_back(enc_i(10, 6, 13, 8));    // 56 SW   C
    prog.push_back(enc_jal(57));            // 57 JAL 57: stop here

    // memory contents, program and data, written with the processor stopped
    #12 rst_n = 1;
    for (int i = 0; i < 64; i++) load(i, (i < prog.size()) ? prog[i] : 16'h0);
    sum = 0;
    for (int i = 0; i < N; i++) begin
      arr[i] = 16'($urandom_range(0, 3000));
      sum += arr[i];
      load(ARR + i, arr[i]);
    end
    load(RES + 4, 16'd1000);
    load(RES + 5, 16'hffff);
    load(RES + 6, 16'd7);
    peek(11, prog[11], "program word read back");

    @(negedge clk);
    run = 1;
    done_at = 0;
    while (done_at == 0) begin
      @(negedge clk);
      if (retire_valid && retire_pc == 16'd57) done_at = cycles;
    end
    run = 0;
    wait (idle);
    $display("program finished after %0d clocks, %0d instructions", done_at, retired);
    peek(RES, 16'(sum * 2), "sum * 2");
    peek(RES + 1, 16'd6, "h when i == j");
    peek(RES + 2, 16'd0, "h when i != j");
    peek(RES + 3, 16'd1, "slt");
    peek(RES + 4, 16'd1005, "A = A + 5");
    peek(RES + 5, 16'd0, "B = B + 1");
    peek(RES + 6, 16'hfff5, "C = C - 18");
    for (int i = 0; i < N; i++) peek(ARR + i, arr[i], "array unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
