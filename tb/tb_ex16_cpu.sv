// tb_ex16_cpu: self-checking test of the example 16-bit processor against
// the instruction-level model ex16_iss.
//
// A first directed program exercises every opcode with known results; then
// 40 random programs (random instruction words in the first 256 words of a
// 64K-word memory, the rest filled with random data) run for 400
// instructions each after a reset. For every completed instruction the
// testbench compares its address and word, its register write, its memory
// store and the number of clocks it took with the model. It also counts
// taken and not-taken branches, loads, stores, JAL/JR and writes to R0, and
// fails if any of them never happened.
module tb_ex16_cpu;
  import ex16_pkg::*;
  import ex16_iss_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, pc, retire_pc, retire_ir, wb_data;
  logic        mem_we, idle, retire_valid, wb_we;
  logic [3:0]  wb_addr;
  logic [15:0] tbmem [65536];
  int          checks = 0, failures = 0;
  int          n_taken = 0, n_ntaken = 0, n_lw = 0, n_sw = 0, n_jal = 0, n_jr = 0, n_sh = 0;
  ex16_iss     iss;

  ex16_cpu dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .mem_addr(mem_addr), .mem_we(mem_we), .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .idle(idle), .pc(pc), .retire_valid(retire_valid), .retire_pc(retire_pc),
    .retire_ir(retire_ir), .wb_we(wb_we), .wb_addr(wb_addr), .wb_data(wb_data)
  );

  // behavioural memory: combinational read, write on the clock edge
  assign mem_rdata = tbmem[mem_addr];
  always_ff @(posedge clk) if (mem_we) tbmem[mem_addr] <= mem_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h (pc %h ir %h)", what, got, exp, iss.o_pc, iss.o_ir);
    end
  endtask

  // run ninstr instructions from reset, comparing each with the model
  task automatic run_program(int ninstr);
    int cyc;
    rst_n = 0; run = 0;
    iss.reset();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    for (int k = 0; k < ninstr; k++) begin
      // count clocks from the FETCH step to the retiring step, sampling
      // each clock between its falling and rising edge
      cyc = 1;
      #1;
      while (!retire_valid && cyc < 20) begin
        @(negedge clk); #1;
        cyc++;
      end
      iss.step();
      cmp(retire_pc, iss.o_pc, "retire_pc");
      cmp(retire_ir, iss.o_ir, "retire_ir");
      cmp(16'(cyc), 16'(iss.o_cycles), "clocks");
      cmp(16'(wb_we), 16'(iss.o_wb), "wb_we");
      if (iss.o_wb) begin
        cmp(16'(wb_addr), 16'(iss.o_wa), "wb_addr");
        cmp(wb_data, iss.o_wd, "wb_data");
      end
      cmp(16'(mem_we), 16'(iss.o_st), "mem_we");
      if (iss.o_st) begin
        cmp(mem_addr, iss.o_sa, "store addr");
        cmp(mem_wdata, iss.o_sd, "store data");
      end
      case (iss.o_ir[15:12])
        4'd9: n_lw++;
        4'd10: n_sw++;
        4'd11, 4'd12: if (iss.o_taken) n_taken++; else n_ntaken++;
        4'd13: n_sh++;
        4'd14: n_jr++;
        4'd15: n_jal++;
        default: ;
      endcase
      @(negedge clk);
    end
    run = 0;
    @(negedge clk);
    cmp(pc, iss.pc, "final pc");
  endtask

  initial begin
    iss = new();
    // directed program
    for (int i = 0; i < 65536; i++) begin
      tbmem[i] = 16'(i * 7);
    end
    begin
      logic [15:0] p [$];
      p = '{enc_i(5, 5, 1, 0),     // ADDI R1 <- R0 + 5
            enc_i(5, 4'hd, 2, 0),  // ADDI R2 <- -3
            enc_r(0, 3, 1, 2),     // ADD  R3 <- R1 + R2 = 2
            enc_r(1, 4, 1, 2),     // SUB  R4 <- R1 - R2 = 8
            enc_r(2, 5, 1, 2),     // AND
            enc_r(3, 6, 1, 2),     // OR
            enc_r(4, 7, 2, 1),     // SLT  R7 <- R2 < R1 = 1
            enc_i(6, 4'hf, 8, 2),  // ANDI R8 <- R2 & 15
            enc_i(7, 4'h8, 9, 1),  // ORI
            enc_i(8, 4'h0, 10, 2), // SLTI R10 <- R2 < 0
            enc_i(10, 2, 4, 1),    // SW   mem[R1+2] <- R4
            enc_i(9, 2, 11, 1),    // LW   R11 <- mem[R1+2]
            enc_i(13, 2, 12, 2),   // SHIFT SRA R12 <- R2 >> 1
            enc_i(11, 2, 11, 4),   // BEQ  R11 == R4: skip next
            enc_i(5, 1, 13, 0),    // (skipped)
            enc_i(12, 2, 1, 2),    // BNE  R1 != R2: skip next
            enc_i(5, 1, 13, 0),    // (skipped)
            enc_i(11, 2, 1, 2),    // BEQ  not taken
            enc_jal(22),           // JAL 22
            enc_r(0, 0, 1, 1),     // ADD R0 <- ... (discarded)
            enc_jal(20),           // JAL 20 (self loop after return)
            16'h0,
            enc_i(14, 0, 0, 15)};  // 22: JR R15
      foreach (p[i]) tbmem[i] = p[i];
      foreach (tbmem[i]) iss.mem[i] = tbmem[i];
      run_program(25);
      cmp(iss.r[3], 16'd2, "model self-check R3");
    end
    for (int prog = 0; prog < 40; prog++) begin
      for (int i = 0; i < 65536; i++) tbmem[i] = (i < 256) ? 16'($urandom) : 16'($urandom_range(0, 511));
      // keep a few loads and stores near the program
      foreach (tbmem[i]) iss.mem[i] = tbmem[i];
      run_program(400);
    end
    $display("taken=%0d not_taken=%0d lw=%0d sw=%0d shift=%0d jal=%0d jr=%0d",
             n_taken, n_ntaken, n_lw, n_sw, n_sh, n_jal, n_jr);
    checks++;
    if (n_taken == 0 || n_ntaken == 0 || n_lw == 0 || n_sw == 0 || n_jal == 0 || n_jr == 0 || n_sh == 0) begin
      failures++;
      $display("FAIL some instruction kind never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
