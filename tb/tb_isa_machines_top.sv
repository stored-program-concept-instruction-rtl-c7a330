// tb_isa_machines_top: end-to-end test of the top level at its full default
// size (64K-word example machine, 16K-word MIPS machine), both machines
// running at the same time.
//
// Each machine's retirement stream is checked, instruction by instruction,
// against its instruction-level model (address, word, register write,
// store, clock count). Phase 1 loads a directed program into each machine
// through its loader port and runs it, stopping and restarting the machine
// part-way; the results are then read back through the loader port.
// Phase 2 fills the whole memory of both machines with random programs and
// data and runs them. The testbench counts how often each mechanism
// happened: every example-machine opcode and shift type, every MIPS
// instruction, taken and not-taken branches, writes aimed at register 0,
// loader writes and reads, and stop/restart, and counts a failure for any
// that never happened.
module tb_isa_machines_top;

  logic        clk = 0, rst_n = 0;
  logic        ex16_run = 0, ex16_idle, ex16_ld_we = 0;
  logic [15:0] ex16_ld_addr = 0, ex16_ld_wdata = 0, ex16_ld_rdata, ex16_pc;
  logic        ex16_retire_valid, ex16_wb_we;
  logic [15:0] ex16_retire_pc, ex16_retire_ir, ex16_wb_data;
  logic [3:0]  ex16_wb_addr;
  logic        mips_run = 0, mips_idle, mips_ld_we = 0;
  logic [13:0] mips_ld_addr = 0;
  logic [31:0] mips_ld_wdata = 0, mips_ld_rdata, mips_pc;
  logic        mips_retire_valid, mips_wb_we;
  logic [31:0] mips_retire_pc, mips_retire_ir, mips_wb_data;
  logic [4:0]  mips_wb_addr;

  int checks = 0, failures = 0;
  int e_cyc = 0, m_cyc = 0;
  int e_ops [16], e_sh [16];
  int m_ops [string];
  int e_taken = 0, e_ntaken = 0, m_taken = 0, m_ntaken = 0, e_r0 = 0, m_r0 = 0;
  int n_ld_w = 0, n_ld_r = 0, n_stop = 0;

  ex16_iss_pkg::ex16_iss eiss;
  mips_iss_pkg::mips_iss miss;
  bit      checking = 0;

  isa_machines_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  // ---- retirement checkers, sampled between the falling and rising edge
  always @(negedge clk) begin
    #1;
    if (checking) check_retire();
  end

  task automatic check_retire();
    if (!ex16_idle) e_cyc++;
    if (ex16_retire_valid) begin
      eiss.step();
      cmp(32'(ex16_retire_pc), 32'(eiss.o_pc), "ex16 retire_pc");
      cmp(32'(ex16_retire_ir), 32'(eiss.o_ir), "ex16 retire_ir");
      cmp(32'(e_cyc), 32'(eiss.o_cycles), "ex16 clocks");
      cmp(32'(ex16_wb_we), 32'(eiss.o_wb), "ex16 wb_we");
      if (eiss.o_wb) cmp({ex16_wb_addr, ex16_wb_data}, {eiss.o_wa, eiss.o_wd}, "ex16 wb");
      e_ops[eiss.o_ir[15:12]]++;
      if (eiss.o_ir[15:12] == 4'd13) e_sh[eiss.o_ir[11:8]]++;
      if (eiss.o_ir[15:12] inside {4'd11, 4'd12}) begin
        if (eiss.o_taken) e_taken++; else e_ntaken++;
      end
      if ((eiss.o_ir[15:12] <= 4'd4 && eiss.o_ir[11:8] == 0) ||
          (eiss.o_ir[15:12] inside {[4'd5:4'd9], 4'd13} && eiss.o_ir[7:4] == 0)) e_r0++;
      e_cyc = 0;
    end
    if (!mips_idle) m_cyc++;
    if (mips_retire_valid) begin
      miss.step();
      cmp(mips_retire_pc, miss.o_pc, "mips retire_pc");
      cmp(mips_retire_ir, miss.o_ir, "mips retire_ir");
      cmp(32'(m_cyc), 32'(miss.o_cycles), "mips clocks");
      cmp(32'(mips_wb_we), 32'(miss.o_wb), "mips wb_we");
      if (miss.o_wb) begin
        cmp(32'(mips_wb_addr), 32'(miss.o_wa), "mips wb_addr");
        cmp(mips_wb_data, miss.o_wd, "mips wb_data");
      end
      case (miss.o_ir[31:26])
        6'd0: case (miss.o_ir[5:0])
                6'h20: m_ops["add"]++;  6'h22: m_ops["sub"]++;
                6'h24: m_ops["and"]++;  6'h25: m_ops["or"]++;
                6'h2a: m_ops["slt"]++;  6'h00: m_ops["sll"]++;
                6'h02: m_ops["srl"]++;  default: ;
              endcase
        6'd8: m_ops["addi"]++;  6'd10: m_ops["slti"]++;
        6'd12: m_ops["andi"]++; 6'd13: m_ops["ori"]++;
        6'd35: m_ops["lw"]++;   6'd43: m_ops["sw"]++;
        6'd2: m_ops["j"]++;
        6'd4, 6'd5: begin
          m_ops[miss.o_ir[26] ? "bne" : "beq"]++;
          if (miss.o_taken) m_taken++; else m_ntaken++;
        end
        default: ;
      endcase
      if (miss.o_ir[31:26] == 0 && miss.o_ir[15:11] == 0) m_r0++;
      m_cyc = 0;
    end
  endtask

  // ---- loader helpers: both machines' ports are driven in the same clocks
  task automatic load_both(int ea, logic [15:0] ed, bit ew, int ma, logic [31:0] md, bit mw);
    @(negedge clk);
    ex16_ld_addr = 16'(ea); ex16_ld_wdata = ed; ex16_ld_we = ew;
    mips_ld_addr = 14'(ma); mips_ld_wdata = md; mips_ld_we = mw;
    if (ew) begin eiss.mem[ea] = ed; n_ld_w++; end
    if (mw) begin miss.mem[ma] = md; n_ld_w++; end
    @(negedge clk);
    ex16_ld_we = 0; mips_ld_we = 0;
  endtask

  task automatic peek_ex16(int a, logic [15:0] exp, string what);
    @(negedge clk);
    ex16_ld_addr = 16'(a); #1;
    n_ld_r++;
    cmp(32'(ex16_ld_rdata), 32'(exp), what);
  endtask

  task automatic peek_mips(int a, logic [31:0] exp, string what);
    @(negedge clk);
    mips_ld_addr = 14'(a); #1;
    n_ld_r++;
    cmp(mips_ld_rdata, exp, what);
  endtask

  // a random MIPS instruction from the supported set, or an unknown word
  function automatic logic [31:0] mips_rand_instr();
    int k = $urandom_range(0, 17);
    int rs = $urandom_range(0, 31), rt = $urandom_range(0, 31), rd = $urandom_range(0, 31);
    int fn [7] = '{'h20, 'h22, 'h24, 'h25, 'h2a, 'h00, 'h02};
    int io [4] = '{8, 10, 12, 13};
    case (k)
      0, 1, 2, 3, 4: return mips_iss_pkg::enc_r(fn[$urandom_range(0, 6)], rd, rs, rt, $urandom_range(0, 31));
      5, 6, 7: return mips_iss_pkg::enc_i(io[$urandom_range(0, 3)], rt, rs, $urandom);
      8, 9: return mips_iss_pkg::enc_i(35, rt, rs, $urandom_range(0, 8191));
      10, 11: return mips_iss_pkg::enc_i(43, rt, rs, $urandom_range(0, 8191));
      12, 13: return mips_iss_pkg::enc_i($urandom_range(4, 5), rt, rs, $urandom_range(0, 16) - 8);
      14: return mips_iss_pkg::enc_j($urandom_range(0, 511) * 4);
      15: return $urandom;
      default: return mips_iss_pkg::enc_i(8, rt, 0, $urandom_range(0, 2000));
    endcase
  endfunction

  // a random ex16 instruction word; branches never target themselves and
  // jumps stay in the first 512 words
  function automatic logic [15:0] ex16_rand_instr();
    logic [15:0] w = 16'($urandom);
    if (w[15:12] inside {4'd11, 4'd12} && w[11:8] == 4'd0) w[11:8] = 4'd2;
    if (w[15:12] == 4'd15) w[11:9] = 3'd0;
    return w;
  endfunction

  task automatic reset_both();
    checking = 0;
    ex16_run = 0; mips_run = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    eiss.reset(); miss.reset();
    e_cyc = 0; m_cyc = 0;
  endtask

  // run both until each retires the instruction at its stop address
  task automatic run_until(logic [15:0] e_stop, logic [31:0] m_stop, int max_cycles);
    bit e_done = 0, m_done = 0;
    int n = 0;
    @(negedge clk);
    checking = 1;
    ex16_run = 1; mips_run = 1;
    while (!(e_done && m_done) && n < max_cycles) begin
      @(negedge clk); #2;
      n++;
      if (ex16_retire_valid && ex16_retire_pc == e_stop) begin e_done = 1; ex16_run = 0; end
      if (mips_retire_valid && mips_retire_pc == m_stop) begin m_done = 1; mips_run = 0; end
    end
    wait (ex16_idle && mips_idle);
    @(negedge clk);
    checking = 0;
    cmp(32'(e_done && m_done), 32'd1, "programs reached their stop address");
  endtask

  initial begin
    logic [15:0] ep [$];
    logic [31:0] mp [$];
    eiss = new();
    miss = new(14);
    foreach (e_ops[i]) begin e_ops[i] = 0; e_sh[i] = 0; end
    reset_both();

    // ---------------- phase 1: directed programs
    // example machine: every opcode and every shift type
    ep.push_back(ex16_iss_pkg::enc_i(5, 6, 1, 0));        // 0 ADDI R1 = 6
    ep.push_back(ex16_iss_pkg::enc_i(5, 4'hb, 2, 0));     // 1 ADDI R2 = -5
    ep.push_back(ex16_iss_pkg::enc_r(0, 3, 1, 2));        // 2 ADD
    ep.push_back(ex16_iss_pkg::enc_r(1, 4, 1, 2));        // 3 SUB
    ep.push_back(ex16_iss_pkg::enc_r(2, 5, 1, 2));        // 4 AND
    ep.push_back(ex16_iss_pkg::enc_r(3, 6, 1, 2));        // 5 OR
    ep.push_back(ex16_iss_pkg::enc_r(4, 7, 2, 1));        // 6 SLT
    ep.push_back(ex16_iss_pkg::enc_i(6, 4'h9, 8, 2));     // 7 ANDI
    ep.push_back(ex16_iss_pkg::enc_i(7, 4'h9, 9, 1));     // 8 ORI
    ep.push_back(ex16_iss_pkg::enc_i(8, 4'hf, 10, 2));    // 9 SLTI
    for (int t = 0; t < 16; t++) ep.push_back(ex16_iss_pkg::enc_i(13, t, 11, 2));  // 10..25 SHIFT all types
    ep.push_back(ex16_iss_pkg::enc_r(0, 0, 1, 1));        // 26 ADD into R0 (discarded)
    ep.push_back(ex16_iss_pkg::enc_i(5, 7, 12, 0));       // 27 R12 = 7
    ep.push_back(ex16_iss_pkg::enc_i(13, 0, 12, 12));     // 28 14
    ep.push_back(ex16_iss_pkg::enc_i(13, 0, 12, 12));     // 29 28
    ep.push_back(ex16_iss_pkg::enc_i(13, 0, 12, 12));     // 30 56
    ep.push_back(ex16_iss_pkg::enc_i(13, 0, 12, 12));     // 31 112 = data base
    ep.push_back(ex16_iss_pkg::enc_i(10, 0, 3, 12));      // 32 SW R3 -> 112
    ep.push_back(ex16_iss_pkg::enc_i(10, 1, 7, 12));      // 33 SW R7 -> 113
    ep.push_back(ex16_iss_pkg::enc_i(9, 0, 13, 12));      // 34 LW R13 <- 112
    ep.push_back(ex16_iss_pkg::enc_i(11, 2, 13, 3));      // 35 BEQ taken
    ep.push_back(16'h0);                    // 36 (skipped)
    ep.push_back(ex16_iss_pkg::enc_i(11, 2, 13, 0));      // 37 BEQ not taken
    ep.push_back(ex16_iss_pkg::enc_i(12, 2, 2, 1));       // 38 BNE taken
    ep.push_back(16'h0);                    // 39 (skipped)
    ep.push_back(ex16_iss_pkg::enc_i(12, 2, 1, 1));       // 40 BNE not taken
    ep.push_back(ex16_iss_pkg::enc_jal(48));              // 41 JAL 48
    ep.push_back(ex16_iss_pkg::enc_i(10, 2, 14, 12));     // 42 SW R14 -> 114
    ep.push_back(ex16_iss_pkg::enc_jal(43));              // 43 stop
    while (ep.size() < 48) ep.push_back(16'h0);
    ep.push_back(ex16_iss_pkg::enc_i(5, 3, 14, 0));       // 48 R14 = 3
    ep.push_back(ex16_iss_pkg::enc_i(14, 0, 0, 15));      // 49 JR R15
    // MIPS machine: every supported instruction
    mp.push_back(mips_iss_pkg::enc_i(8, 17, 0, 7));       // 0 addi $17 = 7
    mp.push_back(mips_iss_pkg::enc_i(8, 18, 0, -3));      // 1 addi $18 = -3
    mp.push_back(mips_iss_pkg::enc_r('h20, 8, 17, 18));   // 2 add
    mp.push_back(mips_iss_pkg::enc_r('h22, 9, 17, 18));   // 3 sub
    mp.push_back(mips_iss_pkg::enc_r('h24, 10, 17, 18));  // 4 and
    mp.push_back(mips_iss_pkg::enc_r('h25, 11, 17, 18));  // 5 or
    mp.push_back(mips_iss_pkg::enc_r('h2a, 12, 18, 17));  // 6 slt
    mp.push_back(mips_iss_pkg::enc_r('h00, 13, 0, 17, 4));// 7 sll
    mp.push_back(mips_iss_pkg::enc_r('h02, 14, 0, 18, 28));// 8 srl
    mp.push_back(mips_iss_pkg::enc_i(10, 15, 18, 0));     // 9 slti
    mp.push_back(mips_iss_pkg::enc_i(12, 16, 18, 'hff));  // 10 andi
    mp.push_back(mips_iss_pkg::enc_i(13, 19, 17, 'h100)); // 11 ori
    mp.push_back(mips_iss_pkg::enc_r('h20, 0, 17, 17));   // 12 add into $0 (discarded)
    mp.push_back(mips_iss_pkg::enc_i(43, 9, 0, 1024));    // 13 sw $9 -> word 256
    mp.push_back(mips_iss_pkg::enc_i(35, 20, 0, 1024));   // 14 lw $20
    mp.push_back(mips_iss_pkg::enc_i(4, 20, 9, 1));       // 15 beq taken
    mp.push_back(32'h0);                    // 16 (skipped)
    mp.push_back(mips_iss_pkg::enc_i(4, 20, 0, 1));       // 17 beq not taken
    mp.push_back(mips_iss_pkg::enc_i(5, 17, 18, 1));      // 18 bne taken
    mp.push_back(32'h0);                    // 19 (skipped)
    mp.push_back(mips_iss_pkg::enc_i(5, 9, 20, 1));       // 20 bne not taken
    mp.push_back(mips_iss_pkg::enc_j(23 * 4));            // 21 j 23
    mp.push_back(32'h0);                    // 22 (skipped)
    mp.push_back(mips_iss_pkg::enc_i(43, 12, 0, 1028));   // 23 sw $12 -> word 257
    mp.push_back(mips_iss_pkg::enc_j(24 * 4));            // 24 stop
    for (int i = 0; i < 64; i++)
      load_both(i, (i < ep.size()) ? ep[i] : 16'h0, 1'b1, i, (i < mp.size()) ? mp[i] : 32'h0, 1'b1);
    for (int i = 0; i < 4; i++) load_both(112 + i, 16'h0, 1'b1, 256 + i, 32'h0, 1'b1);

    // start, stop part-way, check the stop, restart
    @(negedge clk);
    checking = 1;
    ex16_run = 1; mips_run = 1;
    repeat (37) @(negedge clk);
    ex16_run = 0; mips_run = 0;
    wait (ex16_idle && mips_idle);
    begin
      logic [15:0] epc;
      logic [31:0] mpc;
      epc = ex16_pc;
      mpc = mips_pc;
      repeat (5) @(negedge clk);
      cmp(32'(ex16_pc), 32'(epc), "ex16 holds while stopped");
      cmp(mips_pc, mpc, "mips holds while stopped");
      n_stop++;
    end
    run_until(16'd43, 32'd96, 5000);
    peek_ex16(112, 16'd1, "ex16 sum stored");
    peek_ex16(113, 16'd1, "ex16 slt stored");
    peek_ex16(114, 16'd3, "ex16 subroutine result");
    peek_mips(256, 32'd10, "mips sub stored");
    peek_mips(257, 32'd1, "mips slt stored");

    // ---------------- phase 2: random programs over the whole memory
    for (int prog = 0; prog < 5; prog++) begin
      reset_both();
      for (int i = 0; i < 65536; i++)
        load_both(i, (i < 512) ? ex16_rand_instr() : 16'($urandom_range(0, 65535)), 1'b1,
                  i % 16384, (i < 512) ? mips_rand_instr() : $urandom_range(0, 1000), i < 16384);
      // run a fixed number of clocks, both machines at once
      @(negedge clk);
      checking = 1;
      ex16_run = 1; mips_run = 1;
      repeat (6000) @(negedge clk);
      ex16_run = 0; mips_run = 0;
      wait (ex16_idle && mips_idle);
      @(negedge clk);
      checking = 0;
    end

    // ---------------- mechanism coverage
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (e_ops[i] == 0) begin failures++; $display("FAIL ex16 opcode %0d never ran", i); end
      checks++;
      if (e_sh[i] == 0) begin failures++; $display("FAIL ex16 shift type %0d never ran", i); end
    end
    begin
      string names [16] = '{"add", "sub", "and", "or", "slt", "sll", "srl", "addi", "slti",
                            "andi", "ori", "lw", "sw", "beq", "bne", "j"};
      foreach (names[i]) begin
        checks++;
        if (!m_ops.exists(names[i])) begin failures++; $display("FAIL mips %s never ran", names[i]); end
      end
    end
    checks++;
    if (e_taken == 0 || e_ntaken == 0 || m_taken == 0 || m_ntaken == 0 || e_r0 == 0 || m_r0 == 0 ||
        n_ld_w == 0 || n_ld_r == 0 || n_stop == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("ex16: taken=%0d not_taken=%0d r0_writes=%0d  mips: taken=%0d not_taken=%0d r0_writes=%0d",
             e_taken, e_ntaken, e_r0, m_taken, m_ntaken, m_r0);
    $display("loader writes=%0d reads=%0d stop/restart=%0d", n_ld_w, n_ld_r, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
