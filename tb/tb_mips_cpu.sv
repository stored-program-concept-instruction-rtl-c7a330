// tb_mips_cpu: self-checking test of the MIPS subset processor against the
// instruction-level model mips_iss.
//
// First a directed program built from classic MIPS textbook examples
// (add $t0,$s1,$s2 encoded as 0x02324020, lw $t0,32($s2) as op 35, rs 18,
// rt 9, offset 32, addi/slti/andi/ori on $29, $8 and $18, beq/bne, slt, j);
// then 30 random programs of 256 instruction words drawn from the
// supported instructions (plus some unknown codes), 400 instructions each.
// Every completed instruction is compared with the model: address, word,
// register write, memory store and the clock count. Taken and not-taken
// branches, loads, stores, jumps and shifts must each occur.
module tb_mips_cpu;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  localparam int MAW = 14;

  logic              clk = 0, rst_n = 0, run = 0;
  logic [MAW-1:0]    mem_addr;
  logic [31:0]       mem_wdata, mem_rdata, pc, retire_pc, retire_ir, wb_data;
  logic              mem_we, idle, retire_valid, wb_we;
  logic [4:0]        wb_addr;
  logic [31:0]       tbmem [1 << MAW];
  int                checks = 0, failures = 0;
  int                n_taken = 0, n_ntaken = 0, n_lw = 0, n_sw = 0, n_j = 0, n_sh = 0;
  mips_iss           iss;

  mips_cpu #(.MAW(MAW)) dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .mem_addr(mem_addr), .mem_we(mem_we), .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .idle(idle), .pc(pc), .retire_valid(retire_valid), .retire_pc(retire_pc),
    .retire_ir(retire_ir), .wb_we(wb_we), .wb_addr(wb_addr), .wb_data(wb_data)
  );

  assign mem_rdata = tbmem[mem_addr];
  always_ff @(posedge clk) if (mem_we) tbmem[mem_addr] <= mem_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h (pc %h ir %h)", what, got, exp, iss.o_pc, iss.o_ir);
    end
  endtask

  task automatic run_program(int ninstr);
    int cyc;
    rst_n = 0; run = 0;
    iss.reset();
    foreach (tbmem[i]) iss.mem[i] = tbmem[i];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    for (int k = 0; k < ninstr; k++) begin
      cyc = 1;
      #1;
      while (!retire_valid && cyc < 20) begin
        @(negedge clk); #1;
        cyc++;
      end
      iss.step();
      cmp(retire_pc, iss.o_pc, "retire_pc");
      cmp(retire_ir, iss.o_ir, "retire_ir");
      cmp(32'(cyc), 32'(iss.o_cycles), "clocks");
      cmp(32'(wb_we), 32'(iss.o_wb), "wb_we");
      if (iss.o_wb) begin
        cmp(32'(wb_addr), 32'(iss.o_wa), "wb_addr");
        cmp(wb_data, iss.o_wd, "wb_data");
      end
      cmp(32'(mem_we), 32'(iss.o_st), "mem_we");
      if (iss.o_st) begin
        cmp(32'(mem_addr), iss.o_sa, "store addr");
        cmp(mem_wdata, iss.o_sd, "store data");
      end
      case (iss.o_ir[31:26])
        6'd35: n_lw++;
        6'd43: n_sw++;
        6'd4, 6'd5: if (iss.o_taken) n_taken++; else n_ntaken++;
        6'd2: n_j++;
        6'd0: if (iss.o_ir[5:0] inside {6'h00, 6'h02}) n_sh++;
        default: ;
      endcase
      @(negedge clk);
    end
    run = 0;
    @(negedge clk);
    cmp(pc, iss.pc, "final pc");
  endtask

  function automatic logic [31:0] rand_instr();
    int k = $urandom_range(0, 19);
    int rs = $urandom_range(0, 31), rt = $urandom_range(0, 31), rd = $urandom_range(0, 31);
    case (k)
      0: return enc_r('h20, rd, rs, rt);
      1: return enc_r('h22, rd, rs, rt);
      2: return enc_r('h24, rd, rs, rt);
      3: return enc_r('h25, rd, rs, rt);
      4: return enc_r('h2a, rd, rs, rt);
      5: return enc_r('h00, rd, 0, rt, $urandom_range(0, 31));
      6: return enc_r('h02, rd, 0, rt, $urandom_range(0, 31));
      7: return enc_i(8, rt, rs, $urandom);
      8: return enc_i(10, rt, rs, $urandom);
      9: return enc_i(12, rt, rs, $urandom);
      10: return enc_i(13, rt, rs, $urandom);
      11, 12: return enc_i(35, rt, rs, $urandom_range(0, 4095));
      13, 14: return enc_i(43, rt, rs, $urandom_range(0, 4095));
      15: return enc_i(4, rt, rs, $urandom_range(0, 16) - 8);
      16: return enc_i(5, rt, rs, $urandom_range(0, 16) - 8);
      17: return enc_j($urandom_range(0, 255) * 4);
      18: return $urandom;
      default: return enc_i(8, rt, 0, $urandom_range(0, 100));
    endcase
  endfunction

  initial begin
    iss = new(MAW);
    foreach (tbmem[i]) tbmem[i] = 32'(i * 3);
    // encoding examples: add $8, $17, $18 and lw $9, 32($18)
    cmp(enc_r('h20, 8, 17, 18), 32'b000000_10001_10010_01000_00000_100000, "add encoding");
    cmp(enc_i(35, 9, 18, 32), {6'd35, 5'd18, 5'd9, 16'd32}, "lw encoding");
    tbmem[0]  = enc_i(8, 17, 0, 7);            // addi $s1, $0, 7
    tbmem[1]  = enc_i(8, 18, 0, 64);           // addi $s2, $0, 64
    tbmem[2]  = enc_r('h20, 8, 17, 18);        // add  $t0, $s1, $s2
    tbmem[3]  = enc_i(35, 9, 18, 32);          // lw   $t1, 32($s2)  -> word 24
    tbmem[4]  = enc_i(8, 29, 29, 4);           // addi $29, $29, 4
    tbmem[5]  = enc_i(10, 8, 18, 10);          // slti $8, $18, 10
    tbmem[6]  = enc_i(12, 29, 29, 6);          // andi $29, $29, 6
    tbmem[7]  = enc_i(13, 29, 29, 4);          // ori  $29, $29, 4
    tbmem[8]  = enc_r('h2a, 10, 17, 18);       // slt  $t2, $s1, $s2
    tbmem[9]  = enc_i(5, 10, 0, 1);            // bne  $t2, $0, +1
    tbmem[10] = enc_i(8, 11, 0, 99);           // (skipped)
    tbmem[11] = enc_i(4, 17, 18, 1);           // beq  not taken
    tbmem[12] = enc_i(43, 8, 18, -4);          // sw   $t0, -4($s2)
    tbmem[13] = enc_r('h00, 12, 0, 17, 3);     // sll  $t4, $s1, 3
    tbmem[14] = enc_r('h02, 13, 0, 12, 1);     // srl  $t5, $t4, 1
    tbmem[15] = enc_j(64);                     // j 64
    tbmem[16] = enc_j(64);                     // j 64 (self loop)
    run_program(17);
    for (int prog = 0; prog < 30; prog++) begin
      foreach (tbmem[i]) tbmem[i] = (i < 256) ? rand_instr() : $urandom;
      run_program(400);
    end
    $display("taken=%0d not_taken=%0d lw=%0d sw=%0d j=%0d shifts=%0d", n_taken, n_ntaken, n_lw, n_sw, n_j, n_sh);
    checks++;
    if (n_taken == 0 || n_ntaken == 0 || n_lw == 0 || n_sw == 0 || n_j == 0 || n_sh == 0) begin
      failures++;
      $display("FAIL some instruction kind never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
