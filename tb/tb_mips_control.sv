// tb_mips_control: self-checking test of the MIPS multicycle controller.
// For each supported instruction (and one unknown opcode and funct) it runs
// one instruction and checks, clock by clock, fetch, register read, memory
// read/write, register write with destination rd or rt, PC update and
// retire, and the clock count: lw 5, sw 4, R/I 4, beq/bne 3, j 2.
module tb_mips_control;
  import mips_pkg::*;

  logic       clk = 0, rst_n = 0, run = 0;
  logic [5:0] opcode, funct;
  state_e     state;
  ctl_t       ctl;
  int         checks = 0, failures = 0;

  mips_control dut (.clk(clk), .rst_n(rst_n), .run(run), .opcode(opcode), .funct(funct),
                    .state(state), .ctl(ctl));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic eb(logic got, logic exp, string what, int op, int fn, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%0d funct=%h cycle=%0d %s got %b expected %b", op, fn, cyc, what, got, exp);
    end
  endtask

  initial begin
    int ops [$] = '{0, 0, 0, 0, 0, 0, 0, 0, 2, 4, 5, 8, 10, 12, 13, 35, 43, 63};
    int fns [$] = '{'h20, 'h22, 'h24, 'h25, 'h2a, 'h00, 'h02, 'h3f, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    int n, cyc, op, fn;
    bit wr, known;
    opcode = 0; funct = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++;
    if (ctl !== '0 || state !== S_FETCH) begin failures++; $display("FAIL idle"); end
    for (int rep = 0; rep < 2; rep++) begin
      foreach (ops[i]) begin
        op = ops[i]; fn = fns[i];
        opcode = 6'(op); funct = 6'(fn);
        run = 1;
        n = (op == 35) ? 5 : (op == 43) ? 4 : (op == 4 || op == 5) ? 3 : (op == 2) ? 2 : 4;
        known = (op == 0) ? (fn != 'h3f) : (op != 63);
        wr = known && !(op inside {2, 4, 5, 43});
        cyc = 0;
        do begin
          cyc++;
          #1;
          eb(ctl.fetch, cyc == 1, "fetch", op, fn, cyc);
          eb(ctl.ab_we, cyc == 2, "ab_we", op, fn, cyc);
          eb(ctl.retire, cyc == n, "retire", op, fn, cyc);
          eb(ctl.mem_we, op == 43 && cyc == 4, "mem_we", op, fn, cyc);
          eb(ctl.mdr_we, op == 35 && cyc == 4, "mdr_we", op, fn, cyc);
          eb(ctl.rf_we, wr && cyc == n, "rf_we", op, fn, cyc);
          eb(ctl.pc_we, (op inside {2, 4, 5}) && cyc == n, "pc_we", op, fn, cyc);
          if (cyc == n && wr) begin
            eb(ctl.dst_rd, op == 0, "dst_rd", op, fn, cyc);
            eb(ctl.wb_mdr, op == 35, "wb_mdr", op, fn, cyc);
          end
          if (cyc == 3 && op == 12) eb(ctl.srcb == SRCB_ZEXT, 1'b1, "andi zext", op, fn, cyc);
          if (cyc == 3 && op == 10) eb(ctl.alu_op == ALU_SLT && ctl.srcb == SRCB_SEXT, 1'b1, "slti", op, fn, cyc);
          if (cyc == 3 && op == 0 && fn == 'h22) eb(ctl.alu_op == ALU_SUB, 1'b1, "sub", op, fn, cyc);
          if (cyc == 3 && op == 0 && fn == 'h02) eb(ctl.alu_op == ALU_SRL, 1'b1, "srl", op, fn, cyc);
          if (cyc == n) run = (rep == 0);
          @(negedge clk);
        end while (cyc < n && cyc < 10);
        checks++;
        if (state !== S_FETCH) begin failures++; $display("FAIL op=%0d not back in FETCH", op); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
