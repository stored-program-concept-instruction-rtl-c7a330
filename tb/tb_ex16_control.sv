// tb_ex16_control: self-checking test of the example machine's multicycle
// controller. For every opcode it runs one instruction and checks, clock by
// clock, the step it is in and the control actions the operation table
// calls for: fetch in step 1, register read in step 2, the memory read or
// write, the register write with the right destination, the PC update and
// retire on the last step. The clocks per instruction are checked against
// LW 5, SW 4, R/I/SHIFT 4, BEQ/BNE 3, JAL/JR 2. It also checks that with run
// low the controller stays in FETCH and issues nothing.
module tb_ex16_control;
  import ex16_pkg::*;

  logic    clk = 0, rst_n = 0, run = 0;
  opcode_e opcode;
  state_e  state;
  ctl_t    ctl;
  int      checks = 0, failures = 0;

  ex16_control dut (.clk(clk), .rst_n(rst_n), .run(run), .opcode(opcode), .state(state), .ctl(ctl));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp, string what, int op, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%0d cycle=%0d %s got %b expected %b", op, cyc, what, got, exp);
    end
  endtask

  function automatic int cycles_of(int op);
    case (op)
      9: return 5;
      10: return 4;
      11, 12: return 3;
      14, 15: return 2;
      default: return 4;
    endcase
  endfunction

  initial begin
    int n, cyc;
    bit is_rt, is_wr;
    opcode = OP_ADD;
    #12 rst_n = 1;
    // idle with run low
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (state !== S_FETCH || ctl !== '0) begin failures++; $display("FAIL idle"); end
    end
    @(negedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      for (int op = 0; op < 16; op++) begin
        opcode = opcode_e'(op);
        run = 1;
        n = cycles_of(op);
        is_rt = (op <= 4);
        is_wr = !(op inside {10, 11, 12, 14});
        cyc = 0;
        do begin
          cyc++;
          #1;
          expect_bit(ctl.fetch,  cyc == 1, "fetch", op, cyc);
          expect_bit(ctl.ab_we,  cyc == 2, "ab_we", op, cyc);
          expect_bit(ctl.retire, cyc == n, "retire", op, cyc);
          expect_bit(ctl.mem_we, (op == 10) && cyc == 4, "mem_we", op, cyc);
          expect_bit(ctl.mdr_we, (op == 9) && cyc == 4, "mdr_we", op, cyc);
          expect_bit(ctl.mem_data, (op inside {9, 10}) && cyc == 4, "mem_data", op, cyc);
          expect_bit(ctl.rf_we,  is_wr && cyc == n, "rf_we", op, cyc);
          expect_bit(ctl.pc_we,  (op inside {11, 12, 14, 15}) && cyc == n, "pc_we", op, cyc);
          if (cyc == n && is_wr) begin
            checks++;
            if (ctl.dst_sel !== (op == 15 ? DST_LINK : is_rt ? DST_R3 : DST_R2)) begin
              failures++; $display("FAIL op=%0d dst_sel %0d", op, ctl.dst_sel);
            end
            checks++;
            if (ctl.wb_sel !== (op == 15 ? WB_LINK : op == 9 ? WB_MDR : WB_ALU)) begin
              failures++; $display("FAIL op=%0d wb_sel %0d", op, ctl.wb_sel);
            end
          end
          if (cyc == 3 && op inside {11, 12}) begin
            checks++;
            if (ctl.alu_op !== ALU_SUB || ctl.br_ne !== (op == 12) || ctl.pc_sel !== PC_BR) begin
              failures++; $display("FAIL op=%0d branch controls", op);
            end
          end
          if (cyc == 3 && op inside {2, 6}) begin
            checks++;
            if (ctl.alu_op !== ALU_AND) begin failures++; $display("FAIL op=%0d alu_op", op); end
          end
          if (cyc == n) run = (rep % 2 == 0);
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
