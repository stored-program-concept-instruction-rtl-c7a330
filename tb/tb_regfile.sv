// tb_regfile: self-checking test of the register file (16 x 16 bits).
// Checks reset to zero, random writes and two-port reads against a model
// array, that register 0 reads as zero whatever is written to it, and that
// a write lands on the clock edge (the old value is read before it).
module tb_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic        we;
  logic [15:0] model [16];
  int          checks = 0, failures = 0;

  regfile #(.W(16), .NREGS(16)) dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .rd1(rd1),
                                     .ra2(ra2), .rd2(rd2), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra1 = 4'(i); ra2 = 4'(15 - i); #1;
      cmp(rd1, 16'h0, "reset rd1");
      cmp(rd2, 16'h0, "reset rd2");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 4'($urandom);
      wd = 16'($urandom);
      ra1 = (n % 7 == 0) ? wa : 4'($urandom);
      ra2 = 4'($urandom);
      #1;
      cmp(rd1, (ra1 == 0) ? 16'h0 : model[ra1], "rd1 before edge");
      cmp(rd2, (ra2 == 0) ? 16'h0 : model[ra2], "rd2 before edge");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
      cmp(rd1, (ra1 == 0) ? 16'h0 : model[ra1], "rd1 after edge");
    end
    // register 0 stays zero
    @(negedge clk); we = 1; wa = 0; wd = 16'hbeef; ra1 = 0;
    @(posedge clk); #1; cmp(rd1, 16'h0, "r0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
