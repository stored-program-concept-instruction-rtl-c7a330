// tb_sp_memory: self-checking test of the unified memory at its full
// default size (64K x 16). Writes random words at random addresses, including
// the first and last word, and reads them back through the same port,
// comparing with a model; also checks that a word is unchanged when we is
// low and that the read is combinational (same cycle as the address).
module tb_sp_memory;
  logic        clk = 0;
  logic [15:0] addr, wdata, rdata;
  logic        we;
  logic [15:0] model [int];
  int          checks = 0, failures = 0;

  sp_memory dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    we = 0; addr = 0; wdata = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a = (n == 0) ? 0 : (n == 1) ? 65535 : (n < 2000) ? int'($urandom_range(0, 65535)) : int'($urandom_range(0, 63));
      addr = 16'(a); wdata = 16'($urandom); we = 1;
      @(posedge clk); model[a] = wdata;
      @(negedge clk); we = 0; wdata = ~wdata;
      #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %h got %h exp %h", a, rdata, model[a]); end
    end
    // read back everything written, with we low
    foreach (model[k]) begin
      @(negedge clk); addr = 16'(k); #1;
      checks++;
      if (rdata !== model[k]) begin failures++; $display("FAIL readback %h", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
