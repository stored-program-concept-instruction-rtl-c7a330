// tb_ex16_alu: self-checking test of the example machine's ALU.
// Applies directed corner cases and 2000 random operand pairs to all five
// operations and compares y and zero with values computed here.
module tb_ex16_alu;
  import ex16_pkg::*;

  logic [15:0] a, b, y;
  alu_op_e     op;
  logic        zero;
  int          checks = 0, failures = 0;

  ex16_alu #(.W(16)) dut (.a(a), .b(b), .op(op), .y(y), .zero(zero));

  function automatic logic [15:0] expect_y(logic [15:0] x, logic [15:0] z, int o);
    case (o)
      0: return 16'((int'(x) + int'(z)) % 65536);
      1: return 16'((int'(x) - int'(z) + 65536) % 65536);
      2: return x & z;
      3: return x | z;
      default: return (int'($signed(x)) < int'($signed(z))) ? 16'd1 : 16'd0;
    endcase
  endfunction

  task automatic check(logic [15:0] x, logic [15:0] z, int o);
    logic [15:0] e;
    a = x; b = z; op = alu_op_e'(o);
    #1;
    e = expect_y(x, z, o);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h zero=%b expected %h", o, x, z, y, zero, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 5; o++) begin
      check(16'h7fff, 16'h0001, o);
      check(16'h8000, 16'h0001, o);
      check(16'hffff, 16'h0001, o);
      check(16'h0005, 16'h0005, o);
      check(16'h0000, 16'h0000, o);
      check(16'h0001, 16'hffff, o);
    end
    for (int i = 0; i < 2000; i++) check(16'($urandom), 16'($urandom), i % 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
