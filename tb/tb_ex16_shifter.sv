// tb_ex16_shifter: self-checking test of the one-bit shift unit.
// Every one of the 16 type codes is applied to directed and random
// operands; the expected result is computed with arithmetic (multiply and
// divide by two) rather than with shift operators.
module tb_ex16_shifter;
  logic [15:0] a, y;
  logic [3:0]  t;
  int          checks = 0, failures = 0;

  ex16_shifter #(.W(16)) dut (.a(a), .shtype(t), .y(y));

  function automatic logic [15:0] ref_y(logic [15:0] x, int k);
    int unsigned u = x;
    int unsigned msb = u / 32768;
    int unsigned lsb = u % 2;
    case (k)
      0: return 16'((u * 2) % 65536);
      1: return 16'(u / 2);
      2: return 16'(u / 2 + msb * 32768);
      3: return 16'((u * 2) % 65536 + msb);
      4: return 16'(u / 2 + lsb * 32768);
      5: return 16'((u * 2) % 65536 + 1);
      6: return 16'(u / 2 + 32768);
      default: return x;
    endcase
  endfunction

  task automatic check(logic [15:0] x, int k);
    a = x; t = 4'(k);
    #1;
    checks++;
    if (y !== ref_y(x, k)) begin
      failures++;
      $display("FAIL type=%0d a=%h y=%h expected %h", k, x, y, ref_y(x, k));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      check(16'h8001, k);
      check(16'h4000, k);
      check(16'h0000, k);
      check(16'hffff, k);
      for (int i = 0; i < 100; i++) check(16'($urandom), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
