// tb_mips_alu: self-checking test of the 32-bit MIPS ALU: add, sub, and,
// or, signed slt and the shamt shifts sll/srl on directed corner cases and
// random operands; expected values are computed with 64-bit integer
// arithmetic (shifts as multiply/divide by powers of two).
module tb_mips_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0]  sh;
  alu_op_e     op;
  logic        zero;
  int          checks = 0, failures = 0;

  mips_alu #(.W(32)) dut (.a(a), .b(b), .shamt(sh), .op(op), .y(y), .zero(zero));

  function automatic logic [31:0] ref_y(logic [31:0] x, logic [31:0] z, int s, int o);
    longint ux = x, uz = z;
    longint m = 64'd1 << 32;
    case (o)
      0: return 32'((ux + uz) % m);
      1: return 32'((ux - uz + m) % m);
      2: return x & z;
      3: return x | z;
      4: return (longint'($signed(x)) < longint'($signed(z))) ? 32'd1 : 32'd0;
      5: return 32'((uz * (64'd1 << s)) % m);
      default: return 32'(uz / (64'd1 << s));
    endcase
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] z, int s, int o);
    logic [31:0] e;
    a = x; b = z; sh = 5'(s); op = alu_op_e'(o);
    #1;
    e = ref_y(x, z, s, o);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h sh=%0d y=%h expected %h", o, x, z, s, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 7; o++) begin
      check(32'h7fffffff, 32'h1, 1, o);
      check(32'h80000000, 32'h1, 31, o);
      check(32'hffffffff, 32'h80000000, 0, o);
      check(32'h5, 32'h5, 4, o);
      for (int i = 0; i < 500; i++) check($urandom, $urandom, int'($urandom_range(0, 31)), o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
