// tb_gc_alu: tests of ALU1, ALU2 and BYTETOWORD.
//
// Random operands, every instruction, results compared with integer
// arithmetic modulo 2**24; btow(n) is compared with ceil(n/4). Includes the
// wrap-around corner cases.
module tb_gc_alu;
  import gc_pkg::*;
  alu1_op_e i1; alu2_op_e i2; btw_op_e i3;
  addr_t a, b, x1, x2, x3;
  gc_alu1 u1 (.inst(i1), .a, .b, .x(x1));
  gc_alu2 u2 (.inst(i2), .a, .b, .x(x2));
  gc_btow u3 (.inst(i3), .byte_cnt(a), .x(x3));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    longint unsigned m = 64'h100_0000;
    for (int i = 0; i < 3000; i++) begin
      a = (i < 4) ? 24'hffffff - i : $urandom;
      b = (i < 8) ? 24'hffffff : $urandom;
      i1 = alu1_op_e'($urandom_range(4)); i2 = alu2_op_e'($urandom_range(2)); i3 = btw_op_e'($urandom_range(1));
      #1;
      case (i1)
        ALU1_C:  check(x1 == 0, "ALU1 C");
        ALU1_AI: check(x1 == addr_t'((64'(a) + 64'(b) + 1) % m), "ALU1 addinc");
        ALU1_I:  check(x1 == addr_t'((64'(a) + 1) % m), "ALU1 inc");
        ALU1_A:  check(x1 == addr_t'((64'(a) + 64'(b)) % m), "ALU1 add");
        default: check(x1 == addr_t'((64'(a) + 64'(b) + 1) % m), "ALU1 incadd");
      endcase
      case (i2)
        ALU2_C:  check(x2 == 0, "ALU2 C");
        ALU2_I:  check(x2 == addr_t'((64'(a) + 1) % m), "ALU2 inc");
        default: check(x2 == addr_t'((64'(a) + 64'(b)) % m), "ALU2 add");
      endcase
      if (i3 == BTW_C) check(x3 == 0, "BYTETOWORD C");
      else check(x3 == addr_t'((64'(a) + 3) / 4), $sformatf("btow(%0d)=%0d", a, x3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
