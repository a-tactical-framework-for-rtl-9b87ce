// tb_adder: exhaustive test of the 8-bit BitSum ripple adder, and a random
// test of a 24-bit instance.
module tb_adder;
  logic [7:0] a, b; logic c0; logic [8:0] s;
  logic [23:0] a2, b2; logic [24:0] s2;
  adder #(.N(8)) dut (.*);
  adder #(.N(24)) dut24 (.a(a2), .b(b2), .c0, .s(s2));
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 2**17; k++) begin
      {c0, a, b} = 17'(k);
      a2 = $urandom; b2 = $urandom;
      #1;
      checks += 2;
      if (s != 9'(a) + 9'(b) + 9'(c0)) failures++;
      if (s2 != 25'(a2) + 25'(b2) + 25'(c0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
