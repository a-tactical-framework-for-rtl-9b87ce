// tb_factor_example: random test of the factored two-output example against
// its unfactored definition U = p ? A+B : C+1, X = p ? D-1 : E+F (mod 256).
module tb_factor_example;
  logic p; logic [7:0] a, b, c, d, e, f, u, x;
  factor_example dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 5000; k++) begin
      p = $urandom; a = $urandom; b = $urandom; c = $urandom; d = $urandom; e = $urandom; f = $urandom;
      if (k < 4) begin c = 8'hff; d = 8'h00; end
      #1;
      checks += 2;
      if (u != (p ? 8'(a + b) : 8'(c + 1))) failures++;
      if (x != (p ? 8'(d - 1) : 8'(e + f))) failures++;
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
