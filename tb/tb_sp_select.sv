// tb_sp_select: exhaustive test of the four-way selector (ack = 0, nak = 1).
module tb_sp_select;
  logic p, q;
  logic [3:0] v0, v1, v2, v3, y;
  sp_select #(.W(4)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 400; k++) begin
      {p, q} = 2'(k);
      v0 = $urandom; v1 = $urandom; v2 = $urandom; v3 = $urandom;
      #1;
      checks++;
      if (y != (!p ? (q ? v0 : v1) : (q ? v2 : v3))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
