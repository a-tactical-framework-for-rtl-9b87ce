// tb_sp_pal: test of the registered PAL form of the single pulser.
//
// Random inputs; the output must equal i & ~(previous i) delayed by one
// clock, i.e. one pulse per run of ones, one clock after the input edge.
module tb_sp_pal;
  logic clk = 1'b0, rst_n = 1'b0, i = 1'b0, o;
  always #5 clk = !clk;
  sp_pal dut (.*);
  int checks = 0, failures = 0;
  initial begin
    logic prev, expected;
    @(negedge clk); rst_n = 1'b1;
    prev = 1'b0; expected = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      i = ($urandom_range(3) == 0) ? !prev : prev;
      #1;
      checks++;
      if (o != expected) begin
        failures++;
        if (failures < 20) $display("FAIL: sample %0d", k);
      end
      @(posedge clk);
      expected = i && !prev;
      prev = i;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
