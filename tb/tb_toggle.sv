// tb_toggle: test of the clear/toggle storage bit against a model.
module tb_toggle;
  logic clk = 1'b0, c = 1'b1, t = 1'b0, q;
  always #5 clk = !clk;
  toggle dut (.*);
  int checks = 0, failures = 0;
  initial begin
    logic model;
    @(posedge clk); model = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (q != model) failures++;
      c = ($urandom_range(5) == 0); t = $urandom;
      @(posedge clk);
      model = c ? 1'b0 : (t ? !model : model);
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
