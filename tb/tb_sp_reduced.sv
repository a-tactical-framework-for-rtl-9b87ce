// tb_sp_reduced: test of the reduced single pulser.
//
// First the 22-sample reference input/output trace (L = 0, H = 1), then
// random inputs against the reference o = i & ~(previous i). The pulse must
// appear in the same clock as the input edge and last one clock, and a
// long run of 1s must give exactly one pulse.
module tb_sp_reduced;
  localparam string TI = "LLLHHHHLLHLLHHLLHHHLLL";
  localparam string TO = "LLLHLLLLLHLLHLLLHLLLLL";
  logic clk = 1'b0, rst_n = 1'b0, i = 1'b0, o;
  always #5 clk = !clk;
  sp_reduced dut (.*);
  int checks = 0, failures = 0, pulses = 0, runs = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    logic prev;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < TI.len(); k++) begin
      i = (TI[k] == "H");
      #1 check(o == (TO[k] == "H"), $sformatf("trace sample %0d", k));
      @(negedge clk);
    end
    prev = i;
    for (int k = 0; k < 3000; k++) begin
      i = ($urandom_range(3) == 0) ? !prev : prev;
      if (k > 2000 && k < 2100) i = 1'b1;   // long run
      #1 check(o == (i && !prev), $sformatf("random sample %0d", k));
      if (o) pulses++;
      if (i && !prev) runs++;
      prev = i;
      @(negedge clk);
    end
    check(pulses == runs, "one pulse per run of ones");
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
