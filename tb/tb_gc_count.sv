// tb_gc_count: test of the counter C.
//
// Random sequences of hold, load and decrement against a model counter,
// including decrementing through zero to -1 (all ones), the collector's
// loop end condition.
module tb_gc_count;
  import gc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  cnt_op_e inst = CNT_LD;
  addr_t data = '0, x;
  gc_count dut (.*);
  int checks = 0, failures = 0;
  initial begin
    addr_t model;
    @(negedge clk); inst = CNT_LD; data = 24'd2;
    @(posedge clk); model = 24'd2;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (x != model) begin
        failures++;
        if (failures < 20) $display("FAIL: count %0d expected %0d", x, model);
      end
      data = $urandom_range(4);
      case ($urandom_range(5))
        0: inst = CNT_LD; 1: inst = CNT_NOP; default: inst = CNT_DCR;
      endcase
      @(posedge clk);
      case (inst)
        CNT_LD:  model = data;
        CNT_DCR: model = model - 1;
        default: ;
      endcase
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
