// tb_gc_memory: test of the semispace memory.
//
// Writes random words at random addresses of a 256-word instance, keeping a
// model array, and checks that reads return the model's word. @ and R
// instructions must leave the contents unchanged, and a write shows on the
// read port from the next clock on.
module tb_gc_memory;
  import gc_pkg::*;
  localparam int AW = 8;
  logic clk = 1'b0;
  always #5 clk = !clk;
  mem_op_e inst = MEM_NOP;
  logic [AW-1:0] addr = '0;
  word_t data = '0, q;
  word_t model [2**AW];
  bit    valid [2**AW];
  gc_memory #(.ADDR_W(AW), .DATA_W(32)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 2**AW; i++) valid[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = $urandom; data = $urandom;
      case ($urandom_range(2)) 0: inst = MEM_NOP; 1: inst = MEM_RD; default: inst = MEM_WR; endcase
      #1;
      if (valid[addr]) begin
        checks++;
        if (q != model[addr]) begin
          failures++;
          if (failures < 20) $display("FAIL: addr %0d read %h expected %h", addr, q, model[addr]);
        end
      end
      if (inst == MEM_WR) begin model[addr] = data; valid[addr] = 1; end
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
