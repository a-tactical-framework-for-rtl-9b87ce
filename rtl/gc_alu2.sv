// gc_alu2: second address arithmetic unit of the garbage collector (ALU2).
//
// Combinational. Instructions: C gives 0, I inc(A), A add(A,B), modulo
// 2**ADDR_W. It follows the original design, which needed a second adder
// to keep both memories busy in the copy loops.
module gc_alu2 #(
  parameter int unsigned ADDR_W = 24
) (
  input  gc_pkg::alu2_op_e  inst,
  input  logic [ADDR_W-1:0] a,
  input  logic [ADDR_W-1:0] b,
  output logic [ADDR_W-1:0] x
);
  always_comb begin
    unique case (inst)
      gc_pkg::ALU2_I: x = a + 1'b1;
      gc_pkg::ALU2_A: x = a + b;
      default:        x = '0;
    endcase
  end
endmodule
