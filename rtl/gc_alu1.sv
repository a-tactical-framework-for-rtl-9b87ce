// gc_alu1: first address arithmetic unit of the garbage collector (ALU1).
//
// Combinational. Instructions: C gives 0, AI addinc(A,B), I inc(A),
// A add(A,B), IA incadd(A,B), all modulo 2**ADDR_W. The instruction set
// follows the original design. addinc and incadd are both computed as
// A+B+1: in modular arithmetic adding then incrementing and incrementing
// then adding give the same sum, and each use in the collector (stepping
// over a header plus its data words) needs exactly that.
module gc_alu1 #(
  parameter int unsigned ADDR_W = 24
) (
  input  gc_pkg::alu1_op_e  inst,
  input  logic [ADDR_W-1:0] a,
  input  logic [ADDR_W-1:0] b,
  output logic [ADDR_W-1:0] x
);
  always_comb begin
    unique case (inst)
      gc_pkg::ALU1_AI: x = a + b + 1'b1;
      gc_pkg::ALU1_I:  x = a + 1'b1;
      gc_pkg::ALU1_A:  x = a + b;
      gc_pkg::ALU1_IA: x = a + b + 1'b1;
      default:         x = '0;
    endcase
  end
endmodule
