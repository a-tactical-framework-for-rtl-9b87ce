// gc_count: the element counter C of the garbage collector (COUNT).
//
// A register with three instructions, applied at the rising clock edge:
// @ (CNT_NOP) holds, L (CNT_LD) loads data, D (CNT_DCR) decrements modulo
// 2**ADDR_W. The instruction set follows the original design. As there, the
// initial value is unspecified: there is no reset, and the collector loads
// C before it reads it.
module gc_count #(
  parameter int unsigned ADDR_W = 24
) (
  input  logic              clk,
  input  gc_pkg::cnt_op_e   inst,
  input  logic [ADDR_W-1:0] data,
  output logic [ADDR_W-1:0] x
);
  always_ff @(posedge clk) begin
    unique case (inst)
      gc_pkg::CNT_LD:  x <= data;
      gc_pkg::CNT_DCR: x <= x - 1'b1;
      default:         x <= x;
    endcase
  end
endmodule
