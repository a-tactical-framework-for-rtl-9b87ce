// gc_btow: byte-to-word rounding unit of the garbage collector (BYTETOWORD).
//
// Combinational. Instruction C gives 0; B gives btow(byte_cnt), the number of
// 32-bit words that hold byte_cnt bytes, ceil(byte_cnt / 4). The two
// instructions follow the original design. Four bytes per word, and rounding
// up, are this design's reading of "rounds byte offsets to word boundaries".
// The top bits of x are always 0: a quarter of a 24-bit count needs 22 bits.
module gc_btow #(
  parameter int unsigned ADDR_W         = 24,
  parameter int unsigned BYTES_PER_WORD = 4
) (
  input  gc_pkg::btw_op_e   inst,
  input  logic [ADDR_W-1:0] byte_cnt,
  output logic [ADDR_W-1:0] x
);
  localparam int unsigned SH = $clog2(BYTES_PER_WORD);
  logic [ADDR_W:0] sum;
  assign sum = {1'b0, byte_cnt} + (ADDR_W+1)'(BYTES_PER_WORD - 1);
  assign x   = (inst == gc_pkg::BTW_B) ? ADDR_W'(sum >> SH) : '0;
endmodule
