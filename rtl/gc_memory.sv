// gc_memory: one semispace memory of the garbage collector (MEMORY).
//
// The memory interprets one instruction per clock: @ (MEM_NOP) leaves it
// unchanged, R (MEM_RD) reads and W (MEM_WR) writes data at addr at the
// rising edge. The read port is combinational: q always shows the word at
// addr, so a read issued in one control state is loaded into a register at
// the end of that same state, as the collector's register-transfer
// specification assumes. The three instructions follow the original
// design. The original used hand-built dynamic RAM. Here it is a plain
// array of 2**ADDR_W words, which this design chose to span the whole
// address field. The array has no reset.
module gc_memory #(
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  gc_pkg::mem_op_e   inst,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] q
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  assign q = mem[addr];

  always_ff @(posedge clk) begin
    if (inst == gc_pkg::MEM_WR) mem[addr] <= data;
  end
endmodule
