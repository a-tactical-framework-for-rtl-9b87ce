// gc_collector: bit-sliced stop-and-copy garbage collector (COLLECTOR).
//
// The heap lives in one of two semispace memories; the other is empty. On GO
// the collector copies everything reachable from the root word into the empty
// memory, in breadth-first (Cheney) order. Pointer U scans the copy and
// pointer A allocates in it. Each copied object leaves a forwarding word at
// its old place so that shared objects are copied once. When U catches up
// with A the roles of the memories are exchanged (flag W flips) and R rises.
// Both memories are used in the same clock: the copy loops read the old
// space and write the new space at once.
//
// Structure, following the original design:
//   gc_status      predicates P from the registers
//   gc_palsel      selector: CMD = SEL(P, 0..33), broadcast to all blocks
//   gc_palinst     S, R, W and the component instructions
//   gc_slice_addr  x24, bits 0..23 of H, D, U, A and all address selections
//   gc_slice_tag   x8, bits 24..31 of H, D and memory write data
//   gc_memory x2, gc_alu1, gc_alu2, gc_count, gc_btow
// One control state takes one clock: a pair costs five clocks (driver, next,
// obj, pair1, pair2), a vector of L words L+5, a byte vector of n bytes
// ceil(n/4)+5, any other scanned word two or three.
//
// This design's own additions: the root word input (H's value at start; the
// original's starting transition does not say where H comes from), A starting
// at 1 so that to-space word 0 receives the relocated root, and a host port
// that reads or writes either memory while the collector is idle (host_en is
// ignored otherwise). MEM_AW sets the number of memory address bits actually
// built (default: the full 24-bit address field); addresses are truncated to
// it.
//
// Interface: go is sampled in the idle state. r is 1 while idle and falls for
// the whole collection. w = 1 means memory 1 holds the live heap. host_rdata
// is combinational in host_mem and host_addr.
module gc_collector
  import gc_pkg::*;
#(
  parameter int unsigned MEM_AW = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  word_t root,
  output logic  r,
  output logic  w,
  input  logic  host_en,
  input  logic  host_mem,     // 0: memory 1, 1: memory 2
  input  logic  host_we,
  input  addr_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata
);
  state_e   s;
  status_t  p;
  cmd_t     cmd;
  mem_op_e  m1_i, m2_i;
  alu1_op_e z1_i;
  alu2_op_e z2_i;
  cnt_op_e  c_i;
  btw_op_e  z3_i;

  word_t h, d, m1_d, m2_d, m1_q, m2_q;
  addr_t u, a, z1_a, z1_b, z2_a, z2_b, c_d, z3_b, z1, z2, c, z3;
  addr_t m1_a, m2_a;

  gc_status u_status (.s, .go, .w, .h, .d, .u, .a, .c, .p);
  gc_palsel u_palsel (.p, .cmd);
  gc_palinst u_palinst (.clk, .rst_n, .cmd, .s, .r, .w, .m1_i, .m2_i, .z1_i, .z2_i, .c_i, .z3_i);

  for (genvar i = 0; i < ADDR_W; i++) begin : g_pala
    gc_slice_addr #(.BIT(i)) u_slice (
      .clk, .cmd, .m1_q(m1_q[i]), .m2_q(m2_q[i]), .z1(z1[i]), .z2(z2[i]), .c(c[i]),
      .z3(z3[i]), .root(root[i]), .h(h[i]), .d(d[i]), .u(u[i]), .a(a[i]),
      .m1a(m1_a[i]), .m1d(m1_d[i]), .m2a(m2_a[i]), .m2d(m2_d[i]),
      .z1a(z1_a[i]), .z1b(z1_b[i]), .z2a(z2_a[i]), .z2b(z2_b[i]), .cd(c_d[i]), .z3b(z3_b[i])
    );
  end
  for (genvar i = ADDR_W; i < WORD_W; i++) begin : g_paltag
    gc_slice_tag #(.BIT(i)) u_slice (
      .clk, .cmd, .m1_q(m1_q[i]), .m2_q(m2_q[i]), .root(root[i]),
      .h(h[i]), .d(d[i]), .m1d(m1_d[i]), .m2d(m2_d[i])
    );
  end

  gc_alu1  #(.ADDR_W(ADDR_W)) u_alu1  (.inst(z1_i), .a(z1_a), .b(z1_b), .x(z1));
  gc_alu2  #(.ADDR_W(ADDR_W)) u_alu2  (.inst(z2_i), .a(z2_a), .b(z2_b), .x(z2));
  gc_count #(.ADDR_W(ADDR_W)) u_count (.clk, .inst(c_i), .data(c_d), .x(c));
  gc_btow  #(.ADDR_W(ADDR_W)) u_btow  (.inst(z3_i), .byte_cnt(z3_b), .x(z3));

  // Host access to the memories while idle.
  logic      host_on;
  mem_op_e   mem1_i, mem2_i;
  addr_t     mem1_a, mem2_a;
  word_t     mem1_d, mem2_d;
  mem_op_e   host_op;
  assign host_on = host_en && (s == ST_IDLE);
  assign host_op = host_we ? MEM_WR : MEM_RD;

  always_comb begin
    mem1_i = m1_i; mem1_a = m1_a; mem1_d = m1_d;
    mem2_i = m2_i; mem2_a = m2_a; mem2_d = m2_d;
    if (host_on) begin
      if (!host_mem) begin mem1_i = host_op; mem1_a = host_addr; mem1_d = host_wdata; end
      else           begin mem2_i = host_op; mem2_a = host_addr; mem2_d = host_wdata; end
    end
  end

  gc_memory #(.ADDR_W(MEM_AW), .DATA_W(WORD_W)) u_mem1 (
    .clk, .inst(mem1_i), .addr(mem1_a[MEM_AW-1:0]), .data(mem1_d), .q(m1_q));
  gc_memory #(.ADDR_W(MEM_AW), .DATA_W(WORD_W)) u_mem2 (
    .clk, .inst(mem2_i), .addr(mem2_a[MEM_AW-1:0]), .data(mem2_d), .q(m2_q));

  assign host_rdata = host_mem ? m2_q : m1_q;

// R is low for the whole of a collection, and every collection ends in
  // the idle state.
  a_ready_only_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (s != ST_IDLE) |-> !r);
endmodule
