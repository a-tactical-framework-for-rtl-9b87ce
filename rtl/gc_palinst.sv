// gc_palinst: control registers and instruction decoding (PALinst).
//
// Holds the control state S, the ready port R and the active-memory flag W,
// and decodes the broadcast command CMD into the instruction signals of both
// memories (@/R/W), ALU1, ALU2, the counter and BYTETOWORD. The grouping of
// these signals into one block follows the original design. The state
// register is loaded every clock from the decoded next state. R and W change
// only on the commands that set them (v0, v1, v2).
//
// Reset, asynchronous and active low, is this design's choice: S = idle,
// R = 1 (ready), W = 0 (memory 2 holds the live heap, memory 1 is the
// to-space).
//
// Timing: the instruction outputs are combinational in CMD; S, R and W
// change at the rising clock edge.
module gc_palinst
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cmd_t     cmd,
  output state_e   s,
  output logic     r,
  output logic     w,
  output mem_op_e  m1_i,
  output mem_op_e  m2_i,
  output alu1_op_e z1_i,
  output alu2_op_e z2_i,
  output cnt_op_e  c_i,
  output btw_op_e  z3_i
);
  ctl_t ctl;
  assign ctl  = gc_decode(cmd);
  assign m1_i = ctl.m1_i;
  assign m2_i = ctl.m2_i;
  assign z1_i = ctl.z1_i;
  assign z2_i = ctl.z2_i;
  assign c_i  = ctl.c_i;
  assign z3_i = ctl.z3_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= ST_IDLE;
      r <= 1'b1;
      w <= 1'b0;
    end else begin
      s <= ctl.s_next;
      if (ctl.r_set) r <= 1'b1;
      else if (ctl.r_clr) r <= 1'b0;
      if (ctl.w_flip) w <= !w;
    end
  end
endmodule
