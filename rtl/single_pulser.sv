// single_pulser: one output pulse per input pulse.
//
// For every run of 1s on the synchronised input i, output o is 1 for exactly
// the first clock of the run. It is the system description
//   C = ack ! Select(C, I, nak, ack, nak, ack)
//   O = Select(C, I, true, false, false, false)
// built, as in the original design, from a state register C and two
// selectors. C remembers whether the previous input was 1 (nak) or 0 (ack).
// The output is 1 when C is ack and I is 1, so it is combinational in i and
// rises in the same clock as the input. The original's INPUT and OUTPUT port
// abstractions reduce to plain wires and are not separate blocks.
//
// Reset (asynchronous, active low) puts C in its initial value ack.
module single_pulser (
  input  logic clk,
  input  logic rst_n,
  input  logic i,
  output logic o
);
  localparam logic ACK = 1'b0, NAK = 1'b1;
  logic c, c_next;

  sp_select #(.W(1)) u_sel_c (.p(c), .q(i), .v0(NAK), .v1(ACK), .v2(NAK), .v3(ACK), .y(c_next));
  sp_select #(.W(1)) u_sel_o (.p(c), .q(i), .v0(1'b1), .v1(1'b0), .v2(1'b0), .v3(1'b0), .y(o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= ACK;
    else        c <= c_next;
  end
endmodule
