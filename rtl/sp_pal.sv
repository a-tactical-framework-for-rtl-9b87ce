// sp_pal: the single pulser as two-flip-flop PAL logic.
//
// This is the reduced equation set the original design programmed into a
// PAL: the selector alternative is encoded in combinational signals
// S1 = C and S0 = ~I, and both C and O are stored in D flip-flops:
//   C <= ~S0            (C becomes I)
//   O <= ~S1 & ~S0      (O becomes ~C & I)
// The function equals single_pulser's, but the output is registered, so each
// pulse appears one clock later. Reset, asynchronous and active low, is this
// design's addition: it clears O and sets C to ack (0).
module sp_pal (
  input  logic clk,
  input  logic rst_n,
  input  logic i,
  output logic o
);
  logic c, s1, s0;
  assign s1 = c;
  assign s0 = !i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 1'b0;
      o <= 1'b0;
    end else begin
      c <= !s0;
      o <= !s1 && !s0;
    end
  end
endmodule
