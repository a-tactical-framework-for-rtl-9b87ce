// sp_reduced: the single pulser in its fully reduced form.
//
//   C = ack ! I,   O = AndNot(I, C) = I and not C
// C is simply the input delayed by one clock, and the output is 1 when the
// input is 1 now and was 0 in the previous clock. This is what the selector
// form (single_pulser) and the PAL equations (sp_pal) reduce to once the
// state encoding is simplified by hand; the equations follow the original
// design. The output is combinational in i, so the pulse appears in the same
// clock as single_pulser's.
//
// Reset (asynchronous, active low) sets C to ack (0), so an input that is 1
// in the first clock after reset gives a pulse, as in single_pulser. The
// original leaves C's initial value open in one version of these equations
// and gives ack in another; ack is used here.
module sp_reduced (
  input  logic clk,
  input  logic rst_n,
  input  logic i,
  output logic o
);
  logic c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= 1'b0;
    else        c <= i;
  end

  assign o = i & ~c;
endmodule
