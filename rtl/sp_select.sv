// sp_select: the four-way selector of the single pulser (Select).
//
// Combinational: Select(p, q, v0, v1, v2, v3) = per p viz ack: q -> v0, v1;
// nak: q -> v2, v3. Alternative v_i is chosen by the two-bit number {p, ~q}.
// The selector follows the original design. Representing nak as 1 and ack
// as 0 follows its PAL realisation. The width W is a parameter so that the
// same selector serves symbolic and boolean alternatives.
module sp_select #(
  parameter int unsigned W = 1
) (
  input  logic         p,    // 0: ack, 1: nak
  input  logic         q,
  input  logic [W-1:0] v0,
  input  logic [W-1:0] v1,
  input  logic [W-1:0] v2,
  input  logic [W-1:0] v3,
  output logic [W-1:0] y
);
  always_comb begin
    unique case ({p, q})
      2'b01:   y = v0;
      2'b00:   y = v1;
      2'b11:   y = v2;
      default: y = v3;
    endcase
  end
endmodule
