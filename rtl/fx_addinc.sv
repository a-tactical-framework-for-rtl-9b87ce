// fx_addinc: the ADDINC component of the alternative factorization of the
// two-output example.
//
// Combinational. Instruction op selects add (op = 1: y = s + t) or up
// (op = 0: y = s + 1). The second operand is a don't-care for up; it is
// accepted so that both instructions share one port list, which is how the
// original design generalizes the unary operation. The two-instruction
// behaviour follows the original design; the one-bit encoding and the width
// W (default 8, modular) are this design's choice.
module fx_addinc #(
  parameter int unsigned W = 8
) (
  input  logic         op,
  input  logic [W-1:0] s,
  input  logic [W-1:0] t,
  output logic [W-1:0] y
);
  // One adder: the second operand is t for add and 1 for up.
  assign y = s + (op ? t : W'(1));
endmodule
