// fx_dcradd: the DCRADD component of the alternative factorization of the
// two-output example.
//
// Combinational. Instruction op selects add (op = 1: y = s + t) or dn
// (op = 0: y = s - 1, t a don't-care). The two-instruction behaviour follows
// the original design; the one-bit encoding and the width W (default 8,
// modular) are this design's choice.
module fx_dcradd #(
  parameter int unsigned W = 8
) (
  input  logic         op,
  input  logic [W-1:0] s,
  input  logic [W-1:0] t,
  output logic [W-1:0] y
);
  // One adder: the second operand is t for add and all ones (-1) for dn.
  assign y = s + (op ? t : '1);
endmodule
