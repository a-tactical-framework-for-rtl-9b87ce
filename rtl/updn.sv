// updn: increment/decrement unit (UPDN).
//
// Combinational: per i viz up: inc(s); dn: dcr(s), modulo 2**W. It is the
// component that a factorization synthesises for the inc and dcr terms of
// the factor_example system. Encoding up as 0 and dn as 1 is this design's
// choice.
module updn #(
  parameter int unsigned W = 8
) (
  input  logic         i,    // 0: up, 1: dn
  input  logic [W-1:0] s,
  output logic [W-1:0] y
);
  assign y = i ? s - 1'b1 : s + 1'b1;
endmodule
