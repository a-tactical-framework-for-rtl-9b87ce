// bitsum: one-bit full adder cell (BitSum).
//
// Combinational: s = parity(a, b, cin), cout = majority(a, b, cin), as in the
// original design.
module bitsum (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
