// adder: N-bit ripple-carry adder built from BitSum cells (Adder).
//
// Combinational: s = {C_N, S_N-1 .. S_0} = a + b + c0. Cell k adds a[k],
// b[k] and the carry of cell k-1, following the original design. The width N
// is a parameter there but has no value; 8 is this design's default.
module adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c0,
  output logic [N:0]   s
);
  logic [N:0] carry;
  assign carry[0] = c0;
  for (genvar k = 0; k < N; k++) begin : g_cell
    bitsum u_bitsum (.a(a[k]), .b(b[k]), .cin(carry[k]), .s(s[k]), .cout(carry[k+1]));
  end
  assign s[N] = carry[N];
endmodule
