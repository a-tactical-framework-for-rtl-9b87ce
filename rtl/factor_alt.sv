// factor_alt: the two-output example in its alternative factorization, one
// component per output.
//
// Computes the same U = if[p, add(A,B), inc(C)] and X = if[p, dcr(D),
// add(E,F)] as factor_example, but factored per signal instead of per
// operation:
//   U = ADDINC(if[p, add, up], if[p, A, C], B)
//   X = DCRADD(if[p, dn, add], if[p, D, E], F)
// Each output has its own adder-like component (fx_addinc, fx_dcradd), so
// this form uses two adders where factor_example uses one adder and one
// up/down unit. The decomposition follows the original design; the width W
// (default 8, modular arithmetic) is this design's choice. Combinational.
module factor_alt #(
  parameter int unsigned W = 8
) (
  input  logic         p,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  input  logic [W-1:0] f,
  output logic [W-1:0] u,
  output logic [W-1:0] x
);
  fx_addinc #(.W(W)) u_addinc (.op(p),  .s(p ? a : c), .t(b), .y(u));
  fx_dcradd #(.W(W)) u_dcradd (.op(!p), .s(p ? d : e), .t(f), .y(x));
endmodule
