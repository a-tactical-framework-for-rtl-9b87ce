// factor_example: two outputs sharing one adder and one up/down unit.
//
// Computes U = if[p, add(A,B), inc(C)] and X = if[p, dcr(D), add(E,F)] in
// the factored form of the original design:
//   VZ = add(if[p,A,E], if[p,B,F])          one adder
//   WY = UPDN(if[p,dn,up], if[p,D,C])       one incrementer/decrementer
//   U  = if[p, VZ, WY],  X = if[p, WY, VZ]
// so the circuit has one adder instead of two. It is combinational. The
// width W has no value in the original; 8 bits, modular arithmetic, is this
// design's default. The adder is the BitSum ripple adder, carry-in 0.
module factor_example #(
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
  logic [W:0]   vz_full;
  logic [W-1:0] vz, wy;

  adder #(.N(W)) u_add (.a(p ? a : e), .b(p ? b : f), .c0(1'b0), .s(vz_full));
  assign vz = vz_full[W-1:0];
  updn #(.W(W)) u_updn (.i(p), .s(p ? d : c), .y(wy));

  assign u = p ? vz : wy;
  assign x = p ? wy : vz;
endmodule
