// toggle: a storage bit that is cleared or inverted.
//
//   Q = phi ! if(C, false, Z),  Z = if(T, not(Q), Q)
// At each rising edge q becomes 0 when c is 1, otherwise it inverts when t is
// 1 and holds when t is 0. The equations follow the original design. Its
// initial value is unspecified there, so there is no reset: assert c for one
// clock to clear it.
module toggle (
  input  logic clk,
  input  logic c,
  input  logic t,
  output logic q
);
  logic z;
  assign z = t ? !q : q;
  always_ff @(posedge clk) q <= c ? 1'b0 : z;
endmodule
