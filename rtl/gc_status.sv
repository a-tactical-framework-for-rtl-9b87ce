// gc_status: the STATUS predicate group of the garbage collector.
//
// Purely combinational. It gathers the twelve inputs of the control selector:
// the control state S, the GO port, the scan-complete test eq?(U,A), the
// active-memory flag W, and the tag tests on registers H and D, plus the loop
// end test eq?(C,-1). The list of predicates and their order follow the
// original design. pointer?(H) (H points to a pair, vector, byte vector or
// fixed byte vector) and bvec?(H) (H is a byte-vector header met while
// scanning) are this design's reading of predicates the original only names.
//
// S, GO and W pass straight into p unchanged: the selector tests them
// alongside the computed predicates, so they belong to the same group.
//
// Interface: inputs s, go, w, h, d, u, a, c; output p (gc_pkg::status_t).
module gc_status
  import gc_pkg::*;
(
  input  state_e  s,
  input  logic    go,
  input  logic    w,
  input  word_t   h,
  input  word_t   d,
  input  addr_t   u,
  input  addr_t   a,
  input  addr_t   c,
  output status_t p
);
  tag_t tag_h, tag_d;
  assign tag_h = h[WORD_W-1:ADDR_W];
  assign tag_d = d[WORD_W-1:ADDR_W];

  always_comb begin
    p.s         = s;
    p.go        = go;
    p.u_eq_a    = (u == a);
    p.w         = w;
    p.pair_h    = (tag_h == TAG_PAIR);
    p.vec_h     = (tag_h == TAG_VEC);
    p.bvecp_h   = (tag_h == TAG_BVEC);
    p.fbvec_h   = (tag_h == TAG_FBVEC);
    p.pointer_h = p.pair_h | p.vec_h | p.bvecp_h | p.fbvec_h;
    p.bvec_h    = (tag_h == TAG_BHDR);
    p.fwd_d     = (tag_d == TAG_FWD);
    p.c_m1      = (c == '1);
  end
endmodule
