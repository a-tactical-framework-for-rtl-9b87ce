// gc_palsel: the selector of the garbage collector (PALsel).
//
// Purely combinational. It walks the selector tree of the control state and
// status predicates and yields the number of the chosen alternative, v0 to
// v33, as the 6-bit command CMD that is broadcast to every other block. The
// tree (which predicate is tested in which state, and in which order) follows
// the original design. Encoding alternative v_i as the binary number i is
// this design's choice. The one don't-care leaf (an object pointer matching
// no tag) is sent to v17, which skips the word.
//
// Interface: input p (gc_pkg::status_t), output cmd.
module gc_palsel
  import gc_pkg::*;
(
  input  status_t p,
  output cmd_t    cmd
);
  // pick(a, b) = W ? a : b, the W-selected pair of alternatives
  function automatic cmd_t pick(logic sel, int unsigned a, int unsigned b);
    return sel ? cmd_t'(a[5:0]) : cmd_t'(b[5:0]);
  endfunction

  always_comb begin
    cmd = '0;
    unique case (p.s)
      ST_IDLE:   cmd = p.go ? 6'd0 : 6'd1;
      ST_DRIVER: cmd = p.u_eq_a ? 6'd2 : pick(p.w, 3, 4);
      ST_NEXT:   cmd = p.pointer_h ? pick(p.w, 5, 6) : (p.bvec_h ? 6'd7 : 6'd8);
      ST_OBJ: begin
        if      (p.fwd_d)   cmd = pick(p.w, 9, 10);
        else if (p.pair_h)  cmd = pick(p.w, 11, 12);
        else if (p.vec_h)   cmd = pick(p.w, 13, 14);
        else if (p.bvecp_h) cmd = pick(p.w, 15, 16);
        else                cmd = 6'd17;
      end
      ST_PAIR1:  cmd = pick(p.w, 18, 19);
      ST_PAIR2:  cmd = pick(p.w, 20, 21);
      ST_VEC:    cmd = pick(p.w, 22, 23);
      ST_VLOOP:  cmd = p.c_m1 ? pick(p.w, 24, 25) : pick(p.w, 26, 27);
      ST_BVEC:   cmd = pick(p.w, 28, 29);
      ST_BLOOP:  cmd = p.c_m1 ? pick(p.w, 30, 31) : pick(p.w, 32, 33);
      default:   cmd = 6'd1;
    endcase
  end
endmodule
