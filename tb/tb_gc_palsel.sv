// tb_gc_palsel: test of the selector that produces the command number.
//
// Drives random states and predicates and compares CMD with the selector
// tree written as a table walk: for each state, the ordered list of tests
// and the command numbers of its leaves, W choosing the first of a pair.
module tb_gc_palsel;
  import gc_pkg::*;
  status_t p;
  cmd_t cmd;
  gc_palsel dut (.*);
  int checks = 0, failures = 0;
  int unsigned seen [NCMD];
  function automatic int unsigned wp(logic w, int unsigned first);
    return w ? first : first + 1;
  endfunction
  function automatic int unsigned expect_cmd(status_t q);
    case (q.s)
      ST_IDLE:   return q.go ? 0 : 1;
      ST_DRIVER: return q.u_eq_a ? 2 : wp(q.w, 3);
      ST_NEXT:   return q.pointer_h ? wp(q.w, 5) : q.bvec_h ? 7 : 8;
      ST_OBJ:    return q.fwd_d ? wp(q.w, 9) : q.pair_h ? wp(q.w, 11) : q.vec_h ? wp(q.w, 13) :
                        q.bvecp_h ? wp(q.w, 15) : 17;
      ST_PAIR1:  return wp(q.w, 18);
      ST_PAIR2:  return wp(q.w, 20);
      ST_VEC:    return wp(q.w, 22);
      ST_VLOOP:  return q.c_m1 ? wp(q.w, 24) : wp(q.w, 26);
      ST_BVEC:   return wp(q.w, 28);
      ST_BLOOP:  return q.c_m1 ? wp(q.w, 30) : wp(q.w, 32);
      default:   return 1;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < NCMD; i++) seen[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      p = status_t'({$urandom, $urandom});
      p.s = state_e'($urandom_range(9));
      #1;
      checks++;
      seen[cmd]++;
      if (int'(cmd) != expect_cmd(p)) begin
        failures++;
        if (failures < 20) $display("FAIL: state %s cmd %0d expected %0d", p.s.name(), cmd, expect_cmd(p));
      end
    end
    for (int i = 0; i < NCMD; i++) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
