// tb_gc_status: test of the STATUS predicate group.
//
// Drives random register values, with the tag fields drawn mostly from the
// defined tags, and checks each predicate against the tag numbers written out
// here: pair 01, vec 02, bvec 03, fbvec 04, byte-vector header 06, fwd 80.
module tb_gc_status;
  import gc_pkg::*;
  state_e s; logic go, w; word_t h, d; addr_t u, a, c;
  status_t p;
  gc_status dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] rtag();
    logic [7:0] t [8] = '{8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h80};
    return ($urandom_range(9) < 8) ? t[$urandom_range(7)] : 8'($urandom);
  endfunction
  initial begin
    for (int i = 0; i < 2000; i++) begin
      s = state_e'($urandom_range(9)); go = $urandom; w = $urandom;
      h = {rtag(), 24'($urandom)}; d = {rtag(), 24'($urandom)};
      u = $urandom_range(3); a = $urandom_range(3);
      c = ($urandom_range(3) == 0) ? 24'hffffff : 24'($urandom_range(5));
      #1;
      check(p.s == s && p.go == go && p.w == w, "pass-through predicates");
      check(p.u_eq_a == (u == a), "eq?(U,A)");
      check(p.pair_h == (h[31:24] == 8'h01), "pair");
      check(p.vec_h == (h[31:24] == 8'h02), "vec");
      check(p.bvecp_h == (h[31:24] == 8'h03), "bvec pointer");
      check(p.fbvec_h == (h[31:24] == 8'h04), "fbvec");
      check(p.pointer_h == (h[31:24] >= 8'h01 && h[31:24] <= 8'h04), "pointer?");
      check(p.bvec_h == (h[31:24] == 8'h06), "bvec header");
      check(p.fwd_d == (d[31:24] == 8'h80), "fwd");
      check(p.c_m1 == (c == 24'hffffff), "eq?(C,-1)");
    end
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
