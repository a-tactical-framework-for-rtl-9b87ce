// tb_tactical_top: end-to-end test of the whole collection at its default
// sizes (full 24-bit collector memories, 8-bit adder and example).
//
// Garbage collector: four collections. Runs 0 and 2 load a new random heap
// through the host port into the live memory; runs 1 and 3 collect the
// previous result again, so both copy directions (W = 0 and W = 1) run. Each
// run is checked word by word against the reference Cheney model, with the
// final allocation pointer and the clock count. The mechanisms of the
// collector (forwarding of a shared object, pair, vector and byte-vector
// copies, skipping a fixed segment, skipping byte-vector data while scanning,
// and the semispace flip in both directions) are counted, and each must
// occur at least once. So must every one of the 34 commands.
// Single pulser: a 22-sample reference trace drives sp_i. sp_o and sp_red_o
// must follow the trace, and sp_pal_o the same trace one clock later.
// Toggle, adder and both forms of the factored example are checked against
// reference formulas. Their mechanisms
// are counted too (clear, invert, carry out, both selections).
module tb_tactical_top;
  import gc_pkg::*;
  import tb_gc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gc_go = 1'b0, gc_r, gc_w;
  word_t gc_root = '0;
  logic gc_host_en = 1'b0, gc_host_mem = 1'b0, gc_host_we = 1'b0;
  addr_t gc_host_addr = '0;
  word_t gc_host_wdata = '0, gc_host_rdata;
  logic sp_i = 1'b0, sp_o, sp_pal_o, sp_red_o;
  logic tg_c = 1'b1, tg_t = 1'b0, tg_q;
  logic [7:0] add_a = '0, add_b = '0; logic add_c0 = 1'b0; logic [8:0] add_s;
  logic fx_p = 1'b0; logic [7:0] fx_a = '0, fx_b = '0, fx_c = '0, fx_d = '0, fx_e = '0, fx_f = '0, fx_u, fx_x, fa_u, fa_x;

  tactical_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int unsigned seen [NCMD];
  int unsigned m_fwd = 0, m_pair = 0, m_vec = 0, m_bvec = 0, m_fixed = 0, m_skip = 0;
  int unsigned m_flip_to1 = 0, m_flip_to0 = 0;
  int unsigned m_pulse = 0, m_pal_pulse = 0, m_clear = 0, m_invert = 0, m_carry = 0, m_fx_p = 0, m_fx_np = 0;

  always @(posedge clk) if (rst_n && dut.u_gc.cmd < NCMD) seen[dut.u_gc.cmd]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  task automatic need(int unsigned n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", what); end
  endtask

  task automatic host_write(logic m, int unsigned adr, word_t val);
    @(negedge clk);
    gc_host_en = 1'b1; gc_host_mem = m; gc_host_we = 1'b1; gc_host_addr = addr_t'(adr); gc_host_wdata = val;
    @(posedge clk);
    #1 gc_host_en = 1'b0; gc_host_we = 1'b0;
  endtask
  task automatic host_read(logic m, int unsigned adr, output word_t val);
    @(negedge clk);
    gc_host_en = 1'b1; gc_host_mem = m; gc_host_we = 1'b0; gc_host_addr = addr_t'(adr);
    #1 val = gc_host_rdata;
    gc_host_en = 1'b0;
  endtask
  task automatic run_gc(word_t rt, output int unsigned cycles);
    @(negedge clk);
    gc_root = rt; gc_go = 1'b1;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    gc_go = 1'b0;
    while (!gc_r) begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
  endtask

  initial begin
    word_t rt, val;
    int unsigned used, cycles;
    logic w_before;
    for (int i = 0; i < NCMD; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // ---------------- garbage collector ----------------
    for (int t = 0; t < 4; t++) begin
      if (t % 2 == 0) begin
        gen_heap(60, rt, used);
        for (int unsigned i = 0; i < used; i++) host_write(!gc_w, i, fr[i]);
      end else begin
        flip();
        rt = fr[0];
      end
      collect(rt);
      w_before = gc_w;
      run_gc(rt, cycles);
      check(gc_w == !w_before, $sformatf("run %0d: W flips", t));
      if (gc_w) m_flip_to1++; else m_flip_to0++;
      check(cycles == ref_cycles, $sformatf("run %0d: %0d clocks, expected %0d", t, cycles, ref_cycles));
      for (int unsigned i = 0; i < ref_a; i++) begin
        host_read(!gc_w, i, val);
        check(val == to[i], $sformatf("run %0d: to[%0d]=%h expected %h", t, i, val, to[i]));
      end
      m_fwd += n_fwd; m_pair += n_pair; m_vec += n_vec; m_bvec += n_bvec; m_fixed += n_fbvec; m_skip += n_bhdr_skip;
      $display("collection %0d: %0d words in %0d clocks", t, ref_a, cycles);
    end
    need(m_fwd, "forwarded pointer"); need(m_pair, "pair copy"); need(m_vec, "vector copy");
    need(m_bvec, "byte-vector copy"); need(m_fixed, "fixed segment left in place");
    need(m_skip, "byte-vector data skipped while scanning");
    need(m_flip_to1, "flip to memory 1"); need(m_flip_to0, "flip to memory 2");
    for (int i = 0; i < NCMD; i++) need(seen[i], $sformatf("command v%0d", i));
    // ---------------- single pulser ----------------
    begin
      string ti = "LLLHHHHLLHLLHHLLHHHLLL";
      string to_s = "LLLHLLLLLHLLHLLLHLLLLL";
      logic prev_exp = 1'b0;
      for (int k = 0; k < ti.len(); k++) begin
        @(negedge clk);
        sp_i = (ti[k] == "H");
        #1;
        check(sp_o == (to_s[k] == "H"), $sformatf("pulser trace %0d", k));
        check(sp_red_o == (to_s[k] == "H"), $sformatf("reduced pulser trace %0d", k));
        check(sp_pal_o == prev_exp, $sformatf("PAL pulser trace %0d", k));
        if (sp_o) m_pulse++;
        if (sp_pal_o) m_pal_pulse++;
        prev_exp = (to_s[k] == "H");
      end
    end
    need(m_pulse, "single pulse"); need(m_pal_pulse, "PAL single pulse");
    // ---------------- toggle ----------------
    begin
      logic model;
      @(negedge clk); tg_c = 1'b1; @(posedge clk); model = 1'b0;
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        check(tg_q == model, "toggle");
        tg_c = ($urandom_range(4) == 0); tg_t = $urandom;
        if (tg_c) m_clear++; else if (tg_t) m_invert++;
        @(posedge clk);
        model = tg_c ? 1'b0 : (tg_t ? !model : model);
      end
    end
    need(m_clear, "toggle clear"); need(m_invert, "toggle invert");
    // ---------------- adder and factored example ----------------
    for (int k = 0; k < 500; k++) begin
      add_a = $urandom; add_b = $urandom; add_c0 = $urandom;
      fx_p = $urandom; fx_a = $urandom; fx_b = $urandom; fx_c = $urandom;
      fx_d = $urandom; fx_e = $urandom; fx_f = $urandom;
      #1;
      check(add_s == 9'(add_a) + 9'(add_b) + 9'(add_c0), "adder");
      if (add_s[8]) m_carry++;
      check(fx_u == (fx_p ? 8'(fx_a + fx_b) : 8'(fx_c + 1)), "example U");
      check(fx_x == (fx_p ? 8'(fx_d - 1) : 8'(fx_e + fx_f)), "example X");
      check(fa_u == (fx_p ? 8'(fx_a + fx_b) : 8'(fx_c + 1)), "per-output example U");
      check(fa_x == (fx_p ? 8'(fx_d - 1) : 8'(fx_e + fx_f)), "per-output example X");
      if (fx_p) m_fx_p++; else m_fx_np++;
    end
    need(m_carry, "adder carry out"); need(m_fx_p, "example p true"); need(m_fx_np, "example p false");
    $display("mechanisms: fwd %0d pair %0d vec %0d bvec %0d fixed %0d skip %0d flips %0d/%0d pulses %0d/%0d",
             m_fwd, m_pair, m_vec, m_bvec, m_fixed, m_skip, m_flip_to1, m_flip_to0, m_pulse, m_pal_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
