// tb_gc_collector: end-to-end test of the garbage collector.
//
// Six collections on a collector with 4096-word memories. Even-numbered runs
// load a fresh random heap through the host port into the memory that holds
// the live heap; odd-numbered runs collect the previous result again, so both
// values of W (both copy directions) are exercised. After each run the
// to-space is read back and compared word by word with the reference Cheney
// model. The final allocation pointer, the W flip and the clock count are
// checked too. Every one of the 34 commands must occur at least once.
module tb_gc_collector;
  import gc_pkg::*;
  import tb_gc_ref_pkg::*;

  localparam int MEM_AW = 12;

  logic  clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  word_t root = '0;
  logic  r, w;
  logic  host_en = 1'b0, host_mem = 1'b0, host_we = 1'b0;
  addr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;

  int checks = 0, failures = 0;
  int unsigned seen [NCMD];

  gc_collector #(.MEM_AW(MEM_AW)) dut (.*);

  always #5 clk = !clk;

  always @(posedge clk) if (rst_n && dut.cmd < NCMD) seen[dut.cmd]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(logic m, int unsigned adr, word_t val);
    @(negedge clk);
    host_en = 1'b1; host_mem = m; host_we = 1'b1; host_addr = addr_t'(adr); host_wdata = val;
    @(posedge clk);
    #1 host_en = 1'b0; host_we = 1'b0;
  endtask

  task automatic host_read(logic m, int unsigned adr, output word_t val);
    @(negedge clk);
    host_en = 1'b1; host_mem = m; host_we = 1'b0; host_addr = addr_t'(adr);
    #1 val = host_rdata;
    host_en = 1'b0;
  endtask

  task automatic run_gc(word_t rt, output int unsigned cycles);
    @(negedge clk);
    root = rt; go = 1'b1;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    go = 1'b0;
    while (!r) begin
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
    check(r == 1'b1 && w == 1'b0, "ready and W=0 after reset");
    for (int t = 0; t < 6; t++) begin
      if (t % 2 == 0) begin
        gen_heap(40 + 10 * t, rt, used);
        for (int unsigned i = 0; i < used; i++) host_write(!w, i, fr[i]);
      end else begin
        flip();
        rt = fr[0];
      end
      collect(rt);
      w_before = w;
      run_gc(rt, cycles);
      check(w == !w_before, $sformatf("run %0d: W flips", t));
      check(dut.a == addr_t'(ref_a), $sformatf("run %0d: A=%0d expected %0d", t, dut.a, ref_a));
      check(cycles == ref_cycles, $sformatf("run %0d: %0d clocks, expected %0d", t, cycles, ref_cycles));
      for (int unsigned i = 0; i < ref_a; i++) begin
        host_read(!w, i, val);   // to-space is now the live memory
        check(val == to[i], $sformatf("run %0d: to[%0d]=%h expected %h", t, i, val, to[i]));
      end
      $display("run %0d: %0d words copied in %0d clocks (pairs %0d vecs %0d bvecs %0d fixed %0d fwd %0d)",
               t, ref_a, cycles, n_pair, n_vec, n_bvec, n_fbvec, n_fwd);
    end
    for (int i = 0; i < NCMD; i++) check(seen[i] > 0, $sformatf("command v%0d never occurred", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
