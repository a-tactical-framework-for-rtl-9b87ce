// tb_gc_slice: tests of the two data-path bit slices.
//
// For every command v0..v33 it drives random slice inputs and checks the
// memory address and write-data bits of an address slice (bits 0 and 5) and
// a tag slice (bits 24 and 31) against the per-command memory signal table
// of the collector (which register or unit feeds memory 1 and memory 2 in
// each command, '-' where the memory is idle). It also checks the register
// loads of the start command and of the memory reads.
module tb_gc_slice;
  import gc_pkg::*;

  // Per-command sources, one character per command v0..v33.
  // Address: U H A 1 (Z1) 2 (Z2). Data: d cell(H,D), f cell(fwd,A), a cell(H,A), D.
  localparam string M1A = "----UH----UHA-U-A-2U-A1AH-211UH-21";
  localparam string M2A = "---U--H--U-AHU-A--U2A-A1-H12U1-H12";
  localparam string M1D = "----------dfD-a-D--a-D-Df--D-af--D";
  localparam string M2D = "---------d-Dfa-D--a-D-D--fD-a--fD-";

  logic clk = 1'b0;
  always #5 clk = !clk;

  cmd_t cmd = '0;
  logic m1_q, m2_q, z1, z2, c, z3, root;
  logic h0, d0, u0, a0, m1a0, m1d0, m2a0, m2d0, z1a0, z1b0, z2a0, z2b0, cd0, z3b0;
  logic h5, d5, u5, a5, m1a5, m1d5, m2a5, m2d5, z1a5, z1b5, z2a5, z2b5, cd5, z3b5;
  logic ht24, dt24, m1dt24, m2dt24, ht31, dt31, m1dt31, m2dt31;

  gc_slice_addr #(.BIT(0)) s0 (.clk, .cmd, .m1_q, .m2_q, .z1, .z2, .c, .z3, .root,
    .h(h0), .d(d0), .u(u0), .a(a0), .m1a(m1a0), .m1d(m1d0), .m2a(m2a0), .m2d(m2d0),
    .z1a(z1a0), .z1b(z1b0), .z2a(z2a0), .z2b(z2b0), .cd(cd0), .z3b(z3b0));
  gc_slice_addr #(.BIT(5)) s5 (.clk, .cmd, .m1_q, .m2_q, .z1, .z2, .c, .z3, .root,
    .h(h5), .d(d5), .u(u5), .a(a5), .m1a(m1a5), .m1d(m1d5), .m2a(m2a5), .m2d(m2d5),
    .z1a(z1a5), .z1b(z1b5), .z2a(z2a5), .z2b(z2b5), .cd(cd5), .z3b(z3b5));
  gc_slice_tag #(.BIT(24)) t24 (.clk, .cmd, .m1_q, .m2_q, .root, .h(ht24), .d(dt24), .m1d(m1dt24), .m2d(m2dt24));
  gc_slice_tag #(.BIT(31)) t31 (.clk, .cmd, .m1_q, .m2_q, .root, .h(ht31), .d(dt31), .m1d(m1dt31), .m2d(m2dt31));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic exp_addr(byte code, logic u, logic h, logic a, logic z1_, logic z2_);
    case (code)
      "U": return u; "H": return h; "A": return a; "1": return z1_; "2": return z2_;
      default: return 1'b0;
    endcase
  endfunction
  // address-slice data bit
  function automatic logic exp_dlo(byte code, logic d, logic a);
    case (code) "d": return d; "f": return a; "a": return a; "D": return d; default: return 1'b0; endcase
  endfunction
  // tag-slice data bit; fwd tag is 8'h80
  function automatic logic exp_dhi(byte code, logic h, logic d, int bitn);
    case (code)
      "d": return h; "f": return (bitn == 31); "a": return h; "D": return d;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    logic hb;
    for (int rep = 0; rep < 8; rep++) begin
      for (int v = 0; v < NCMD; v++) begin
        @(negedge clk);
        // load random register contents through the start command and reads
        cmd = 6'd0; root = $urandom; @(negedge clk);
        cmd = 6'd5; m1_q = $urandom; @(negedge clk);      // D := memory 1
        cmd = 6'd8; z1 = $urandom; @(negedge clk);        // U := Z1
        cmd = 6'd18; z1 = $urandom; m1_q = $urandom; @(negedge clk); // A := Z1
        cmd = cmd_t'(v);
        {m1_q, m2_q, z1, z2, c, z3} = 6'($urandom);
        #1;
        if (M1A[v] != "-") begin
          check(m1a0 == exp_addr(M1A[v], u0, h0, a0, z1, z2), $sformatf("v%0d M1.A bit0", v));
          check(m1a5 == exp_addr(M1A[v], u5, h5, a5, z1, z2), $sformatf("v%0d M1.A bit5", v));
        end
        if (M2A[v] != "-") begin
          check(m2a0 == exp_addr(M2A[v], u0, h0, a0, z1, z2), $sformatf("v%0d M2.A bit0", v));
          check(m2a5 == exp_addr(M2A[v], u5, h5, a5, z1, z2), $sformatf("v%0d M2.A bit5", v));
        end
        if (M1D[v] != "-") begin
          check(m1d0 == exp_dlo(M1D[v], d0, a0), $sformatf("v%0d M1.D bit0", v));
          check(m1dt24 == exp_dhi(M1D[v], ht24, dt24, 24), $sformatf("v%0d M1.D bit24", v));
          check(m1dt31 == exp_dhi(M1D[v], ht31, dt31, 31), $sformatf("v%0d M1.D bit31", v));
        end
        if (M2D[v] != "-") begin
          check(m2d5 == exp_dlo(M2D[v], d5, a5), $sformatf("v%0d M2.D bit5", v));
          check(m2dt24 == exp_dhi(M2D[v], ht24, dt24, 24), $sformatf("v%0d M2.D bit24", v));
          check(m2dt31 == exp_dhi(M2D[v], ht31, dt31, 31), $sformatf("v%0d M2.D bit31", v));
        end
      end
    end
    // start command: H := root, U := 0, A := 1 (only bit 0 is one)
    @(negedge clk); cmd = 6'd0; root = 1'b1; @(negedge clk);
    check(h0 && h5 && ht24 && ht31 && !u0 && !u5 && a0 && !a5, "start command loads");
    // driver read with W=1 loads H from memory 2, W=0 from memory 1
    cmd = 6'd3; m1_q = 1'b0; m2_q = 1'b1; @(negedge clk);
    check(h0 && ht31, "v3: H := memory 2");
    cmd = 6'd4; @(negedge clk);
    check(!h0 && !ht31, "v4: H := memory 1");
    // bvec start: D := cell(D, btow(ptr D)) keeps the tag bits
    cmd = 6'd6; m2_q = 1'b1; @(negedge clk);
    hb = dt31;
    cmd = 6'd15; z3 = 1'b0; @(negedge clk);
    check(dt31 == hb && d0 == 1'b0, "v15: D := cell(D, Z3)");
    cmd = 6'd1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
