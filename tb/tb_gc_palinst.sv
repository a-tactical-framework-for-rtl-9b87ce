// tb_gc_palinst: test of the control registers and instruction decoding.
//
// For every command it checks the memory instructions (@, R, W) against the
// collector's per-command memory instruction table, and the ALU, counter
// and BYTETOWORD instructions against the operations each command needs.
// It checks the next-state register for every command, and the R and W
// registers on the commands that change them.
module tb_gc_palinst;
  import gc_pkg::*;
  // '.' = @ (nothing), R = read, W = write, per command v0..v33
  localparam string M1I = "....RR....WWW.W.W.RW.WRWW.RWRWW.RW";
  localparam string M2I = "...R..R..W.WWW.W..WRW.WR.WWRWR.WWR";
  // ALU1: . = C, a = addinc, i = inc, + = add, j = incadd
  localparam string Z1I = ".......aiii..ii..iiiii++jjjj++jjjj";
  // ALU2: . = C, i = inc, + = add
  localparam string Z2I = "..................iiii....++ii..++";
  // COUNT: . = @, L = load, D = decrement
  localparam string CI  = ".............LLLL.....DD..DDDD..DD";
  // BYTETOWORD: . = C, B = btow
  localparam string Z3I = ".......B.......BB.............BB..";
  // next state per command
  localparam state_e NS [NCMD] = '{
    ST_NEXT, ST_IDLE, ST_IDLE, ST_NEXT, ST_NEXT, ST_OBJ, ST_OBJ, ST_DRIVER, ST_DRIVER,
    ST_DRIVER, ST_DRIVER, ST_PAIR1, ST_PAIR1, ST_VEC, ST_VEC, ST_BVEC, ST_BVEC, ST_DRIVER,
    ST_PAIR2, ST_PAIR2, ST_DRIVER, ST_DRIVER, ST_VLOOP, ST_VLOOP, ST_DRIVER, ST_DRIVER,
    ST_VLOOP, ST_VLOOP, ST_BLOOP, ST_BLOOP, ST_DRIVER, ST_DRIVER, ST_BLOOP, ST_BLOOP};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  cmd_t cmd = 6'd1;
  state_e s; logic r, w;
  mem_op_e m1_i, m2_i; alu1_op_e z1_i; alu2_op_e z2_i; cnt_op_e c_i; btw_op_e z3_i;

  gc_palinst dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  function automatic mem_op_e mop(byte ch);
    return ch == "R" ? MEM_RD : ch == "W" ? MEM_WR : MEM_NOP;
  endfunction

  initial begin
    logic w0;
    repeat (2) @(negedge clk);
    check(s == ST_IDLE && r && !w, "reset values");
    rst_n = 1'b1;
    for (int v = 0; v < NCMD; v++) begin
      @(negedge clk);
      cmd = cmd_t'(v);
      #1;
      check(m1_i == mop(M1I[v]), $sformatf("v%0d M1.I", v));
      check(m2_i == mop(M2I[v]), $sformatf("v%0d M2.I", v));
      check(z1_i == (Z1I[v] == "a" ? ALU1_AI : Z1I[v] == "i" ? ALU1_I : Z1I[v] == "+" ? ALU1_A :
                     Z1I[v] == "j" ? ALU1_IA : ALU1_C), $sformatf("v%0d Z1.I", v));
      check(z2_i == (Z2I[v] == "i" ? ALU2_I : Z2I[v] == "+" ? ALU2_A : ALU2_C), $sformatf("v%0d Z2.I", v));
      check(c_i == (CI[v] == "L" ? CNT_LD : CI[v] == "D" ? CNT_DCR : CNT_NOP), $sformatf("v%0d C.I", v));
      check(z3_i == (Z3I[v] == "B" ? BTW_B : BTW_C), $sformatf("v%0d Z3.I", v));
      w0 = w;
      @(posedge clk); #1;
      check(s == NS[v], $sformatf("v%0d next state %s", v, s.name()));
      if (v == 0) check(!r, "v0 clears R");
      if (v == 1) check(r, "v1 sets R");
      if (v == 2) check(r && w == !w0, "v2 sets R and flips W");
      if (v > 2) check(w == w0, $sformatf("v%0d keeps W", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
