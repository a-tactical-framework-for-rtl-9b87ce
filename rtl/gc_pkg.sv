// gc_pkg: types, constants and the command decoder of the stop-and-copy
// garbage collector.
//
// The collector is a register-transfer machine whose control is a selector
// tree (gc_palsel) that reduces the control state and twelve status
// predicates to one of 34 command numbers, v0..v33. That number, CMD, is
// broadcast to every other block. Each block decodes CMD for itself, exactly
// as each PAL of the original bit-slice prototype held its own slice of the
// decoding. gc_decode() below is that decoding, shared as one function so
// that all blocks agree.
//
// Word layout: a CONTENT word is 32 bits, of which bits [23:0] are the
// ADDRESS field (ptr) and bits [31:24] the tag. The 24/32-bit split follows
// the original design. The tag values themselves are this design's own
// choice.
//
// Heap objects (tag of the word that points to them):
//   TAG_PAIR  : two words at ptr, ptr+1
//   TAG_VEC   : header word (TAG_VHDR, ptr = L) followed by L words
//   TAG_BVEC  : header word (TAG_BHDR, ptr = byte count n) followed by
//               ceil(n/4) words of raw data, which are not scanned
//   TAG_FBVEC : a non-relocatable segment; the pointer is left unchanged
// Any other tag is immediate data. A from-space object that has been copied
// has its first word replaced by a TAG_FWD word holding its new address.
//
// Command table. The two entries of each pair differ only in W. W = 1 means
// memory 1 holds the live heap, so memory 2 is the to-space ("to") and
// memory 1 the from-space ("fr"). W = 0 swaps the roles.
//   v0      idle, GO     : H:=root, U:=0, A:=1, R:=0, -> next
//   v1      idle, !GO    : R:=1
//   v2      driver, U==A : R:=1, W:=~W, -> idle
//   v3/v4   driver       : H:=to[U], -> next
//   v5/v6   next, ptr?(H): D:=fr[ptr H], -> obj
//   v7      next, bvec?H : U:=U+btow(ptr H)+1, -> driver
//   v8      next         : U:=U+1, -> driver
//   v9/v10  obj, fwd     : to[U]:=cell(H,D), U:=U+1, -> driver
//   v11/v12 obj, pair    : to[A]:=D, fr[ptr H]:=cell(fwd,A), -> pair1
//   v13/v14 obj, vec     : to[U]:=cell(H,A), C:=ptr D, U:=U+1, -> vec
//   v15/v16 obj, bvec    : to[A]:=D, D:=cell(D,btow(ptr D)), C:=btow(ptr D), -> bvec
//   v17     obj, fbvec   : U:=U+1, -> driver
//   v18/v19 pair1        : to[U]:=cell(H,A), D:=fr[ptr H+1], A:=A+1, -> pair2
//   v20/v21 pair2        : to[A]:=D, U:=U+1, A:=A+1, -> driver
//   v22/v23 vec          : to[A]:=D, D:=fr[ptr H+C], C:=C-1, -> vloop
//   v24/v25 vloop, C==-1 : fr[ptr H]:=cell(fwd,A), A:=A+ptr D+1, -> driver
//   v26/v27 vloop        : to[C+A+1]:=D, D:=fr[ptr H+C], C:=C-1
//   v28/v29 bvec         : to[U]:=cell(H,A), D:=fr[ptr H+ptr D], C:=C-1, U:=U+1, -> bloop
//   v30/v31 bloop, C==-1 : fr[ptr H]:=cell(fwd,A), A:=A+btow(ptr D)+1, -> driver
//   v32/v33 bloop        : as v26/v27
// The table follows the specification of the original collector, with W added
// as a selection predicate on every memory operation. The memory instruction
// and address columns agree with the original's factored memory signals.
package gc_pkg;

  localparam int ADDR_W = 24;
  localparam int WORD_W = 32;
  localparam int TAG_W  = WORD_W - ADDR_W;
  localparam int NCMD   = 34;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [5:0]        cmd_t;

  localparam tag_t TAG_IMM   = 8'h00;
  localparam tag_t TAG_PAIR  = 8'h01;
  localparam tag_t TAG_VEC   = 8'h02;
  localparam tag_t TAG_BVEC  = 8'h03;
  localparam tag_t TAG_FBVEC = 8'h04;
  localparam tag_t TAG_VHDR  = 8'h05;
  localparam tag_t TAG_BHDR  = 8'h06;
  // Bits 27:24 of the forwarding tag are equal, so the four identical
  // slices that hold those bits need no per-bit constant.
  localparam tag_t TAG_FWD   = 8'h80;

  // Control states: one per function of the specification.
  typedef enum logic [3:0] {
    ST_IDLE, ST_DRIVER, ST_NEXT, ST_OBJ, ST_PAIR1, ST_PAIR2,
    ST_VEC, ST_VLOOP, ST_BVEC, ST_BLOOP
  } state_e;

  // Component instructions.
  typedef enum logic [1:0] {MEM_NOP, MEM_RD, MEM_WR} mem_op_e;           // @, R, W
  typedef enum logic [2:0] {ALU1_C, ALU1_AI, ALU1_I, ALU1_A, ALU1_IA} alu1_op_e;
  typedef enum logic [1:0] {ALU2_C, ALU2_I, ALU2_A} alu2_op_e;
  typedef enum logic [1:0] {CNT_NOP, CNT_LD, CNT_DCR} cnt_op_e;        // @, L, D
  typedef enum logic {BTW_C, BTW_B} btw_op_e;

  // STATUS: the predicate group P of the selector.
  typedef struct packed {
    state_e s;
    logic   go;
    logic   u_eq_a;
    logic   w;
    logic   pointer_h;   // pointer?(H)
    logic   bvec_h;      // bvec?(H): H is a byte-vector header
    logic   fwd_d;       // eq?(fwd, tag(D))
    logic   pair_h;      // eq?(pair, tag(H))
    logic   vec_h;       // eq?(vec, tag(H))
    logic   bvecp_h;     // eq?(bvec, tag(H))
    logic   fbvec_h;     // eq?(fbvec, tag(H))
    logic   c_m1;        // eq?(C, -1)
  } status_t;

  // Register and selection sources used by the bit slices.
  typedef enum logic [1:0] {H_HOLD, H_ROOT, H_M1, H_M2} h_src_e;
  typedef enum logic [1:0] {D_HOLD, D_M1, D_M2, D_CELL_Z3} d_src_e;     // D_CELL_Z3 = cell(D, Z3)
  typedef enum logic [1:0] {U_HOLD, U_ZERO, U_Z1, U_Z2} u_src_e;
  typedef enum logic [1:0] {A_HOLD, A_ONE, A_Z1} a_src_e;
  typedef enum logic [2:0] {MA_X, MA_U, MA_H, MA_A, MA_Z1, MA_Z2} ma_src_e;
  typedef enum logic [2:0] {MD_X, MD_CELL_HD, MD_CELL_FWDA, MD_CELL_HA, MD_D} md_src_e;
  typedef enum logic [2:0] {Z1A_X, Z1A_U, Z1A_A, Z1A_PTRH, Z1A_C} z1a_src_e;
  typedef enum logic [2:0] {Z1B_X, Z1B_Z3, Z1B_C, Z1B_PTRD, Z1B_A} z1b_src_e;
  typedef enum logic [1:0] {Z2A_X, Z2A_PTRH, Z2A_U} z2a_src_e;
  typedef enum logic [1:0] {Z3B_X, Z3B_PTRH, Z3B_PTRD} z3b_src_e;
  typedef enum logic [1:0] {CD_X, CD_PTRD, CD_Z3} cd_src_e;

  typedef struct packed {
    // control part (PALinst)
    state_e   s_next;
    logic     r_set;      // R := 1
    logic     r_clr;      // R := 0
    logic     w_flip;     // W := ~W
    mem_op_e  m1_i;
    mem_op_e  m2_i;
    alu1_op_e z1_i;
    alu2_op_e z2_i;
    cnt_op_e  c_i;
    btw_op_e  z3_i;
    // data part (bit slices)
    h_src_e   h;
    d_src_e   d;
    u_src_e   u;
    a_src_e   a;
    ma_src_e  m1a;
    md_src_e  m1d;
    ma_src_e  m2a;
    md_src_e  m2d;
    z1a_src_e z1a;
    z1b_src_e z1b;
    z2a_src_e z2a;
    logic     z2b_c;      // Z2.B = C
    z3b_src_e z3b;
    cd_src_e  cd;
  } ctl_t;

  function automatic ctl_t ctl_default(state_e s);
    ctl_t c;
    c = '0;
    c.s_next = s;
    return c;
  endfunction

  // Memory access helper: "to" is memory 2 when w is 1, memory 1 otherwise.
  function automatic ctl_t to_access(ctl_t c, logic w, mem_op_e op, ma_src_e a, md_src_e d);
    if (w) begin c.m2_i = op; c.m2a = a; c.m2d = d; end
    else   begin c.m1_i = op; c.m1a = a; c.m1d = d; end
    return c;
  endfunction

  function automatic ctl_t fr_access(ctl_t c, logic w, mem_op_e op, ma_src_e a, md_src_e d);
    return to_access(c, !w, op, a, d);
  endfunction

  // Decode a command number into every block's controls.
  function automatic ctl_t gc_decode(cmd_t cmd);
    ctl_t c;
    logic w;
    c = ctl_default(ST_IDLE);
    // The first member of each W pair is the W = 1 case: odd numbers up to
    // v16 (v3, v5, ...), even numbers from v18 on (v17 has no pair).
    w = (cmd <= 6'd17) ? cmd[0] : !cmd[0];
    unique case (cmd)
      6'd0: begin
        c.s_next = ST_NEXT; c.r_clr = 1'b1;
        c.h = H_ROOT; c.u = U_ZERO; c.a = A_ONE;
      end
      6'd1: begin c.s_next = ST_IDLE; c.r_set = 1'b1; end
      6'd2: begin c.s_next = ST_IDLE; c.r_set = 1'b1; c.w_flip = 1'b1; end
      6'd3, 6'd4: begin
        c.s_next = ST_NEXT;
        c = to_access(c, w, MEM_RD, MA_U, MD_X);
        c.h = w ? H_M2 : H_M1;
      end
      6'd5, 6'd6: begin
        c.s_next = ST_OBJ;
        c = fr_access(c, w, MEM_RD, MA_H, MD_X);
        c.d = w ? D_M1 : D_M2;
      end
      6'd7: begin
        c.s_next = ST_DRIVER;
        c.z3_i = BTW_B; c.z3b = Z3B_PTRH;
        c.z1_i = ALU1_AI; c.z1a = Z1A_U; c.z1b = Z1B_Z3;
        c.u = U_Z1;
      end
      6'd8, 6'd17: begin
        c.s_next = ST_DRIVER;
        c.z1_i = ALU1_I; c.z1a = Z1A_U; c.u = U_Z1;
      end
      6'd9, 6'd10: begin
        c.s_next = ST_DRIVER;
        c = to_access(c, w, MEM_WR, MA_U, MD_CELL_HD);
        c.z1_i = ALU1_I; c.z1a = Z1A_U; c.u = U_Z1;
      end
      6'd11, 6'd12: begin
        c.s_next = ST_PAIR1;
        c = to_access(c, w, MEM_WR, MA_A, MD_D);
        c = fr_access(c, w, MEM_WR, MA_H, MD_CELL_FWDA);
      end
      6'd13, 6'd14: begin
        c.s_next = ST_VEC;
        c = to_access(c, w, MEM_WR, MA_U, MD_CELL_HA);
        c.c_i = CNT_LD; c.cd = CD_PTRD;
        c.z1_i = ALU1_I; c.z1a = Z1A_U; c.u = U_Z1;
      end
      6'd15, 6'd16: begin
        c.s_next = ST_BVEC;
        c = to_access(c, w, MEM_WR, MA_A, MD_D);
        c.z3_i = BTW_B; c.z3b = Z3B_PTRD;
        c.d = D_CELL_Z3;
        c.c_i = CNT_LD; c.cd = CD_Z3;
      end
      6'd18, 6'd19: begin
        c.s_next = ST_PAIR2;
        c = to_access(c, w, MEM_WR, MA_U, MD_CELL_HA);
        c = fr_access(c, w, MEM_RD, MA_Z2, MD_X);
        c.z2_i = ALU2_I; c.z2a = Z2A_PTRH;
        c.d = w ? D_M1 : D_M2;
        c.z1_i = ALU1_I; c.z1a = Z1A_A; c.a = A_Z1;
      end
      6'd20, 6'd21: begin
        c.s_next = ST_DRIVER;
        c = to_access(c, w, MEM_WR, MA_A, MD_D);
        c.z1_i = ALU1_I; c.z1a = Z1A_A; c.a = A_Z1;
        c.z2_i = ALU2_I; c.z2a = Z2A_U; c.u = U_Z2;
      end
      6'd22, 6'd23: begin
        c.s_next = ST_VLOOP;
        c = to_access(c, w, MEM_WR, MA_A, MD_D);
        c.z1_i = ALU1_A; c.z1a = Z1A_PTRH; c.z1b = Z1B_C;
        c = fr_access(c, w, MEM_RD, MA_Z1, MD_X);
        c.d = w ? D_M1 : D_M2;
        c.c_i = CNT_DCR;
      end
      6'd24, 6'd25, 6'd30, 6'd31: begin
        c.s_next = ST_DRIVER;
        c = fr_access(c, w, MEM_WR, MA_H, MD_CELL_FWDA);
        c.z1_i = ALU1_IA; c.z1a = Z1A_A; c.a = A_Z1;
        if (cmd >= 6'd30) begin
          c.z3_i = BTW_B; c.z3b = Z3B_PTRD; c.z1b = Z1B_Z3;
        end else begin
          c.z1b = Z1B_PTRD;
        end
      end
      6'd26, 6'd27, 6'd32, 6'd33: begin
        c.s_next = (cmd >= 6'd32) ? ST_BLOOP : ST_VLOOP;
        c.z1_i = ALU1_IA; c.z1a = Z1A_C; c.z1b = Z1B_A;
        c = to_access(c, w, MEM_WR, MA_Z1, MD_D);
        c.z2_i = ALU2_A; c.z2a = Z2A_PTRH; c.z2b_c = 1'b1;
        c = fr_access(c, w, MEM_RD, MA_Z2, MD_X);
        c.d = w ? D_M1 : D_M2;
        c.c_i = CNT_DCR;
      end
      6'd28, 6'd29: begin
        c.s_next = ST_BLOOP;
        c = to_access(c, w, MEM_WR, MA_U, MD_CELL_HA);
        c.z1_i = ALU1_A; c.z1a = Z1A_PTRH; c.z1b = Z1B_PTRD;
        c = fr_access(c, w, MEM_RD, MA_Z1, MD_X);
        c.d = w ? D_M1 : D_M2;
        c.c_i = CNT_DCR;
        c.z2_i = ALU2_I; c.z2a = Z2A_U; c.u = U_Z2;
      end
      default: c = ctl_default(ST_IDLE);
    endcase
    return c;
  endfunction

endpackage
