// gc_slice_addr: one address-field bit slice of the collector's data path
// (the PALa slice, bits 0 to 23).
//
// The original collector was built as a bit slice: every register and every
// address or data selection of the factored description was projected onto
// one bit, and 24 copies of the same programmable part held the 24 address
// bits. This module is one such slice. It holds bit BIT of registers H, D
// (their ptr fields), U and A, and produces bit BIT of the address and data
// inputs of both memories, both ALUs, the counter and BYTETOWORD. It decodes
// the broadcast command CMD itself (gc_pkg::gc_decode), as each PAL did.
//
// Slices differ only in constants: on the start command A is loaded with 1,
// so only slice 0 loads a one. The root input (H's value at start) is this
// design's addition, see gc_collector.
//
// Timing: h, d, u, a change at the rising clock edge; all other outputs are
// combinational in CMD and the slice inputs.
module gc_slice_addr
  import gc_pkg::*;
#(
  parameter int unsigned BIT = 0
) (
  input  logic clk,
  input  cmd_t cmd,
  input  logic m1_q,   // memory 1 read data bit
  input  logic m2_q,   // memory 2 read data bit
  input  logic z1,     // ALU1 result bit
  input  logic z2,     // ALU2 result bit
  input  logic c,      // counter bit
  input  logic z3,     // BYTETOWORD result bit
  input  logic root,   // root word bit
  output logic h,
  output logic d,
  output logic u,
  output logic a,
  output logic m1a,
  output logic m1d,
  output logic m2a,
  output logic m2d,
  output logic z1a,
  output logic z1b,
  output logic z2a,
  output logic z2b,
  output logic cd,
  output logic z3b
);
  ctl_t ctl;
  assign ctl = gc_decode(cmd);

  function automatic logic sel_addr(ma_src_e s, logic u_, logic h_, logic a_, logic z1_, logic z2_);
    unique case (s)
      MA_U:    return u_;
      MA_H:    return h_;
      MA_A:    return a_;
      MA_Z1:   return z1_;
      MA_Z2:   return z2_;
      default: return 1'b0;
    endcase
  endfunction

  // address-field bit of cell(...) and D
  function automatic logic sel_data(md_src_e s, logic d_, logic a_);
    unique case (s)
      MD_CELL_HD:   return d_;
      MD_CELL_FWDA: return a_;
      MD_CELL_HA:   return a_;
      MD_D:         return d_;
      default:      return 1'b0;
    endcase
  endfunction

  always_comb begin
    m1a = sel_addr(ctl.m1a, u, h, a, z1, z2);
    m2a = sel_addr(ctl.m2a, u, h, a, z1, z2);
    m1d = sel_data(ctl.m1d, d, a);
    m2d = sel_data(ctl.m2d, d, a);
    unique case (ctl.z1a)
      Z1A_U:    z1a = u;
      Z1A_A:    z1a = a;
      Z1A_PTRH: z1a = h;
      Z1A_C:    z1a = c;
      default:  z1a = 1'b0;
    endcase
    unique case (ctl.z1b)
      Z1B_Z3:   z1b = z3;
      Z1B_C:    z1b = c;
      Z1B_PTRD: z1b = d;
      Z1B_A:    z1b = a;
      default:  z1b = 1'b0;
    endcase
    unique case (ctl.z2a)
      Z2A_PTRH: z2a = h;
      Z2A_U:    z2a = u;
      default:  z2a = 1'b0;
    endcase
    z2b = ctl.z2b_c ? c : 1'b0;
    unique case (ctl.z3b)
      Z3B_PTRH: z3b = h;
      Z3B_PTRD: z3b = d;
      default:  z3b = 1'b0;
    endcase
    unique case (ctl.cd)
      CD_PTRD: cd = d;
      CD_Z3:   cd = z3;
      default: cd = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    unique case (ctl.h)
      H_ROOT:  h <= root;
      H_M1:    h <= m1_q;
      H_M2:    h <= m2_q;
      default: h <= h;
    endcase
    unique case (ctl.d)
      D_M1:      d <= m1_q;
      D_M2:      d <= m2_q;
      D_CELL_Z3: d <= z3;
      default:   d <= d;
    endcase
    unique case (ctl.u)
      U_ZERO:  u <= 1'b0;
      U_Z1:    u <= z1;
      U_Z2:    u <= z2;
      default: u <= u;
    endcase
    unique case (ctl.a)
      A_ONE:   a <= (BIT == 0);
      A_Z1:    a <= z1;
      default: a <= a;
    endcase
  end
endmodule
