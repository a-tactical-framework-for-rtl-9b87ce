// gc_slice_tag: one tag bit slice of the collector's data path (the PALb
// slice for bits 24 to 27, PALc to PALf for bits 28 to 31).
//
// Holds bit BIT of registers H and D and produces bit BIT of the write data
// of both memories. Tag bits never take part in address arithmetic, so this
// slice has none of the address selections of gc_slice_addr. In cell(H, x)
// the tag comes from H. In cell(fwd, A) it is the forwarding-tag constant,
// the only way the slices differ. cell(D, btow(ptr D)) keeps D's tag, so D
// holds. The split into a 24-bit address slice and per-bit tag slices
// follows the original design. One parameterised module stands for the
// five tag parts.
//
// Timing: h and d change at the rising clock edge; m1d and m2d are
// combinational in CMD.
module gc_slice_tag
  import gc_pkg::*;
#(
  parameter int unsigned BIT = 24
) (
  input  logic clk,
  input  cmd_t cmd,
  input  logic m1_q,
  input  logic m2_q,
  input  logic root,
  output logic h,
  output logic d,
  output logic m1d,
  output logic m2d
);
  localparam word_t FWD_WORD = {TAG_FWD, {ADDR_W{1'b0}}};
  localparam logic  FWD_BIT  = FWD_WORD[BIT];

  ctl_t ctl;
  assign ctl = gc_decode(cmd);

  function automatic logic sel_data(md_src_e s, logic h_, logic d_);
    unique case (s)
      MD_CELL_HD:   return h_;
      MD_CELL_FWDA: return FWD_BIT;
      MD_CELL_HA:   return h_;
      MD_D:         return d_;
      default:      return 1'b0;
    endcase
  endfunction

  assign m1d = sel_data(ctl.m1d, h, d);
  assign m2d = sel_data(ctl.m2d, h, d);

  always_ff @(posedge clk) begin
    unique case (ctl.h)
      H_ROOT:  h <= root;
      H_M1:    h <= m1_q;
      H_M2:    h <= m2_q;
      default: h <= h;
    endcase
    unique case (ctl.d)
      D_M1:    d <= m1_q;
      D_M2:    d <= m2_q;
      default: d <= d;
    endcase
  end
endmodule
