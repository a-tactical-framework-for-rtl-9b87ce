// tactical_top: all designs of this collection, side by side.
//
// The designs do not interact; each has its own ports:
//   gc_*   the bit-sliced stop-and-copy garbage collector (gc_collector)
//   sp_*   the single pulser, as a selector system (single_pulser), as
//          registered PAL logic (sp_pal) and in its reduced form
//          (sp_reduced), all driven by sp_i
//   tg_*   the clear/toggle storage bit (toggle)
//   add_*  the BitSum ripple adder (adder)
//   fx_*   the factored two-output example with one shared adder
//   fa_*   the same example factored per output (ADDINC, DCRADD), on the
//          same fx_ inputs
// All sequential parts share clk and the active-low reset rst_n.
// Parameters keep the defaults of the submodules.
module tactical_top
  import gc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // garbage collector
  input  logic       gc_go,
  input  word_t      gc_root,
  output logic       gc_r,
  output logic       gc_w,
  input  logic       gc_host_en,
  input  logic       gc_host_mem,
  input  logic       gc_host_we,
  input  addr_t      gc_host_addr,
  input  word_t      gc_host_wdata,
  output word_t      gc_host_rdata,
  // single pulser
  input  logic       sp_i,
  output logic       sp_o,
  output logic       sp_pal_o,
  output logic       sp_red_o,
  // toggle
  input  logic       tg_c,
  input  logic       tg_t,
  output logic       tg_q,
  // adder
  input  logic [7:0] add_a,
  input  logic [7:0] add_b,
  input  logic       add_c0,
  output logic [8:0] add_s,
  // factored example
  input  logic       fx_p,
  input  logic [7:0] fx_a,
  input  logic [7:0] fx_b,
  input  logic [7:0] fx_c,
  input  logic [7:0] fx_d,
  input  logic [7:0] fx_e,
  input  logic [7:0] fx_f,
  output logic [7:0] fx_u,
  output logic [7:0] fx_x,
  output logic [7:0] fa_u,
  output logic [7:0] fa_x
);
  gc_collector u_gc (
    .clk, .rst_n, .go(gc_go), .root(gc_root), .r(gc_r), .w(gc_w),
    .host_en(gc_host_en), .host_mem(gc_host_mem), .host_we(gc_host_we),
    .host_addr(gc_host_addr), .host_wdata(gc_host_wdata), .host_rdata(gc_host_rdata)
  );

  single_pulser u_sp (.clk, .rst_n, .i(sp_i), .o(sp_o));
  sp_pal        u_sp_pal (.clk, .rst_n, .i(sp_i), .o(sp_pal_o));
  sp_reduced    u_sp_red (.clk, .rst_n, .i(sp_i), .o(sp_red_o));
  toggle        u_toggle (.clk, .c(tg_c), .t(tg_t), .q(tg_q));
  adder #(.N(8)) u_adder (.a(add_a), .b(add_b), .c0(add_c0), .s(add_s));
  factor_example #(.W(8)) u_fx (
    .p(fx_p), .a(fx_a), .b(fx_b), .c(fx_c), .d(fx_d), .e(fx_e), .f(fx_f), .u(fx_u), .x(fx_x));
  factor_alt u_factor_alt (
    .p(fx_p), .a(fx_a), .b(fx_b), .c(fx_c), .d(fx_d), .e(fx_e), .f(fx_f), .u(fa_u), .x(fa_x));
endmodule
