// slice: two logic blocks joined as in the published slice. The lower
// block (B inputs) takes the slice carry-in, its carry-out ripples into the
// upper block (A inputs), whose carry-out leaves the slice. Both blocks
// share the global clock, local clock, clock enable and reset. The F7 mux
// merges the two LUT outputs into a 7-input function: f7 = ax ? Q_A : Q_B.
// The figure does not print the F7 select; using ax for it is a choice of
// this implementation (bx stays the lower block's bypass/carry input).
// Purely combinational apart from the two block registers.
//
// cfg layout: [67:0] lower block B, [135:68] upper block A.
`timescale 1ns/1ps
module slice
  import fpga_pkg::*;
(
  input  logic [SLICE_CFG-1:0] cfg,
  input  logic [LUT_K-1:0]     a_in,
  input  logic                 ax,
  input  logic [LUT_K-1:0]     b_in,
  input  logic                 bx,
  input  logic                 cin,
  input  logic                 g_clk,
  input  logic                 l_clk,
  input  logic                 ce,
  input  logic                 grst_n,
  output logic                 cout,
  output logic                 da,
  output logic                 db,
  output logic                 f7
);
  logic qa, qb, carry;

  logic_block u_lb_b (
    .cfg(cfg[SLICE_LB_B +: LB_CFG]), .a(b_in), .ax(bx), .cin(cin),
    .g_clk, .l_clk, .ce, .grst_n, .q(qb), .cout(carry), .d(db)
  );

  logic_block u_lb_a (
    .cfg(cfg[SLICE_LB_A +: LB_CFG]), .a(a_in), .ax(ax), .cin(carry),
    .g_clk, .l_clk, .ce, .grst_n, .q(qa), .cout(cout), .d(da)
  );

  assign f7 = ax ? qa : qb;
endmodule
