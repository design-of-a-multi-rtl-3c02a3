// clb: configuration logic block - two slices behind one local
// interconnect. Global inputs glb[23:0] reach the LUT pins through the
// triangular matrix; A/B pins feed slice 0, C/D pins slice 1. Carry runs
// from slice 0 into slice 1; the CLB carry-in, the bypass inputs, the
// local clock and the clock enable come from the interconnect's auxiliary
// wires. The slice outputs leave as out[6:0] = {cout, f7_1, Db1, Da1, f7_0,
// Db0, Da0} (out[0] = Da0) and are also fed back into the interconnect.
// cb carries the controller block's la, rr, clk where that block is
// attached (tie to 0 elsewhere). The slice-to-slice carry and the output
// ordering are choices of this implementation. Because slice outputs feed
// back into the auxiliary wires, lint tools report a combinational loop
// through the interconnect; it only closes if a configuration routes a
// combinational output back to its own inputs, which a valid
// configuration avoids.
//
// cfg layout: [135:0] slice 0, [271:136] slice 1, [809:272] interconnect.
`timescale 1ns/1ps
module clb
  import fpga_pkg::*;
(
  input  logic [CLB_CFG-1:0] cfg,
  input  logic [LI_GLB-1:0]  glb,
  input  logic [LI_CB-1:0]   cb,
  input  logic               g_clk,
  input  logic               grst_n,
  output logic [CLB_OUT-1:0] out
);
  logic [LI_PINS-1:0] pins;
  logic [LI_AUX-1:0]  aux;
  logic [LI_FB-1:0]   fb;
  logic c01, cout;
  logic da0, db0, f70, da1, db1, f71;

  local_interconnect u_li (
    .cfg(cfg[CLB_LI +: LI_CFG]), .glb, .fb, .cb, .pins, .aux
  );

  slice u_s0 (
    .cfg(cfg[CLB_S0 +: SLICE_CFG]),
    .a_in(pins[23:18]), .ax(aux[AUX_AX0]), .b_in(pins[17:12]), .bx(aux[AUX_BX0]),
    .cin(aux[AUX_CIN]), .g_clk, .l_clk(aux[AUX_LCLK]), .ce(aux[AUX_CE]), .grst_n,
    .cout(c01), .da(da0), .db(db0), .f7(f70)
  );

  slice u_s1 (
    .cfg(cfg[CLB_S1 +: SLICE_CFG]),
    .a_in(pins[11:6]), .ax(aux[AUX_AX1]), .b_in(pins[5:0]), .bx(aux[AUX_BX1]),
    .cin(c01), .g_clk, .l_clk(aux[AUX_LCLK]), .ce(aux[AUX_CE]), .grst_n,
    .cout(cout), .da(da1), .db(db1), .f7(f71)
  );

  assign fb  = {f71, db1, da1, f70, db0, da0};
  assign out = {cout, fb};
endmodule
