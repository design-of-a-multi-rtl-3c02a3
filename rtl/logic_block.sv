// logic_block: one FPGA logic element - a 6-input LUT, carry logic with an
// XOR for addition, and a register that can run from the global clock or
// from a clock routed through the local interconnect.
//
// The LUT output Q indexes the 64-bit truth table with a[5:0]. As in the
// published logic block, Q also acts as the carry-propagate term:
// cout = Q ? cin : ax, and the sum bit is Q ^ cin. A 2-bit field picks what
// the register sees (Q, sum, ax or cout); one bit picks whether output d is
// that value directly or the register. One further bit picks the clock:
// g_clk (global tree, synchronous use) or l_clk (local clock, normally the
// pulse generator output in asynchronous use, where every request
// transition becomes one rising edge). The register loads on that rising
// edge when ce is high.
//
// The exact inputs of the two muxes, the Xilinx-style carry form and the
// asynchronous global reset grst_n are choices of this implementation; the
// published figure shows the blocks but not every mux input.
//
// cfg layout: [63:0] truth table (bit i = value for a == i), [65:64]
// register-input select, [66] 1 = registered output, [67] 1 = l_clk.
`timescale 1ns/1ps
module logic_block
  import fpga_pkg::*;
(
  input  logic [LB_CFG-1:0] cfg,
  input  logic [LUT_K-1:0]  a,
  input  logic              ax,
  input  logic              cin,
  input  logic              g_clk,
  input  logic              l_clk,
  input  logic              ce,
  input  logic              grst_n,
  output logic              q,
  output logic              cout,
  output logic              d
);
  logic [LUT_BITS-1:0] lut;
  dsel_e dsel;
  logic  osel, csel;
  logic  sum, dmux, clk_sel, ff;

  assign lut  = cfg[LUT_BITS-1:0];
  assign dsel = dsel_e'(cfg[LB_DSEL_LSB +: 2]);
  assign osel = cfg[LB_OSEL];
  assign csel = cfg[LB_CSEL];

  assign q    = lut[a];
  assign sum  = q ^ cin;
  assign cout = q ? cin : ax;

  always_comb begin
    unique case (dsel)
      DSEL_Q:    dmux = q;
      DSEL_SUM:  dmux = sum;
      DSEL_AX:   dmux = ax;
      DSEL_COUT: dmux = cout;
    endcase
  end

  // clock select: global tree or local (pulse) clock
  assign clk_sel = csel ? l_clk : g_clk;

  always_ff @(posedge clk_sel or negedge grst_n) begin
    if (!grst_n)  ff <= 1'b0;
    else if (ce)  ff <= dmux;
  end

  assign d = osel ? ff : dmux;
endmodule
