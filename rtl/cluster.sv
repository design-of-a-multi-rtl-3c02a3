// cluster: the repeated tile of the fabric - five CLBs, one controller
// block and one pulse generator, all on one global interconnect, plus links
// to the four neighbouring clusters.
//
// Global interconnect sources (see fpga_pkg): CLB k output j at k*7+j, the
// controller's la, rr and clk, the pulse generator output, then
// link_in[side][bit]. Sinks: CLB k global input j at k*24+j, controller lr
// and ra, pulse generator input, then link_out[side][bit]. The controller
// block is additionally wired into the local interconnect of CLB 1, so a
// handshake signal can reach that CLB's clock, enable or bypass inputs
// without a trip through the global switch; in all other CLBs those three
// local sources are 0.
//
// A typical asynchronous stage: lr comes in on a link, the controller's clk
// goes to the pulse generator, the pulse reaches a CLB as l_clk, and rr/la
// leave on links. For synchronous logic the CLBs use g_clk and ignore the
// controller. Because the routing is programmable, the netlist has
// combinational paths from CLB outputs back to CLB inputs; a valid
// configuration breaks every such loop with a register.
//
// cfg layout: CLB k at k*810, controller PDE tap at 4050, global
// interconnect crosspoints at 4053.
`timescale 1ns/1ps
module cluster
  import fpga_pkg::*;
(
  input  logic [CLUSTER_CFG-1:0]          cfg,
  input  logic                            g_clk,
  input  logic                            grst_n,
  input  logic [N_SIDES-1:0][LINK_W-1:0]  link_in,
  output logic [N_SIDES-1:0][LINK_W-1:0]  link_out
);
  logic [GI_SRC-1:0]  src;
  logic [GI_SINK-1:0] sink;
  logic [N_CLB-1:0][CLB_OUT-1:0] clb_out;
  logic la, rr, cclk, pulse;

  for (genvar k = 0; k < N_CLB; k++) begin : g_clb
    logic [LI_CB-1:0] cb;
    assign cb = (k == CB_CLB) ? {cclk, rr, la} : '0;
    clb u_clb (
      .cfg(cfg[k*CLB_CFG +: CLB_CFG]), .glb(sink[GK_CLB + k*LI_GLB +: LI_GLB]),
      .cb, .g_clk, .grst_n, .out(clb_out[k])
    );
  end

  controller_block u_cb (
    .cfg(cfg[CL_CB +: CB_CFG]), .rst_n(grst_n),
    .lr(sink[GK_LR]), .la, .rr, .ra(sink[GK_RA]), .clk(cclk)
  );

  pulse_gen u_pg (.in(sink[GK_PG]), .pulse);

  assign src = {link_in, pulse, cclk, rr, la, clb_out};

  global_interconnect u_gi (.cfg(cfg[CL_GI +: GI_CFG]), .src, .sink);

  assign link_out = sink[GK_LINK +: N_SIDES*LINK_W];
endmodule
