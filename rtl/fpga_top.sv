// fpga_top: the multi-style, multi-frequency test fabric.
//
// Six clusters sit in a 2 x 3 grid; each is linked to its horizontal and
// vertical neighbours by LINK_W wires in each direction. The south links
// of the bottom-left and bottom-right clusters are the global IO:
// io_in[0]/io_out[0] on cluster (1,0), io_in[1]/io_out[1] on cluster
// (1,2). Unused edge links read 0. g_clk is the global clock tree to every
// logic block; a logic block may instead run from a local clock, which in
// asynchronous use is a pulse-generator output driven by a hard two-phase
// controller, so synchronous and asynchronous (and differently clocked)
// logic can share the fabric.
//
// Configuration: write all CFG_WORDS words of 32 bits through
// cfg_clk/cfg_we/cfg_addr/cfg_wdata; cluster i (row-major, i = row*3+col)
// uses bits [i*CLUSTER_CFG +: CLUSTER_CFG]. cfg_rst_n clears the whole
// configuration (all switches open) before it is written. grst_n clears every logic-block
// register and every controller. The link width and the IO placement
// details are this implementation's choices; the grid and the
// bottom-corner IO follow the published test fabric.
//
// The programmable routing gives the netlist combinational paths from
// outputs back to inputs; a valid configuration breaks each with a
// register, so loop warnings from lint tools are expected here.
`timescale 1ns/1ps
module fpga_top
  import fpga_pkg::*;
(
  input  logic                            g_clk,
  input  logic                            grst_n,
  input  logic                            cfg_clk,
  input  logic                            cfg_rst_n,
  input  logic                            cfg_we,
  input  logic [$clog2(CFG_WORDS)-1:0]    cfg_addr,
  input  logic [CFG_WORD_W-1:0]           cfg_wdata,
  input  logic [N_IO-1:0][LINK_W-1:0]     io_in,
  output logic [N_IO-1:0][LINK_W-1:0]     io_out
);
  logic [FABRIC_CFG-1:0] cfg;
  logic [N_CLUSTERS-1:0][N_SIDES-1:0][LINK_W-1:0] lin, lout;

  config_memory #(.N_BITS(FABRIC_CFG), .WORD_W(CFG_WORD_W)) u_cfg (
    .clk(cfg_clk), .rst_n(cfg_rst_n), .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .cfg
  );

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      localparam int I = r * N_COLS + c;

      if (r > 0)          begin : g_n  assign lin[I][SIDE_N] = lout[I-N_COLS][SIDE_S]; end
      else                begin : g_n0 assign lin[I][SIDE_N] = '0; end
      if (c < N_COLS - 1) begin : g_e  assign lin[I][SIDE_E] = lout[I+1][SIDE_W]; end
      else                begin : g_e0 assign lin[I][SIDE_E] = '0; end
      if (c > 0)          begin : g_w  assign lin[I][SIDE_W] = lout[I-1][SIDE_E]; end
      else                begin : g_w0 assign lin[I][SIDE_W] = '0; end
      if (r < N_ROWS - 1) begin : g_s  assign lin[I][SIDE_S] = lout[I+N_COLS][SIDE_N]; end
      else if (c == 0)    begin : g_io0 assign lin[I][SIDE_S] = io_in[0]; end
      else if (c == N_COLS - 1) begin : g_io1 assign lin[I][SIDE_S] = io_in[1]; end
      else                begin : g_s0 assign lin[I][SIDE_S] = '0; end

      cluster u_cluster (
        .cfg(cfg[I*CLUSTER_CFG +: CLUSTER_CFG]), .g_clk, .grst_n,
        .link_in(lin[I]), .link_out(lout[I])
      );
    end
  end

  assign io_out[0] = lout[(N_ROWS-1)*N_COLS][SIDE_S];
  assign io_out[1] = lout[N_ROWS*N_COLS-1][SIDE_S];
endmodule
