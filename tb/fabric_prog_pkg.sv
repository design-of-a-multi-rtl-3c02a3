// fabric_prog_pkg: testbench helpers that place configuration bits for
// one cluster of the fabric, following the layout defined in fpga_pkg.
// A testbench keeps one CLUSTER_CFG-bit vector per cluster, sets fields
// with these tasks and then writes the result into the configuration
// memory (or drives a cluster's cfg port directly).
`timescale 1ns/1ps
package fabric_prog_pkg;
  import fpga_pkg::*;

  typedef logic [CLUSTER_CFG-1:0] ccfg_t;

  // logic-block field: truth table, register-input select, registered
  // output, local clock
  function automatic logic [LB_CFG-1:0] lb_cfg(input logic [63:0] t, input logic [1:0] dsel,
                                              input logic reg_out, input logic lclk);
    logic [LB_CFG-1:0] c;
    c = '0; c[63:0] = t; c[LB_DSEL_LSB +: 2] = dsel; c[LB_OSEL] = reg_out; c[LB_CSEL] = lclk;
    return c;
  endfunction

  // which = 0: lower block (B/D pins, Db output), 1: upper block (A/C pins, Da output)
  task automatic set_lb(ref ccfg_t c, input int clb, input int slc, input int which,
                        input logic [LB_CFG-1:0] v);
    int base;
    base = clb * CLB_CFG + (slc ? CLB_S1 : CLB_S0) + (which ? SLICE_LB_A : SLICE_LB_B);
    c[base +: LB_CFG] = v;
  endtask

  // LUT pin p of {A,B,C,D} (D[0] = 0) from global input g, g <= p
  task automatic set_pin(ref ccfg_t c, input int clb, input int p, input int g);
    c[clb * CLB_CFG + CLB_LI + li_xp(p, g)] = 1'b1;
  endtask

  task automatic set_aux(ref ccfg_t c, input int clb, input int sink, input int src);
    c[clb * CLB_CFG + CLB_LI + li_aux(sink, src)] = 1'b1;
  endtask

  task automatic set_gi(ref ccfg_t c, input int sink, input int src);
    c[CL_GI + gi_xp(sink, src)] = 1'b1;
  endtask

  task automatic set_pde(ref ccfg_t c, input int tap);
    c[CL_CB +: CB_CFG] = CB_CFG'(tap);
  endtask

  // global interconnect numbering helpers
  function automatic int src_clb(input int clb, input int o);   return GS_CLB + clb * CLB_OUT + o; endfunction
  function automatic int src_link(input int side, input int b); return GS_LINK + side * LINK_W + b; endfunction
  function automatic int snk_clb(input int clb, input int g);   return GK_CLB + clb * LI_GLB + g; endfunction
  function automatic int snk_link(input int side, input int b); return GK_LINK + side * LINK_W + b; endfunction

  // pin numbers of the four LUTs
  function automatic int pin_a(input int i); return 18 + i; endfunction
  function automatic int pin_b(input int i); return 12 + i; endfunction
  function automatic int pin_c(input int i); return 6 + i;  endfunction
  function automatic int pin_d(input int i); return i;      endfunction

  // CLB output numbering
  localparam int O_DA0 = 0, O_DB0 = 1, O_F70 = 2, O_DA1 = 3, O_DB1 = 4, O_F71 = 5, O_COUT = 6;
endpackage
