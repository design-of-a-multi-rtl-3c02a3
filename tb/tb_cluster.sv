// tb_cluster: self-checking test of one cluster running a synchronous and
// an asynchronous circuit side by side.
// Asynchronous: a two-phase pipeline stage. lr and 4 data bits arrive on
// the west link; the controller block's clk drives the pulse generator,
// whose pulse clocks four registers of CLB 1 through its local clock;
// rr (after the PDE) and the registered data leave on the east link, la
// on the west link, ra comes back on the east link. The testbench is the
// sender and the receiver and checks data, handshake order and the PDE
// delay of rr. Synchronous: CLB 0 holds a toggle flip-flop on g_clk whose
// output (routed back to its own LUT through the global interconnect)
// leaves on the south link and must toggle on every clock edge.
`timescale 1ns/1ps
module tb_cluster;
  import fpga_pkg::*;
  import fabric_prog_pkg::*;
  logic [CLUSTER_CFG-1:0] cfg = '0;
  logic g_clk = 0, grst_n;
  logic [N_SIDES-1:0][LINK_W-1:0] link_in, link_out;
  int checks = 0, failures = 0;
  int transfers = 0, toggles = 0;
  ccfg_t cc;

  cluster dut (.*);

  localparam logic [63:0] T_BUF = {32{2'b10}};   // Q = input 0
  localparam logic [63:0] T_INV = {32{2'b01}};   // Q = not input 0
  localparam int TAP = 5;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic load_cfg();
    cc = '0;
    // asynchronous stage in CLB 1
    set_gi(cc, GK_LR, src_link(SIDE_W, 0));
    set_gi(cc, GK_RA, src_link(SIDE_E, 0));
    set_gi(cc, GK_PG, GS_CCLK);
    set_gi(cc, snk_clb(1, 9), GS_PULSE);
    for (int b = 0; b < 4; b++) set_gi(cc, snk_clb(1, b), src_link(SIDE_W, 1 + b));
    set_pin(cc, 1, pin_d(0), 0); set_pin(cc, 1, pin_c(0), 1);
    set_pin(cc, 1, pin_b(0), 2); set_pin(cc, 1, pin_a(0), 3);
    for (int s = 0; s < 2; s++) for (int w = 0; w < 2; w++)
      set_lb(cc, 1, s, w, lb_cfg(T_BUF, DSEL_Q, 1'b1, 1'b1));
    set_aux(cc, 1, AUX_LCLK, 9); set_aux(cc, 1, AUX_CE, ASRC_ONE);
    set_gi(cc, snk_link(SIDE_E, 0), GS_RR);
    set_gi(cc, snk_link(SIDE_W, 0), GS_LA);
    set_gi(cc, snk_link(SIDE_E, 1), src_clb(1, O_DB1));
    set_gi(cc, snk_link(SIDE_E, 2), src_clb(1, O_DA1));
    set_gi(cc, snk_link(SIDE_E, 3), src_clb(1, O_DB0));
    set_gi(cc, snk_link(SIDE_E, 4), src_clb(1, O_DA0));
    set_pde(cc, TAP);
    // synchronous toggle flip-flop in CLB 0, slice 0 lower block
    set_lb(cc, 0, 0, 0, lb_cfg(T_INV, DSEL_Q, 1'b1, 1'b0));
    set_gi(cc, snk_clb(0, 12), src_clb(0, O_DB0));
    set_pin(cc, 0, pin_b(0), 12);
    set_aux(cc, 0, AUX_CE, ASRC_ONE);
    set_gi(cc, snk_link(SIDE_S, 0), src_clb(0, O_DB0));
    cfg = cc;
  endtask

  always #5 g_clk = ~g_clk;

  // synchronous side: the flip-flop output must differ before and after each edge
  logic prev_q;
  always @(posedge g_clk) begin
    prev_q <= link_out[SIDE_S][0];
  end
  always @(negedge g_clk) if (grst_n && $realtime > 40) begin
    check(link_out[SIDE_S][0] != prev_q, "sync toggle flip-flop");
    toggles++;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] data; realtime t0;
    link_in = '0; grst_n = 1; #1 grst_n = 0;
    load_cfg();
    #10 grst_n = 1;
    for (int i = 0; i < 20; i++) begin
      data = 4'($urandom);
      link_in[SIDE_W][4:1] = data;
      #2;
      t0 = $realtime;
      link_in[SIDE_W][0] = ~link_in[SIDE_W][0];           // request
      #0.5;
      check(link_out[SIDE_W][0] == link_in[SIDE_W][0], "la answers the request");
      link_in[SIDE_W][4:1] = ~data;                      // sender may change data after la
      wait (link_out[SIDE_E][0] == link_in[SIDE_W][0]);
      check($realtime - t0 == real'(TAP + 1), "rr delayed by the PDE tap");
      check(link_out[SIDE_E][4:1] == data, "registered data matches the transfer");
      transfers++;
      #3 link_in[SIDE_E][0] = link_out[SIDE_E][0];      // receiver acknowledges
      #($urandom_range(7, 1));
    end
    check(transfers == 20, "all transfers done");
    check(toggles > 20, "synchronous side ran");
    $display("transfers=%0d sync_edges=%0d", transfers, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
