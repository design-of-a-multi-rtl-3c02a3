// tb_five_stage_styles: the fabric running the same five-stage,
// one-instruction-at-a-time pipeline in two styles, with identical data
// placement and routing; only the clocking differs.
//
// Data path: stage k sits in CLB 1 of one cluster and adds 1 to a 4-bit
// token with the carry chain, so a token leaves the fifth stage
// incremented by 5. The stages snake through the grid: (1,0) -> (0,0) ->
// (0,1) -> (0,2) -> (1,2). Tokens enter on io_in[0][4:1] and leave on
// io_out[1][4:1]. Link bit 0 carries the request, bits 4:1 the data, bit 5
// the acknowledge travelling back.
//
// Synchronous style: every stage register runs on g_clk; its clock enable
// comes from a five-state Johnson counter with decode LUTs placed in the
// otherwise unused cluster (1,1) and routed to the stages (relayed through
// (1,0) and (1,2) for the top row's outer stages). Stage k loads only in
// cycle k of five, so one token takes exactly five clock cycles.
//
// Asynchronous style: each stage has its cluster's controller block, pulse
// generator and PDE (taps 0..4, a different speed per stage). io_in[0][0]
// is the request in, io_out[0][5] the acknowledge to the sender,
// io_out[1][0] the request out and io_in[1][5] the receiver's acknowledge.
// Checks: token values and order, the idle-pipeline latency (sum of the
// five PDE delays), and that back-pressure made the sender wait.
`timescale 1ns/1ps
module tb_five_stage_styles;
  import fpga_pkg::*;
  import fabric_prog_pkg::*;

  logic g_clk = 0, grst_n = 0, cfg_clk = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [$clog2(CFG_WORDS)-1:0] cfg_addr = '0;
  logic [CFG_WORD_W-1:0] cfg_wdata = '0;
  logic [N_IO-1:0][LINK_W-1:0] io_in = '0, io_out;

  fpga_top dut (.*);

  int checks = 0, failures = 0;
  int n_sync_tok = 0, n_async_tok = 0, n_stall = 0;
  ccfg_t cc [N_CLUSTERS];

  localparam logic [63:0] T_BUF = {32{2'b10}};
  // stage k: cluster, side the tokens come from, side they leave on
  localparam int ST_CL  [5] = '{3, 0, 1, 2, 5};
  localparam int ST_IN  [5] = '{SIDE_S, SIDE_S, SIDE_W, SIDE_W, SIDE_N};
  localparam int ST_OUT [5] = '{SIDE_N, SIDE_E, SIDE_E, SIDE_S, SIDE_S};
  // synchronous style: side and bit on which the stage's enable arrives
  localparam int CE_SIDE [5] = '{SIDE_E, SIDE_S, SIDE_S, SIDE_S, SIDE_W};
  localparam int CE_BIT  [5] = '{6, 7, 6, 7, 6};
  localparam int JC = 4;   // cluster of the Johnson counter

  always #5 g_clk = ~g_clk;
  always #2 cfg_clk = ~cfg_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $realtime); end
  endtask

  function automatic logic [63:0] t3(input logic [7:0] f);
    logic [63:0] t;
    for (int i = 0; i < 64; i++) t[i] = f[i % 8];
    return t;
  endfunction

  task automatic write_cfg();
    logic [CFG_WORD_W-1:0] w; int bit_i;
    cfg_rst_n = 0; #3; cfg_rst_n = 1; #1;
    for (int a = 0; a < CFG_WORDS; a++) begin
      for (int b = 0; b < CFG_WORD_W; b++) begin
        bit_i = a * CFG_WORD_W + b;
        w[b] = (bit_i < FABRIC_CFG) ? cc[bit_i / CLUSTER_CFG][bit_i % CLUSTER_CFG] : 1'b0;
      end
      @(negedge cfg_clk); cfg_we = 1; cfg_addr = $bits(cfg_addr)'(a); cfg_wdata = w;
    end
    @(negedge cfg_clk); cfg_we = 0;
  endtask

  // the incrementing data path of one stage, in CLB 1 of the cluster
  // token bits 0..3 -> global inputs 2, 3, 0, 1 -> pins B0, A0, D0, C0
  task automatic datapath(ref ccfg_t c, input int in_s, input int out_s, input logic lclk);
    set_gi(c, snk_clb(1, 2), src_link(in_s, 1)); set_pin(c, 1, pin_b(0), 2);
    set_gi(c, snk_clb(1, 3), src_link(in_s, 2)); set_pin(c, 1, pin_a(0), 3);
    set_gi(c, snk_clb(1, 0), src_link(in_s, 3)); set_pin(c, 1, pin_d(0), 0);
    set_gi(c, snk_clb(1, 1), src_link(in_s, 4)); set_pin(c, 1, pin_c(0), 1);
    for (int s = 0; s < 2; s++) for (int w = 0; w < 2; w++)
      set_lb(c, 1, s, w, lb_cfg(T_BUF, DSEL_SUM, 1'b1, lclk));
    set_aux(c, 1, AUX_CIN, ASRC_ONE);
    set_gi(c, snk_link(out_s, 1), src_clb(1, O_DB0));
    set_gi(c, snk_link(out_s, 2), src_clb(1, O_DA0));
    set_gi(c, snk_link(out_s, 3), src_clb(1, O_DB1));
    set_gi(c, snk_link(out_s, 4), src_clb(1, O_DA1));
  endtask

  function automatic logic [7:0] dec(input int k);
    logic [7:0] f;
    for (int i = 0; i < 8; i++) begin
      logic s2, s1, s0;
      s2 = i[0]; s1 = i[1]; s0 = i[2];
      case (k)
        0: f[i] = ~s2 & ~s0;
        1: f[i] = ~s1 & s0;
        2: f[i] = s1 & s0;
        3: f[i] = s2 & s1;
        default: f[i] = s2 & ~s1;
      endcase
    end
    return f;
  endfunction

  task automatic build_sync();
    foreach (cc[i]) cc[i] = '0;
    for (int k = 0; k < 5; k++) begin
      datapath(cc[ST_CL[k]], ST_IN[k], ST_OUT[k], 1'b0);
      set_gi(cc[ST_CL[k]], snk_clb(1, 10), src_link(CE_SIDE[k], CE_BIT[k]));
      set_aux(cc[ST_CL[k]], 1, AUX_CE, 10);
    end
    // Johnson counter in cluster (1,1): state s0 = Db0, s1 = Da0, s2 = Db1 of CLB 3
    set_gi(cc[JC], snk_clb(3, 0), src_clb(3, O_DB1));
    set_gi(cc[JC], snk_clb(3, 1), src_clb(3, O_DA0));
    set_gi(cc[JC], snk_clb(3, 2), src_clb(3, O_DB0));
    set_lb(cc[JC], 3, 0, 0, lb_cfg(t3(8'b0001_0001), DSEL_Q, 1'b1, 1'b0));
    set_pin(cc[JC], 3, pin_b(0), 0); set_pin(cc[JC], 3, pin_b(1), 1);
    set_lb(cc[JC], 3, 0, 1, lb_cfg(T_BUF, DSEL_Q, 1'b1, 1'b0));
    set_pin(cc[JC], 3, pin_a(0), 2);
    set_lb(cc[JC], 3, 1, 0, lb_cfg({16{4'b1100}}, DSEL_Q, 1'b1, 1'b0));
    set_pin(cc[JC], 3, pin_d(1), 1);
    set_aux(cc[JC], 3, AUX_CE, ASRC_ONE);
    for (int g = 0; g < 3; g++) begin
      set_gi(cc[JC], snk_clb(4, g), src_clb(3, g == 0 ? O_DB1 : g == 1 ? O_DA0 : O_DB0));
      set_pin(cc[JC], 4, pin_b(g), g); set_pin(cc[JC], 4, pin_a(g), g);
      set_pin(cc[JC], 4, pin_d(g), g); set_pin(cc[JC], 4, pin_c(g), g);
      set_pin(cc[JC], 3, pin_c(g), g);
    end
    set_lb(cc[JC], 4, 0, 0, lb_cfg(t3(dec(0)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[JC], 4, 0, 1, lb_cfg(t3(dec(1)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[JC], 4, 1, 0, lb_cfg(t3(dec(2)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[JC], 4, 1, 1, lb_cfg(t3(dec(3)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[JC], 3, 1, 1, lb_cfg(t3(dec(4)), DSEL_Q, 1'b0, 1'b0));
    // enables out of (1,1), with relays through (1,0) and (1,2)
    set_gi(cc[JC], snk_link(SIDE_W, 6), src_clb(4, O_DB0));   // ce0 -> (1,0)
    set_gi(cc[JC], snk_link(SIDE_W, 7), src_clb(4, O_DA0));   // ce1 -> (1,0) -> (0,0)
    set_gi(cc[3],  snk_link(SIDE_N, 7), src_link(SIDE_E, 7));
    set_gi(cc[JC], snk_link(SIDE_N, 6), src_clb(4, O_DB1));   // ce2 -> (0,1)
    set_gi(cc[JC], snk_link(SIDE_E, 7), src_clb(4, O_DA1));   // ce3 -> (1,2) -> (0,2)
    set_gi(cc[5],  snk_link(SIDE_N, 7), src_link(SIDE_W, 7));
    set_gi(cc[JC], snk_link(SIDE_E, 6), src_clb(3, O_DA1));   // ce4 -> (1,2)
  endtask

  task automatic build_async();
    foreach (cc[i]) cc[i] = '0;
    for (int k = 0; k < 5; k++) begin
      datapath(cc[ST_CL[k]], ST_IN[k], ST_OUT[k], 1'b1);
      set_aux(cc[ST_CL[k]], 1, AUX_CE, ASRC_ONE);
      set_gi(cc[ST_CL[k]], GK_LR, src_link(ST_IN[k], 0));
      set_gi(cc[ST_CL[k]], GK_RA, src_link(ST_OUT[k], 5));
      set_gi(cc[ST_CL[k]], GK_PG, GS_CCLK);
      set_gi(cc[ST_CL[k]], snk_clb(1, 9), GS_PULSE);
      set_aux(cc[ST_CL[k]], 1, AUX_LCLK, 9);
      set_gi(cc[ST_CL[k]], snk_link(ST_OUT[k], 0), GS_RR);
      set_gi(cc[ST_CL[k]], snk_link(ST_IN[k], 5), GS_LA);
      set_pde(cc[ST_CL[k]], k);
    end
  endtask

  // ---- asynchronous sender / receiver
  localparam int N_TOK = 30;
  logic [3:0] sent [$];
  int received = 0;

  task automatic sender();
    logic [3:0] d;
    for (int i = 0; i < N_TOK; i++) begin
      d = 4'($urandom);
      io_in[0][4:1] = d;
      #1;
      sent.push_back(d);
      io_in[0][0] = ~io_in[0][0];
      #2;
      if (io_out[0][5] != io_in[0][0]) begin
        n_stall++;
        fork
          wait (io_out[0][5] == io_in[0][0]);
          #5000;
        join_any
        disable fork;
        if (io_out[0][5] != io_in[0][0]) begin check(1'b0, "sender timed out"); break; end
      end
      io_in[0][4:1] = 4'($urandom);
      #($urandom_range(3, 0));
    end
  endtask

  task automatic receiver();
    logic [3:0] e;
    while (received < N_TOK) begin
      fork
        wait (io_out[1][0] != io_in[1][5]);
        #5000;
      join_any
      disable fork;
      if (io_out[1][0] == io_in[1][5]) begin check(1'b0, "receiver timed out"); break; end
      #0.5;
      e = sent.pop_front();
      check(io_out[1][4:1] == e + 4'd5, "async token incremented by 5, in order");
      received++; n_async_tok++;
      #($urandom_range(1, 0) ? $urandom_range(3, 1) : $urandom_range(50, 20));
      io_in[1][5] = ~io_in[1][5];
    end
  endtask

  initial begin
    #3000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] d; realtime t0;
    // ---------------- synchronous style ----------------
    build_sync();
    write_cfg();
    @(negedge g_clk); grst_n = 1;          // Johnson counter now enables stage 1
    for (int i = 0; i < 20; i++) begin
      d = 4'($urandom);
      io_in[0][4:1] = d;
      repeat (5) @(negedge g_clk);          // five cycles, one stage each
      check(io_out[1][4:1] == d + 4'd5, "sync token incremented by 5 after five cycles");
      n_sync_tok++;
    end
    // one cycle short: the token must not yet have reached the output
    d = d + 4'd1;                           // differs from the token still at the output
    io_in[0][4:1] = d;
    repeat (4) @(negedge g_clk);
    check(io_out[1][4:1] == d + 4'd4, "sync token not out after four cycles");
    @(negedge g_clk);
    check(io_out[1][4:1] == d + 4'd5, "sync token out after the fifth cycle");
    // ---------------- asynchronous style ----------------
    grst_n = 0;
    build_async();
    write_cfg();
    #5 grst_n = 1; #5;
    t0 = $realtime; io_in[0][4:1] = 4'h9; io_in[0][0] = 1'b1;
    fork
      wait (io_out[1][0] == 1'b1);
      #5000;
    join_any
    disable fork;
    check($realtime - t0 == 15.0, "idle latency = sum of PDE delays (1+2+3+4+5)");
    check(io_out[1][4:1] == 4'hE, "first async token");
    #2 io_in[1][5] = 1'b1;
    #5;
    fork
      sender();
      receiver();
    join
    check(n_sync_tok == 20, "all synchronous tokens");
    check(received == N_TOK, "all asynchronous tokens");
    check(n_stall > 0, "back-pressure stall happened");
    $display("sync_tokens=%0d async_tokens=%0d stalls=%0d", n_sync_tok, n_async_tok, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
