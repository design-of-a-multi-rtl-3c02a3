// tb_fpga_top: end-to-end test of the full-size fabric (2 x 3 clusters,
// default parameters), configured through the configuration memory.
//
// Phase 1 runs synchronous and asynchronous logic at the same time:
//  * cluster (1,0): a 4-bit counter on the global clock using the carry
//    chain (CLB 0), and a 7-input function built with the F7 mux (CLB 2)
//    from io_in[0][6:0] to io_out[0][7]; counter on io_out[0][3:0];
//  * clusters (1,2) and (0,2): a two-stage two-phase asynchronous pipeline
//    of 4-bit data. Stage A sits in (1,2), stage B in (0,2); each stage is
//    its cluster's controller block, pulse generator and four registers
//    clocked by the pulse through the local clock. io_in[1]: bit 0
//    request, bits 4:1 data, bit 5 acknowledge from the receiver.
//    io_out[1]: bit 0 request to the receiver, bits 4:1 data, bit 5
//    acknowledge to the sender. The receiver acknowledges after random
//    delays, so the pipeline fills and the sender is held off (stall).
// Phase 2 clears and rewrites the configuration (a mode switch) so that
// cluster (1,0) holds the five-stage Johnson clock-enable generator of a
// one-instruction-at-a-time processor: three registers and five decode
// LUTs, enables on io_out[0][4:0].
// Each mechanism is counted; a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_fpga_top;
  import fpga_pkg::*;
  import fabric_prog_pkg::*;

  logic g_clk = 0, grst_n = 0, cfg_clk = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [$clog2(CFG_WORDS)-1:0] cfg_addr = '0;
  logic [CFG_WORD_W-1:0] cfg_wdata = '0;
  logic [N_IO-1:0][LINK_W-1:0] io_in = '0, io_out;

  fpga_top dut (.*);

  int checks = 0, failures = 0;
  int n_sync = 0, n_carry = 0, n_f7 = 0, n_async = 0, n_stall = 0, n_johnson = 0, n_reconf = 0;
  ccfg_t cc [N_CLUSTERS];
  bit sync_on = 0;

  localparam int CL_SYNC = 3, CL_A = 5, CL_B = 2;
  localparam int TAP_A = 3, TAP_B = 6;
  localparam logic [63:0] T_BUF = {32{2'b10}};

  always #5  g_clk = ~g_clk;
  always #2  cfg_clk = ~cfg_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // truth table of a function of the LUT inputs 0..2, repeated over inputs 3..5
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

  // one asynchronous pipeline stage in a cluster: request, data and
  // acknowledge in from side `in_s`, out towards side `out_s`
  task automatic async_stage(ref ccfg_t c, input int in_s, input int out_s, input int tap,
                             input int ra_side, input int ra_bit, input int la_bit);
    set_gi(c, GK_LR, src_link(in_s, 0));
    set_gi(c, GK_RA, src_link(ra_side, ra_bit));
    set_gi(c, GK_PG, GS_CCLK);
    set_gi(c, snk_clb(1, 9), GS_PULSE);
    for (int b = 0; b < 4; b++) set_gi(c, snk_clb(1, b), src_link(in_s, 1 + b));
    set_pin(c, 1, pin_d(0), 0); set_pin(c, 1, pin_c(0), 1);
    set_pin(c, 1, pin_b(0), 2); set_pin(c, 1, pin_a(0), 3);
    for (int s = 0; s < 2; s++) for (int w = 0; w < 2; w++)
      set_lb(c, 1, s, w, lb_cfg(T_BUF, DSEL_Q, 1'b1, 1'b1));
    set_aux(c, 1, AUX_LCLK, 9); set_aux(c, 1, AUX_CE, ASRC_ONE);
    set_gi(c, snk_link(out_s, 0), GS_RR);
    set_gi(c, snk_link(out_s, 1), src_clb(1, O_DB1));
    set_gi(c, snk_link(out_s, 2), src_clb(1, O_DA1));
    set_gi(c, snk_link(out_s, 3), src_clb(1, O_DB0));
    set_gi(c, snk_link(out_s, 4), src_clb(1, O_DA0));
    set_gi(c, snk_link(in_s, la_bit), GS_LA);
    set_pde(c, tap);
  endtask

  logic [127:0] t7;

  task automatic build_phase1();
    foreach (cc[i]) cc[i] = '0;
    // ---- counter, cluster (1,0) CLB 0: r0=Db0 r1=Da0 r2=Db1 r3=Da1
    for (int s = 0; s < 2; s++) for (int w = 0; w < 2; w++)
      set_lb(cc[CL_SYNC], 0, s, w, lb_cfg(T_BUF, DSEL_SUM, 1'b1, 1'b0));
    set_aux(cc[CL_SYNC], 0, AUX_CIN, ASRC_ONE); set_aux(cc[CL_SYNC], 0, AUX_CE, ASRC_ONE);
    set_gi(cc[CL_SYNC], snk_clb(0, 0), src_clb(0, O_DB1)); set_pin(cc[CL_SYNC], 0, pin_d(0), 0);
    set_gi(cc[CL_SYNC], snk_clb(0, 1), src_clb(0, O_DA1)); set_pin(cc[CL_SYNC], 0, pin_c(0), 1);
    set_gi(cc[CL_SYNC], snk_clb(0, 2), src_clb(0, O_DB0)); set_pin(cc[CL_SYNC], 0, pin_b(0), 2);
    set_gi(cc[CL_SYNC], snk_clb(0, 3), src_clb(0, O_DA0)); set_pin(cc[CL_SYNC], 0, pin_a(0), 3);
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 0), src_clb(0, O_DB0));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 1), src_clb(0, O_DA0));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 2), src_clb(0, O_DB1));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 3), src_clb(0, O_DA1));
    // ---- 7-input function, cluster (1,0) CLB 2
    t7 = {$urandom, $urandom, $urandom, $urandom};
    set_lb(cc[CL_SYNC], 2, 0, 1, lb_cfg(t7[127:64], DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[CL_SYNC], 2, 0, 0, lb_cfg(t7[63:0], DSEL_Q, 1'b0, 1'b0));
    for (int i = 0; i < 7; i++) set_gi(cc[CL_SYNC], snk_clb(2, i), src_link(SIDE_S, i));
    for (int i = 0; i < 6; i++) begin
      set_pin(cc[CL_SYNC], 2, pin_a(i), i); set_pin(cc[CL_SYNC], 2, pin_b(i), i);
    end
    set_aux(cc[CL_SYNC], 2, AUX_AX0, 6);
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 7), src_clb(2, O_F70));
    // ---- asynchronous pipeline: stage A in (1,2), stage B in (0,2)
    async_stage(cc[CL_A], SIDE_S, SIDE_N, TAP_A, SIDE_N, 6, 5);
    async_stage(cc[CL_B], SIDE_S, SIDE_S, TAP_B, SIDE_S, 5, 6);
    // (1,2) also relays stage B's outputs down to the IO and the receiver's acknowledge up
    for (int b = 0; b < 5; b++) set_gi(cc[CL_A], snk_link(SIDE_S, b), src_link(SIDE_N, b));
    set_gi(cc[CL_A], snk_link(SIDE_N, 5), src_link(SIDE_S, 5));
  endtask

  // Johnson enable generator: s0 = Db0, s1 = Da0, s2 = Db1 of CLB 3 on g_clk;
  // decode LUTs read s2, s1, s0 on inputs 0, 1, 2
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

  task automatic build_phase2();
    foreach (cc[i]) cc[i] = '0;
    // state registers in CLB 3; global inputs 0,1,2 carry s2,s1,s0
    set_gi(cc[CL_SYNC], snk_clb(3, 0), src_clb(3, O_DB1));
    set_gi(cc[CL_SYNC], snk_clb(3, 1), src_clb(3, O_DA0));
    set_gi(cc[CL_SYNC], snk_clb(3, 2), src_clb(3, O_DB0));
    set_lb(cc[CL_SYNC], 3, 0, 0, lb_cfg(t3(8'b0001_0001), DSEL_Q, 1'b1, 1'b0)); // s0' = ~s2 & ~s1
    set_pin(cc[CL_SYNC], 3, pin_b(0), 0); set_pin(cc[CL_SYNC], 3, pin_b(1), 1);
    set_lb(cc[CL_SYNC], 3, 0, 1, lb_cfg(T_BUF, DSEL_Q, 1'b1, 1'b0));              // s1' = s0
    set_pin(cc[CL_SYNC], 3, pin_a(0), 2);
    set_lb(cc[CL_SYNC], 3, 1, 0, lb_cfg({16{4'b1100}}, DSEL_Q, 1'b1, 1'b0));      // s2' = s1
    set_pin(cc[CL_SYNC], 3, pin_d(1), 1);
    set_aux(cc[CL_SYNC], 3, AUX_CE, ASRC_ONE);
    // decode: ce0..ce3 in CLB 4, ce4 in CLB 3 slice 1 upper block
    for (int g = 0; g < 3; g++) begin
      set_gi(cc[CL_SYNC], snk_clb(4, g), src_clb(3, g == 0 ? O_DB1 : g == 1 ? O_DA0 : O_DB0));
      set_pin(cc[CL_SYNC], 4, pin_b(g), g); set_pin(cc[CL_SYNC], 4, pin_a(g), g);
      set_pin(cc[CL_SYNC], 4, pin_d(g), g); set_pin(cc[CL_SYNC], 4, pin_c(g), g);
      set_pin(cc[CL_SYNC], 3, pin_c(g), g);
    end
    set_lb(cc[CL_SYNC], 4, 0, 0, lb_cfg(t3(dec(0)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[CL_SYNC], 4, 0, 1, lb_cfg(t3(dec(1)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[CL_SYNC], 4, 1, 0, lb_cfg(t3(dec(2)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[CL_SYNC], 4, 1, 1, lb_cfg(t3(dec(3)), DSEL_Q, 1'b0, 1'b0));
    set_lb(cc[CL_SYNC], 3, 1, 1, lb_cfg(t3(dec(4)), DSEL_Q, 1'b0, 1'b0));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 0), src_clb(4, O_DB0));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 1), src_clb(4, O_DA0));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 2), src_clb(4, O_DB1));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 3), src_clb(4, O_DA1));
    set_gi(cc[CL_SYNC], snk_link(SIDE_S, 4), src_clb(3, O_DA1));
  endtask

  // ---- synchronous monitor: the counter steps by one on every clock edge
  logic [3:0] cnt_prev;
  always @(posedge g_clk) begin
    #1;
    if (sync_on) begin
      check(io_out[0][3:0] == cnt_prev + 4'd1, "counter increments");
      n_sync++;
      if (cnt_prev[1:0] == 2'b11) n_carry++;       // carry rippled past bit 1
    end
    cnt_prev = io_out[0][3:0];
  end

  // ---- asynchronous sender and receiver
  localparam int N_TOK = 40;
  logic [3:0] sent [$];
  int received = 0;

  task automatic sender();
    logic [3:0] d; realtime t0;
    for (int i = 0; i < N_TOK; i++) begin
      d = 4'($urandom);
      io_in[1][4:1] = d;
      #1;
      t0 = $realtime;
      sent.push_back(d);
      io_in[1][0] = ~io_in[1][0];
      #2;
      if (io_out[1][5] != io_in[1][0]) begin
        n_stall++;
        fork
          wait (io_out[1][5] == io_in[1][0]);
          #3000;
        join_any
        disable fork;
        if (io_out[1][5] != io_in[1][0]) begin
          check(1'b0, "sender timed out waiting for an acknowledge");
          break;
        end
      end
      io_in[1][4:1] = 4'($urandom);    // data may change once the request is acknowledged
      #($urandom_range(3, 0));
    end
  endtask

  task automatic receiver();
    logic [3:0] e;
    while (received < N_TOK) begin
      fork
        wait (io_out[1][0] != io_in[1][5]);
        #3000;
      join_any
      disable fork;
      if (io_out[1][0] == io_in[1][5]) begin
        check(1'b0, "receiver timed out waiting for a request");
        break;
      end
      #0.5;
      e = sent.pop_front();
      check(io_out[1][4:1] == e, "async data in order");
      received++; n_async++;
      #($urandom_range(1, 0) ? $urandom_range(4, 1) : $urandom_range(60, 30));
      io_in[1][5] = ~io_in[1][5];
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0;
    logic [6:0] x;
    // ---------------- phase 1 ----------------
    build_phase1();
    grst_n = 0;
    write_cfg();
    @(negedge g_clk); grst_n = 1;
    @(posedge g_clk); #2 sync_on = 1;
    // first-token latency through the idle pipeline: PDE taps of both stages
    t0 = $realtime; io_in[1][0] = 1'b1; io_in[1][4:1] = 4'hA;
    fork
      wait (io_out[1][0] == 1'b1);
      #3000;
    join_any
    disable fork;
    check($realtime - t0 == real'(TAP_A + 1 + TAP_B + 1), "pipeline latency = sum of PDE delays");
    check(io_out[1][4:1] == 4'hA, "first token data");
    #3 io_in[1][5] = 1'b1;
    #5;
    fork
      sender();
      receiver();
      begin
        repeat (200) begin
          x = 7'($urandom); io_in[0][6:0] = x; #1.5;
          check(io_out[0][7] == t7[x], "7-input LUT through F7 mux");
          n_f7++;
        end
      end
    join
    sync_on = 0;
    // ---------------- phase 2: reconfigure ----------------
    build_phase2();
    grst_n = 0;
    write_cfg();
    n_reconf++;
    @(negedge g_clk); grst_n = 1;
    for (int i = 0; i < 40; i++) begin
      #1;
      check(io_out[0][4:0] == 5'(1 << (i % 5)), "Johnson enable sequence");
      n_johnson++;
      @(negedge g_clk);
    end
    // ---------------- mechanisms ----------------
    check(n_sync > 0, "synchronous clocked logic ran");
    check(n_carry > 0, "carry chain used");
    check(n_f7 > 0, "F7 mux used");
    check(received == N_TOK, "all asynchronous transfers arrived");
    check(n_stall > 0, "back-pressure stall happened");
    check(n_reconf > 0, "reconfiguration happened");
    check(n_johnson > 0, "Johnson enables ran");
    $display("sync_edges=%0d carries=%0d f7=%0d async=%0d stalls=%0d reconf=%0d johnson=%0d",
             n_sync, n_carry, n_f7, n_async, n_stall, n_reconf, n_johnson);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
