// tb_logic_block: self-checking test of one logic block. Random truth
// tables and inputs check the LUT output, the carry (Q ? cin : ax) and the
// sum (Q ^ cin) through each register-input choice in combinational mode;
// then the register is checked on the global clock, on the local clock
// (with the global clock running and ignored), with ce low (hold) and
// through the asynchronous reset. Expected values come from the truth table
// directly.
`timescale 1ns/1ps
module tb_logic_block;
  import fpga_pkg::*;
  logic [LB_CFG-1:0] cfg;
  logic [5:0] a;
  logic ax, cin, g_clk, l_clk, ce, grst_n, q, cout, d;
  int checks = 0, failures = 0;

  logic_block dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b", what, got, exp); end
  endtask

  function automatic logic [LB_CFG-1:0] mk(input logic [63:0] t, input logic [1:0] ds, input logic os, input logic cs);
    logic [LB_CFG-1:0] c;
    c = '0; c[63:0] = t; c[LB_DSEL_LSB +: 2] = ds; c[LB_OSEL] = os; c[LB_CSEL] = cs;
    return c;
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] t; logic qe, ce_v, prev;
    g_clk = 0; l_clk = 0; ce = 1; grst_n = 0; a = 0; ax = 0; cin = 0;
    cfg = '0; #1 grst_n = 1;
    // combinational
    repeat (200) begin
      t = {$urandom, $urandom}; a = 6'($urandom); ax = 1'($urandom); cin = 1'($urandom);
      for (int ds = 0; ds < 4; ds++) begin
        cfg = mk(t, 2'(ds), 1'b0, 1'b0); #1;
        qe = t[a];
        check(q, qe, "q");
        check(cout, qe ? cin : ax, "cout");
        case (ds)
          0: check(d, qe, "d=q");
          1: check(d, qe ^ cin, "d=sum");
          2: check(d, ax, "d=ax");
          3: check(d, qe ? cin : ax, "d=cout");
        endcase
      end
    end
    // registered on g_clk
    repeat (50) begin
      t = {$urandom, $urandom}; cfg = mk(t, DSEL_Q, 1'b1, 1'b0);
      a = 6'($urandom); #1;
      prev = d;
      g_clk = 1; #1; check(d, t[a], "reg g_clk"); g_clk = 0; #1;
      l_clk = 1; #1; l_clk = 0;
      a = ~a; #1; check(d, t[~a], "reg holds on l_clk when g_clk selected");
    end
    // registered on l_clk
    repeat (50) begin
      t = {$urandom, $urandom}; cfg = mk(t, DSEL_SUM, 1'b1, 1'b1);
      a = 6'($urandom); cin = 1'($urandom); #1;
      l_clk = 1; #1; check(d, t[a] ^ cin, "reg l_clk"); l_clk = 0; #1;
      prev = d; a = ~a; cin = ~cin; #1;
      g_clk = 1; #1; g_clk = 0; #1; check(d, prev, "reg ignores g_clk when l_clk selected");
    end
    // clock enable
    cfg = mk(64'hFFFF_FFFF_FFFF_FFFF, DSEL_Q, 1'b1, 1'b0); #1;
    g_clk = 1; #1; g_clk = 0; #1; check(d, 1'b1, "load 1");
    cfg = mk(64'h0, DSEL_Q, 1'b1, 1'b0); ce = 0; #1;
    g_clk = 1; #1; g_clk = 0; #1; check(d, 1'b1, "ce low holds");
    ce = 1; g_clk = 1; #1; g_clk = 0; #1; check(d, 1'b0, "ce high loads");
    cfg = mk(64'hFFFF_FFFF_FFFF_FFFF, DSEL_Q, 1'b1, 1'b0);
    g_clk = 1; #1; g_clk = 0; #1; check(d, 1'b1, "load 1 again");
    grst_n = 0; #1; check(d, 1'b0, "reset clears"); grst_n = 1; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
