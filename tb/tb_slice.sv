// tb_slice: self-checking test of a slice. Checks the 7-input function
// built from the two LUTs and the F7 mux (select on ax) against a random
// 128-bit truth table, a two-bit ripple add through the carry chain
// (lower block then upper block) against integer addition, and that both
// registers load on the shared clock.
`timescale 1ns/1ps
module tb_slice;
  import fpga_pkg::*;
  logic [SLICE_CFG-1:0] cfg;
  logic [5:0] a_in, b_in;
  logic ax, bx, cin, g_clk, l_clk, ce, grst_n, cout, da, db, f7;
  int checks = 0, failures = 0;

  slice dut (.*);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  function automatic logic [LB_CFG-1:0] lbc(input logic [63:0] t, input logic [1:0] ds, input logic os);
    logic [LB_CFG-1:0] c;
    c = '0; c[63:0] = t; c[LB_DSEL_LSB +: 2] = ds; c[LB_OSEL] = os;
    return c;
  endfunction

  // truth table of "bit0 of index xor bit0 of index>>1" style propagate:
  // LUT of the add: inputs a[0] (operand x) and a[1] (operand y), P = x ^ y
  localparam logic [63:0] T_XOR01 = {16{4'b0110}};

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] t7; logic [6:0] idx;
    g_clk = 0; l_clk = 0; ce = 1; grst_n = 0; cin = 0; ax = 0; bx = 0; a_in = 0; b_in = 0;
    cfg = '0; #1 grst_n = 1;
    // 7-input LUT: f7 = t7[{ax, in}] with both blocks sharing the same 6 inputs
    repeat (20) begin
      t7 = {$urandom, $urandom, $urandom, $urandom};
      cfg[SLICE_LB_A +: LB_CFG] = lbc(t7[127:64], DSEL_Q, 1'b0);
      cfg[SLICE_LB_B +: LB_CFG] = lbc(t7[63:0], DSEL_Q, 1'b0);
      repeat (20) begin
        idx = 7'($urandom); a_in = idx[5:0]; b_in = idx[5:0]; ax = idx[6]; #1;
        check(8'(f7), 8'(t7[idx]), "f7");
      end
    end
    // 2-bit adder: lower block bit 0, upper block bit 1; generate input = x bit (ax/bx)
    cfg[SLICE_LB_B +: LB_CFG] = lbc(T_XOR01, DSEL_SUM, 1'b0);
    cfg[SLICE_LB_A +: LB_CFG] = lbc(T_XOR01, DSEL_SUM, 1'b0);
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) for (int c = 0; c < 2; c++) begin
      b_in = {4'b0, 1'(y), 1'(x)};           // bit 0 operands
      a_in = {4'b0, 1'(y >> 1), 1'(x >> 1)}; // bit 1 operands
      bx = 1'(x); ax = 1'(x >> 1); cin = 1'(c); #1;
      check({5'b0, cout, da, db}, 8'(x + y + c), "add");
    end
    // both registers on the shared global clock
    cfg[SLICE_LB_B +: LB_CFG] = lbc(T_XOR01, DSEL_SUM, 1'b1);
    cfg[SLICE_LB_A +: LB_CFG] = lbc(T_XOR01, DSEL_SUM, 1'b1);
    b_in = 6'b000011; a_in = 6'b000001; bx = 1; ax = 0; cin = 0; #1;   // 3 + 1 = 0b100 : sum bits 00, cout 1
    g_clk = 1; #1; g_clk = 0; #1;
    check({6'b0, da, db}, 8'b00, "registered sum bits");
    b_in = 6'b000001; a_in = 6'b000000; bx = 1; #1;                    // 1 + 0 = 01
    check({6'b0, da, db}, 8'b00, "registers hold before edge");
    g_clk = 1; #1; g_clk = 0; #1;
    check({6'b0, da, db}, 8'b01, "registers load on edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
