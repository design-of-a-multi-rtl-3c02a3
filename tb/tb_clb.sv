// tb_clb: self-checking test of a CLB configured as a 4-bit ripple-carry
// adder: bit 0 in slice 0's lower block, bit 1 in its upper block, bits 2
// and 3 in slice 1, carry passing between the slices. Operands arrive on
// global inputs through the triangular matrix; carry-in, the local clock
// and the generate inputs come through the auxiliary wires, clock enable
// from the constant source. Checked against integer addition, first
// combinationally, then registered on the local clock.
`timescale 1ns/1ps
module tb_clb;
  import fpga_pkg::*;
  import fabric_prog_pkg::*;
  logic [CLB_CFG-1:0] cfg = '0;
  logic [LI_GLB-1:0]  glb;
  logic [LI_CB-1:0]   cb;
  logic g_clk, grst_n;
  logic [CLB_OUT-1:0] out;
  int checks = 0, failures = 0;
  ccfg_t cc;

  clb dut (.*);

  localparam logic [63:0] T_XOR = {16{4'b0110}};
  // global input of operand bits: x2,y2 = 0,1  x3,y3 = 2,3  x0,y0 = 4,5  x1,y1 = 6,7  cin = 8  l_clk = 9
  localparam int GX[4] = '{4, 6, 0, 2};
  localparam int GY[4] = '{5, 7, 1, 3};

  task automatic build(input logic regd);
    cc = '0;
    set_lb(cc, 0, 0, 0, lb_cfg(T_XOR, DSEL_SUM, regd, 1'b1));  // bit 0
    set_lb(cc, 0, 0, 1, lb_cfg(T_XOR, DSEL_SUM, regd, 1'b1));  // bit 1
    set_lb(cc, 0, 1, 0, lb_cfg(T_XOR, DSEL_SUM, regd, 1'b1));  // bit 2
    set_lb(cc, 0, 1, 1, lb_cfg(T_XOR, DSEL_SUM, regd, 1'b1));  // bit 3
    set_pin(cc, 0, pin_b(0), GX[0]); set_pin(cc, 0, pin_b(1), GY[0]);
    set_pin(cc, 0, pin_a(0), GX[1]); set_pin(cc, 0, pin_a(1), GY[1]);
    set_pin(cc, 0, pin_d(0), GX[2]); set_pin(cc, 0, pin_d(1), GY[2]);
    set_pin(cc, 0, pin_c(0), GX[3]); set_pin(cc, 0, pin_c(1), GY[3]);
    set_aux(cc, 0, AUX_BX0, GX[0]); set_aux(cc, 0, AUX_AX0, GX[1]);
    set_aux(cc, 0, AUX_BX1, GX[2]); set_aux(cc, 0, AUX_AX1, GX[3]);
    set_aux(cc, 0, AUX_CIN, 8); set_aux(cc, 0, AUX_LCLK, 9); set_aux(cc, 0, AUX_CE, ASRC_ONE);
    cfg = cc[CLB_CFG-1:0];
  endtask

  task automatic apply(input int x, input int y, input int ci);
    glb = '0;
    for (int i = 0; i < 4; i++) begin glb[GX[i]] = 1'(x >> i); glb[GY[i]] = 1'(y >> i); end
    glb[8] = 1'(ci);
  endtask

  function automatic logic [4:0] sum_out();
    return {out[O_COUT], out[O_DA1], out[O_DB1], out[O_DA0], out[O_DB0]};
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x, y, ci;
    g_clk = 0; cb = '0; grst_n = 0; glb = '0; #1 grst_n = 1;
    build(1'b0);
    for (x = 0; x < 16; x++) for (y = 0; y < 16; y++) for (ci = 0; ci < 2; ci++) begin
      apply(x, y, ci); #1;
      checks++;
      if (sum_out() !== 5'(x + y + ci)) begin failures++; $display("FAIL comb %0d+%0d+%0d = %0d", x, y, ci, sum_out()); end
    end
    build(1'b1);
    repeat (100) begin
      x = $urandom_range(15); y = $urandom_range(15); ci = $urandom_range(1);
      apply(x, y, ci); #1;
      glb[9] = 1'b1; #1; glb[9] = 1'b0; #1;     // local clock edge
      apply(0, 0, 0); #1;                       // inputs change after the edge
      checks++;
      if (sum_out()[3:0] !== 4'(x + y + ci)) begin failures++; $display("FAIL reg %0d+%0d", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
