// tb_controller_block: self-checking test of the controller slice. Two
// controller blocks form a two-stage two-phase chain (the first's rr
// drives the second's lr, the second's la drives the first's ra); the
// testbench is the sender on the left and the receiver on the right.
// Checks: clk and la switch with no delay, rr arrives exactly
// (tap+1) time units after clk for the configured tap, a request is
// not accepted before the acknowledge, and transfers flow in order.
`timescale 1ns/1ps
module tb_controller_block;
  import fpga_pkg::*;
  logic rst_n;
  logic [CB_CFG-1:0] cfg0, cfg1;
  logic lr0, la0, rr0, ra0, clk0, la1, rr1, ra1, clk1;
  int checks = 0, failures = 0;

  controller_block u0 (.cfg(cfg0), .rst_n, .lr(lr0), .la(la0), .rr(rr0), .ra(ra0), .clk(clk0));
  controller_block u1 (.cfg(cfg1), .rst_n, .lr(rr0), .la(la1), .rr(rr1), .ra(ra1), .clk(clk1));
  assign ra0 = la1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0;
    rst_n = 0; lr0 = 0; ra1 = 0; cfg0 = 3'd4; cfg1 = 3'd2; #20; rst_n = 1; #5;
    for (int i = 1; i <= 8; i++) begin
      cfg0 = 3'(i % 8);
      #5;
      t0 = $realtime; lr0 = ~lr0; #0.1;
      check(clk0 == lr0 && la0 == lr0, "stage 0 fires at once");
      fork
        @(rr0);
        #50;
      join_any
      disable fork;
      check($realtime - t0 == real'(cfg0) + 1.0, "stage 0 rr delay equals tap+1");
      #0.1;
      check(clk1 == rr0 && la1 == rr0, "stage 1 fires on delayed request");
      fork
        @(rr1);
        #50;
      join_any
      disable fork;
      // right side acknowledges
      #3 ra1 = rr1;
      #5;
      check(clk1 == lr0, "stage 1 state follows each transfer");
    end
    // blocking: stage 1 is not acknowledged, so a second token stops in stage 0
    t0 = $realtime; lr0 = ~lr0; #20;     // token A reaches stage 1 and waits
    lr0 = ~lr0; #20;                      // token B enters stage 0
    check(clk0 == lr0, "token B captured in stage 0");
    check(clk1 != rr0, "stage 1 holds token A, token B waits");
    ra1 = rr1; #20;                       // acknowledge A
    check(clk1 == rr0, "token B moves on after acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
