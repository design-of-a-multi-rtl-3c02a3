// tb_lcbm_controller: self-checking test of the two-phase controller.
// A reference C-element state is kept in the testbench: the output must
// copy lr exactly when lr differs from ra and hold otherwise. The test
// runs random lr/ra sequences, then a scripted two-phase transfer
// sequence: request accepted, a second request blocked until the right
// side acknowledges, then accepted.
`timescale 1ns/1ps
module tb_lcbm_controller;
  logic rst_n, lr, la, rr, ra, clk;
  int checks = 0, failures = 0;
  logic ref_c;

  lcbm_controller dut (.*);

  task automatic check(input logic exp, input string what);
    checks++;
    if (la !== exp || rr !== exp || clk !== exp) begin
      failures++; $display("FAIL %s: la=%0b rr=%0b clk=%0b exp %0b", what, la, rr, clk, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; lr = 0; ra = 0; #1; check(1'b0, "reset");
    rst_n = 1; #1;
    // scripted handshake
    lr = 1; #1; check(1'b1, "request 1 accepted");
    lr = 0; #1; check(1'b1, "request 2 blocked: no ack yet");
    ra = 1; #1; check(1'b0, "request 2 accepted after ack");
    lr = 1; #1; check(1'b0, "request 3 blocked");
    ra = 0; #1; check(1'b1, "request 3 accepted");
    // random, against the reference
    ref_c = la;
    repeat (500) begin
      lr = 1'($urandom); ra = 1'($urandom); #1;
      if (lr != ra) ref_c = lr;
      check(ref_c, "random");
    end
    rst_n = 0; #1; check(1'b0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
