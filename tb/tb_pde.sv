// tb_pde: self-checking test of the delay-element model. For every tap
// the delay from an input edge to the output edge is measured and must be
// (tap+1) * TAP_DELAY; both rising and falling edges are checked.
`timescale 1ns/1ps
module tb_pde;
  localparam int N = 8;
  logic [2:0] sel;
  logic in, out;
  int checks = 0, failures = 0;

  pde #(.N_TAPS(N), .TAP_DELAY(1)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, dt;
    in = 0; sel = 0; #20;
    for (int k = 0; k < N; k++) begin
      sel = 3'(k); #20;
      for (int e = 0; e < 2; e++) begin
        t0 = $realtime; in = ~in;
        @(out);
        dt = $realtime - t0;
        checks++;
        if (dt != real'(k + 1)) begin failures++; $display("FAIL tap %0d delay %0t", k, dt); end
        #20;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
