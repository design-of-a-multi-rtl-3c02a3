// tb_pulse_gen: self-checking test of the transition-to-pulse model.
// Every rising and every falling input transition must give exactly one
// output pulse of PULSE_W time units that starts with the transition; a
// steady input gives none.
`timescale 1ns/1ps
module tb_pulse_gen;
  localparam int W = 2;
  logic in, pulse;
  int checks = 0, failures = 0, npulse = 0;
  realtime rise_t;

  pulse_gen #(.PULSE_W(W)) dut (.*);

  always @(posedge pulse) begin npulse++; rise_t = $realtime; end
  always @(negedge pulse) begin
    checks++;
    if ($realtime - rise_t != real'(W)) begin failures++; $display("FAIL width %0t", $realtime - rise_t); end
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0;
    in = 0; #10;
    checks++; if (npulse != 0 || pulse !== 1'b0) begin failures++; $display("FAIL idle pulse"); end
    for (int i = 1; i <= 20; i++) begin
      t0 = $realtime; in = ~in; #0.5;
      checks++; if (pulse !== 1'b1 || rise_t != t0) begin failures++; $display("FAIL no pulse at transition %0d", i); end
      #9.5;
      checks++; if (npulse != i) begin failures++; $display("FAIL count %0d != %0d", npulse, i); end
    end
    #20;
    checks++; if (npulse != 20) begin failures++; $display("FAIL extra pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
