// tb_config_memory: self-checking test of the configuration store at the
// fabric's full size. Writes every word with a pattern computed from its
// address, checks every bit of cfg, then rewrites a few words and checks
// that only they changed and that a write with we low is ignored.
`timescale 1ns/1ps
module tb_config_memory;
  import fpga_pkg::*;
  localparam int NB = FABRIC_CFG;
  localparam int NW = CFG_WORDS;
  logic clk = 0, we, rst_n;
  logic [$clog2(NW)-1:0] addr;
  logic [31:0] wdata;
  logic [NB-1:0] cfg;
  int checks = 0, failures = 0;

  config_memory dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int w, input int salt);
    return (w * 32'h9E37_79B9) ^ 32'(salt);
  endfunction

  task automatic wr(input int w, input logic [31:0] v, input logic en);
    @(negedge clk); we = en; addr = $bits(addr)'(w); wdata = v;
    @(negedge clk); we = 0;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] e;
    rst_n = 1; we = 0; addr = 0; wdata = 0; #1; rst_n = 0; #1;
    checks++; if (cfg !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int w = 0; w < NW; w++) wr(w, pat(w, 0), 1'b1);
    for (int i = 0; i < NB; i++) begin
      e = pat(i / 32, 0);
      checks++;
      if (cfg[i] !== e[i % 32]) begin failures++; if (failures < 10) $display("FAIL bit %0d", i); end
    end
    wr(7, 32'hDEAD_BEEF, 1'b1);
    wr(8, 32'h1234_5678, 1'b0);
    checks++; if (cfg[7*32 +: 32] !== 32'hDEAD_BEEF) begin failures++; $display("FAIL rewrite"); end
    checks++; if (cfg[8*32 +: 32] !== pat(8, 0)) begin failures++; $display("FAIL we low"); end
    checks++; if (cfg[6*32 +: 32] !== pat(6, 0)) begin failures++; $display("FAIL neighbour"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
