// tb_global_interconnect: self-checking test of the cluster crossbar at
// its full size: random configurations with one source (or none) per
// sink, random source patterns, every sink compared with its source.
`timescale 1ns/1ps
module tb_global_interconnect;
  import fpga_pkg::*;
  logic [GI_SINK*GI_SRC-1:0] cfg = '0;
  logic [GI_SRC-1:0]  src;
  logic [GI_SINK-1:0] sink;
  int checks = 0, failures = 0;
  int sel [GI_SINK];

  global_interconnect dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (20) begin
      cfg = '0;
      foreach (sel[k]) begin
        sel[k] = $urandom_range(GI_SRC, 0);
        if (sel[k] < GI_SRC) cfg[gi_xp(k, sel[k])] = 1'b1;
      end
      repeat (20) begin
        src = {$urandom, $urandom, $urandom};
        #1;
        foreach (sel[k]) begin
          checks++;
          if (sink[k] !== ((sel[k] < GI_SRC) ? src[sel[k]] : 1'b0)) begin
            failures++; $display("FAIL sink %0d sel %0d", k, sel[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
