// tb_local_interconnect: self-checking test of the CLB switch matrix.
// For random configurations that enable one legal crosspoint (g <= p) per
// LUT pin and one source per auxiliary wire, every pin and auxiliary wire
// must equal its chosen source for random input patterns; an unconfigured
// wire reads 0. Also checks the triangular reach: pin 0 (D[0]) only from
// global 0, pin 23 (A[5]) from global 23.
`timescale 1ns/1ps
module tb_local_interconnect;
  import fpga_pkg::*;
  logic [LI_CFG-1:0]  cfg = '0;
  logic [LI_GLB-1:0]  glb;
  logic [LI_FB-1:0]   fb;
  logic [LI_CB-1:0]   cb;
  logic [LI_PINS-1:0] pins;
  logic [LI_AUX-1:0]  aux;
  int checks = 0, failures = 0;
  int sel_p [LI_PINS];
  int sel_a [LI_AUX];

  local_interconnect dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [LI_AUX_SRC-1:0] asrc;
    repeat (50) begin
      cfg = '0;
      foreach (sel_p[p]) begin
        sel_p[p] = $urandom_range(p + 1, 0);   // p+1 means "unconnected"
        if (sel_p[p] <= p) cfg[li_xp(p, sel_p[p])] = 1'b1;
      end
      foreach (sel_a[s]) begin
        sel_a[s] = $urandom_range(LI_AUX_SRC, 0);
        if (sel_a[s] < LI_AUX_SRC) cfg[li_aux(s, sel_a[s])] = 1'b1;
      end
      repeat (20) begin
        glb = 24'($urandom); fb = 6'($urandom); cb = 3'($urandom); #1;
        asrc = {1'b1, cb, fb, glb};
        foreach (sel_p[p]) begin
          checks++;
          if (pins[p] !== ((sel_p[p] <= p) ? glb[sel_p[p]] : 1'b0)) begin
            failures++; $display("FAIL pin %0d sel %0d", p, sel_p[p]);
          end
        end
        foreach (sel_a[s]) begin
          checks++;
          if (aux[s] !== ((sel_a[s] < LI_AUX_SRC) ? asrc[sel_a[s]] : 1'b0)) begin
            failures++; $display("FAIL aux %0d sel %0d", s, sel_a[s]);
          end
        end
      end
    end
    // triangle corners
    cfg = '0; cfg[li_xp(0, 0)] = 1; cfg[li_xp(23, 23)] = 1; glb = 24'h800001; #1;
    checks++; if (pins[0] !== 1'b1 || pins[23] !== 1'b1) begin failures++; $display("FAIL corners"); end
    checks++; if (LI_XP_BITS != 300) begin failures++; $display("FAIL crosspoint count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
