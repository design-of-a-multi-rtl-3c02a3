// local_interconnect: switch matrix of one CLB.
//
// Main matrix: the 24 global inputs glb[23:0] reach the 24 LUT pins
// pins[23:0] = {A[5:0], B[5:0], C[5:0], D[5:0]} through crosspoints that
// exist only in the lower-left triangle of the matrix: pin p can be driven
// by glb[g] for g <= p, 300 crosspoints in all (bit li_xp(p,g) of cfg).
// Each crosspoint is a tri-state buffer in silicon; here a wire is the OR
// of its enabled crosspoints, which equals the tri-state wire when at most
// one driver is on, as the configuration must guarantee (asserted). A wire
// with no driver reads 0.
//
// Auxiliary wires (this implementation's choice, the published matrix
// covers only the LUT pins): Ax0, Bx0, Ax1, Bx1, carry-in, local clock and
// clock enable each have a full crosspoint row over 34 sources - the 24
// globals, the six slice outputs, the three controller-block signals and a
// constant 1. Purely combinational.
`timescale 1ns/1ps
module local_interconnect
  import fpga_pkg::*;
(
  input  logic [LI_CFG-1:0]  cfg,
  input  logic [LI_GLB-1:0]  glb,
  input  logic [LI_FB-1:0]   fb,
  input  logic [LI_CB-1:0]   cb,
  output logic [LI_PINS-1:0] pins,
  output logic [LI_AUX-1:0]  aux
);
  logic [LI_AUX_SRC-1:0] asrc;
  assign asrc = {1'b1, cb, fb, glb};

  always_comb begin
    for (int p = 0; p < LI_PINS; p++) begin
      pins[p] = 1'b0;
      for (int g = 0; g <= p; g++)
        pins[p] = pins[p] | (cfg[li_xp(p, g)] & glb[g]);
    end
    for (int s = 0; s < LI_AUX; s++) begin
      aux[s] = 1'b0;
      for (int k = 0; k < LI_AUX_SRC; k++)
        aux[s] = aux[s] | (cfg[li_aux(s, k)] & asrc[k]);
    end
  end

  // at most one tri-state driver per wire
  for (genvar p = 0; p < LI_PINS; p++) begin : g_pin_chk
    logic [p:0] en;
    for (genvar g = 0; g <= p; g++) begin : g_en
      assign en[g] = cfg[li_xp(p, g)];
    end
    always_comb assert ($countones(en) <= 1) else $error("pin %0d has several drivers", p);
  end
  for (genvar s = 0; s < LI_AUX; s++) begin : g_aux_chk
    always_comb assert ($countones(cfg[li_aux(s, 0) +: LI_AUX_SRC]) <= 1)
      else $error("aux wire %0d has several drivers", s);
  end
endmodule
