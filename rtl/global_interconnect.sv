// global_interconnect: the switch of one cluster. Each of N_SINK wires
// (CLB global inputs, controller lr/ra, pulse generator input, links to the
// four neighbours) can be driven by any of N_SRC sources (CLB outputs,
// controller la/rr/clk, the pulse, links from the neighbours) through a
// crosspoint enabled by one configuration bit, bit sink*N_SRC + src. The
// crosspoints are tri-state buffers in silicon; a wire here is the OR of
// its enabled crosspoints, identical when at most one is enabled, which
// the configuration must guarantee (asserted). Purely combinational. The
// full-crossbar population is this implementation's choice.
`timescale 1ns/1ps
module global_interconnect #(
  parameter int N_SRC  = fpga_pkg::GI_SRC,
  parameter int N_SINK = fpga_pkg::GI_SINK
) (
  input  logic [N_SINK*N_SRC-1:0] cfg,
  input  logic [N_SRC-1:0]        src,
  output logic [N_SINK-1:0]       sink
);
  for (genvar k = 0; k < N_SINK; k++) begin : g_sink
    assign sink[k] = |(cfg[k*N_SRC +: N_SRC] & src);
    always_comb assert ($countones(cfg[k*N_SRC +: N_SRC]) <= 1)
      else $error("sink %0d has several drivers", k);
  end
endmodule
