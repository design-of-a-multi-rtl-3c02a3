// controller_block: the hard controller slice of a cluster - the two-phase
// C-element controller with its right request passed through a
// programmable delay element. clk leaves undelayed (to the pulse
// generator, which clocks this stage's registers); rr leaves after the
// selected PDE tap, so the next stage sees its request only after this
// stage's data has had time to settle. cfg selects the PDE tap.
`timescale 1ns/1ps
module controller_block
  import fpga_pkg::*;
(
  input  logic [CB_CFG-1:0] cfg,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra,
  output logic clk
);
  logic rr_raw;

  lcbm_controller u_ctl (.rst_n, .lr, .la, .rr(rr_raw), .ra, .clk);

  pde #(.N_TAPS(PDE_TAPS)) u_pde (.sel(cfg), .in(rr_raw), .out(rr));
endmodule
