// lcbm_controller: hard two-phase bundled-data handshake controller.
//
// One C-element holds the stage state c. With two-phase signalling every
// transition of lr is a new request and every transition of ra an
// acknowledge. The C-element takes lr and the inverse of ra: it copies lr
// when lr != ra (a request is pending and the right side has acknowledged
// the previous one) and holds otherwise. Its output is the left
// acknowledge la, the right request rr (delayed by the PDE in the
// controller block) and the register event clk; each transition of clk is
// turned into a capture pulse by the pulse generator.
//
// The C-element is written as a level-sensitive latch, as a library
// C-element is a storage element; the latch is therefore intended and is
// the only storage here. rst_n (a choice of this implementation) clears it
// so all handshake wires start at 0.
`timescale 1ns/1ps
module lcbm_controller (
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra,
  output logic clk
);
  logic c;

  always_latch begin
    if (!rst_n)        c = 1'b0;
    else if (lr != ra) c = lr;
  end

  assign la  = c;
  assign rr  = c;
  assign clk = c;
endmodule
