// pde: programmable delay element - BEHAVIOURAL MODEL.
//
// A chain of N_TAPS buffers, each TAP_DELAY time units, with a mux that
// selects which tap drives out: tap k delays the input by (k+1)*TAP_DELAY.
// It fine-tunes the delay of a request wire so that the bundled data
// arrives at the next register before its capture pulse (the relative
// timing constraint req -> data + margin before clk). A buffer delay has
// no synthesizable form, so the chain is modelled with transport delays;
// in silicon it is a string of library buffers and a mux. The tap count
// and per-buffer delay are this model's choice.
`timescale 1ns/1ps
module pde #(
  parameter int N_TAPS    = 8,
  parameter int TAP_DELAY = 1
) (
  input  logic [$clog2(N_TAPS)-1:0] sel,
  input  logic                      in,
  output logic                      out
);
  logic [N_TAPS-1:0] tap;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    if (k == 0) begin : g_first
      assign #(TAP_DELAY) tap[0] = in;
    end else begin : g_next
      assign #(TAP_DELAY) tap[k] = tap[k-1];
    end
  end

  assign out = tap[sel];
endmodule
