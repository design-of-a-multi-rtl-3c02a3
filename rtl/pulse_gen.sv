// pulse_gen: transition-to-pulse converter - BEHAVIOURAL MODEL.
//
// Two-phase handshakes mark new data by every transition, rising or
// falling, of a request wire, while the logic-block registers capture on a
// rising edge. This block emits one high pulse of PULSE_W time units for
// every transition of in: pulse = in XOR in delayed by PULSE_W. The delay
// line makes it a behavioural model; the XOR-with-delayed-copy structure
// and the width are this model's choice.
`timescale 1ns/1ps
module pulse_gen #(
  parameter int PULSE_W = 2
) (
  input  logic in,
  output logic pulse
);
  logic in_d;
  assign #(PULSE_W) in_d = in;
  assign pulse = in ^ in_d;
endmodule
