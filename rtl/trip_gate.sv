// Trip output of the zone-1 EBP relay.
//
// A single three-input product term, Y = ~S0 S1 S2, that decodes state S_3
// (code 011), the only state of the relay whose output is 1. Combinational:
// Y follows the flip-flop outputs with no added delay. The equation is the
// source design's.
module trip_gate (
  input  logic s0,
  input  logic s1,
  input  logic s2,
  output logic y
);

  assign y = ~s0 & s1 & s2;

endmodule
