// Zone-1 EBP fault-locating relay: top level.
//
// The relay watches two flags, A (a large rise of the measured resistance R)
// and B (a large rise of the reactance X). When both are 1 it starts a
// search along the protected line, one step per clock: is the
// single-line-to-ground fault within 80 % of the line (C), within 100 % (D),
// within 120 % (E)? The first "yes" moves it to S_3 and raises the trip
// output Trp1Z1, which stays 1 until reset. A fault beyond 120 % is outside
// the reach, and the relay goes back to S_0 to wait for the next disturbance.
//
// Structure, as in the source circuit: next-state logic (combo_logic_zone1)
// feeds three D flip-flops (state_flip_flops) whose outputs S0 S1 S2 are fed
// back to the logic and decoded by trip_gate into Trp1Z1.
//
// Timing, counted from the rising clock edge that samples A=B=1 in S_0:
// Trp1Z1 rises 2 clock edges later for a fault within 80 %, 3 within 100 %
// and 4 within 120 %. C, D and E are levels sampled on the edge that leaves
// S_1, S_2 and S_4 respectively. Trp1Z1 is a decode of the flip-flops and
// changes only after a clock edge or reset.
//
// The port names TrpSig1Z1, BRKF80, BRKF100, BRKF120 and Trp1Z1 are the
// source's net names. The clock, the asynchronous active-low reset and the
// state observation port are this design's own additions.
module ebp_relay_zone1 (
  input  logic       clk,
  input  logic       rst_n,      // asynchronous, active low: state S_0
  input  logic       TrpSig1Z1,  // A_R: resistance increase
  input  logic       b_x,        // B_X: reactance increase
  input  logic       BRKF80,     // C_80: fault within 80 % of the line
  input  logic       BRKF100,    // D_100: fault within 100 % of the line
  input  logic       BRKF120,    // E_120: fault within 120 % of the line
  output logic       Trp1Z1,     // Y: trip
  output logic [2:0] state       // present state {S0,S1,S2}
);
  import ebp_pkg::*;

  logic       s0p, s1p, s2p;
  logic [2:0] q;

  combo_logic_zone1 u_combo (
    .a_r  (TrpSig1Z1),
    .b_x  (b_x),
    .c_80 (BRKF80),
    .d_100(BRKF100),
    .e_120(BRKF120),
    .s0   (q[2]),
    .s1   (q[1]),
    .s2   (q[0]),
    .s0p  (s0p),
    .s1p  (s1p),
    .s2p  (s2p)
  );

  state_flip_flops #(.WIDTH(3)) u_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({s0p, s1p, s2p}),
    .q    (q),
    .q_n  ()
  );

  trip_gate u_trip (
    .s0(q[2]),
    .s1(q[1]),
    .s2(q[0]),
    .y (Trp1Z1)
  );

  assign state = q;

  // The state register only ever holds one of the five table codes.
  a_legal_state: assert property (@(posedge clk) disable iff (!rst_n)
    q inside {ST_S0, ST_S1, ST_S2, ST_S3, ST_S4});

  // The trip, once given, is held.
  a_trip_held: assert property (@(posedge clk) disable iff (!rst_n)
    Trp1Z1 |=> Trp1Z1);

endmodule
