// Shared types of the zone-1 EBP fault-locating relay.
//
// The relay is a five-state machine held in three flip-flops, S0 S1 S2
// (S0 is the most significant bit). The codes below are the present-state
// columns of the relay's state table; the three codes not listed (101, 110,
// 111) are unused and the next-state logic sends them back to ST_S0.
//
//   ST_S0  000  idle, searching for a rise of both R and X (A=1, B=1)
//   ST_S1  001  disturbance seen; asks whether the fault is within 80 %
//   ST_S2  010  beyond 80 %; asks whether it is within 100 %
//   ST_S3  011  fault located inside the protected reach: trip (Y=1), held
//   ST_S4  100  beyond 100 %; asks whether it is within 120 %
package ebp_pkg;

  typedef enum logic [2:0] {
    ST_S0 = 3'b000,
    ST_S1 = 3'b001,
    ST_S2 = 3'b010,
    ST_S3 = 3'b011,
    ST_S4 = 3'b100
  } ebp_state_e;

endpackage
