// Next-state logic of the zone-1 EBP relay ("Combo Logic Zone 1").
//
// Purely combinational. From the five relay inputs A..E and the present
// state bits S0 S1 S2 it forms the next state S0' S1' S2' (s0p s1p s2p) as
// sums of products, one product term per row of the relay's state table:
//
//   S0' = ~D ~S0 S1 ~S2                                   (S_2 -> S_4)
//   S1' = ~S0 S2 + D ~S0 S1 ~S2 + E S0 ~S1 ~S2
//   S2' = A B ~S0 ~S1 ~S2 + C ~S0 ~S1 S2 + D ~S0 S1 ~S2
//         + ~S0 S1 S2 + E S0 ~S1 ~S2
//
// With the encoding of ebp_pkg this is the search of the relay:
//   S_0 --AB=1--> S_1 ; S_0 --otherwise--> S_0
//   S_1 --C=1 (within 80 %)--> S_3 ; --C=0--> S_2
//   S_2 --D=1 (within 100 %)--> S_3 ; --D=0--> S_4
//   S_4 --E=1 (within 120 %)--> S_3 ; --E=0 (beyond reach)--> S_0
//   S_3 holds (trip is latched until reset).
// The state table, the state encoding and the S0' equation follow the
// source design; the S1' and S2' products here are written row by row from
// that state table. The source's state diagram also draws a return from S_1
// to S_0 when AB=0, which its state table does not have; the table is
// followed, so S_1 depends on C alone. What the unused codes 101, 110, 111
// do is this design's choice: they make every product term zero, so they
// go to S_0 on the next clock.
module combo_logic_zone1 (
  input  logic a_r,    // A  (resistance increase)
  input  logic b_x,    // B  (reactance increase)
  input  logic c_80,   // C  (fault within 80 %)
  input  logic d_100,  // D  (fault within 100 %)
  input  logic e_120,  // E  (fault within 120 %)
  input  logic s0,     // present state, most significant bit
  input  logic s1,
  input  logic s2,
  output logic s0p,    // next state S0'
  output logic s1p,    // next state S1'
  output logic s2p     // next state S2'
);

  // One decoded term per state of the table.
  logic in_s0, in_s1, in_s2, in_s3, in_s4;

  always_comb begin
    in_s0 = ~s0 & ~s1 & ~s2;
    in_s1 = ~s0 & ~s1 &  s2;
    in_s2 = ~s0 &  s1 & ~s2;
    in_s3 = ~s0 &  s1 &  s2;
    in_s4 =  s0 & ~s1 & ~s2;

    s0p = ~d_100 & in_s2;
    s1p = (~s0 & s2) | (d_100 & in_s2) | (e_120 & in_s4);
    s2p = (a_r & b_x & in_s0) | (c_80 & in_s1) | (d_100 & in_s2)
        | in_s3 | (e_120 & in_s4);
  end

endmodule
