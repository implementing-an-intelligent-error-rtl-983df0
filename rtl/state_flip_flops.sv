// State register of the zone-1 EBP relay: WIDTH D flip-flops (three for
// the relay, one per state bit S0 S1 S2).
//
// Each flip-flop takes its D input on the rising edge of clk and shows it
// on Q, with the complement on Q-bar, one clock later. An active-low
// asynchronous reset clears all of them, which is state S_0 of the relay,
// the state the search starts in. The D / Q / Q-bar pins follow the source
// design; the clock edge and the reset are this design's own choice.
module state_flip_flops #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

  assign q_n = ~q;

endmodule
