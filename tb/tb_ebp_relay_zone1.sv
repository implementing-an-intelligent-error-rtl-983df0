// End-to-end testbench for the zone-1 EBP relay, ebp_relay_zone1, at its
// default (and only) configuration.
//
// Part 1 injects single-line-to-ground faults at fixed positions along the
// line: 80 %, 100 %, 120 % and 88 %, 101 %, 117 %, plus 130 % (beyond the
// reach) and disturbances where only one of R and X rises. For a fault at
// position p the fault-location flags are C = (p <= 80), D = (p <= 100),
// E = (p <= 120); a fault at 100 % thus closes the 100 % and 120 % flags. Each case checks whether the relay trips and how many
// clock edges after the edge that samples A=B=1 the trip appears:
// 2 (<= 80 %), 3 (above 80, up to 100 %), 4 (above 100, up to 120 %),
// no trip beyond 120 %.
// Part 2 drives random inputs for many clocks, with occasional resets, and
// compares the state and trip output every clock with a reference model.
// Every transition of the state diagram, the latched trip and the reset are
// counted; one that never happened counts as a failure.
module tb_ebp_relay_zone1;
  import ebp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, TrpSig1Z1, b_x, BRKF80, BRKF100, BRKF120, Trp1Z1;
  logic [2:0] state;
  int checks = 0, failures = 0;

  ebp_relay_zone1 dut (.*);

  // ---------------------------------------------------------------- model
  typedef enum int {
    M_S0_HOLD, M_S0_TO_S1, M_S1_TO_S2, M_S1_TO_S3, M_S2_TO_S3, M_S2_TO_S4,
    M_S4_TO_S3, M_S4_TO_S0, M_S3_HOLD, M_RESET_CLEARS_TRIP, M_NUM
  } mech_e;
  int mech_count[M_NUM];
  string mech_name[M_NUM] = '{"S0 hold (AB!=11)", "S0->S1 (AB=11)", "S1->S2 (>80%)",
    "S1->S3 (<=80%)", "S2->S3 (<=100%)", "S2->S4 (>100%)", "S4->S3 (<=120%)",
    "S4->S0 (>120%)", "S3 trip held", "reset clears trip"};

  ebp_state_e model = ST_S0;

  // Reference next state and transition bookkeeping, one call per edge.
  task automatic model_step();
    ebp_state_e nxt;
    case (model)
      ST_S0: if (TrpSig1Z1 && b_x) begin nxt = ST_S1; mech_count[M_S0_TO_S1]++; end
             else                  begin nxt = ST_S0; mech_count[M_S0_HOLD]++;  end
      ST_S1: if (BRKF80)  begin nxt = ST_S3; mech_count[M_S1_TO_S3]++; end
             else         begin nxt = ST_S2; mech_count[M_S1_TO_S2]++; end
      ST_S2: if (BRKF100) begin nxt = ST_S3; mech_count[M_S2_TO_S3]++; end
             else         begin nxt = ST_S4; mech_count[M_S2_TO_S4]++; end
      ST_S4: if (BRKF120) begin nxt = ST_S3; mech_count[M_S4_TO_S3]++; end
             else         begin nxt = ST_S0; mech_count[M_S4_TO_S0]++; end
      default: begin nxt = ST_S3; mech_count[M_S3_HOLD]++; end
    endcase
    model = nxt;
  endtask

  task automatic check_outputs(string what);
    checks++;
    if (state !== model || Trp1Z1 !== (model == ST_S3)) begin
      failures++;
      $display("FAIL %s: state=%b trip=%b expected state=%b trip=%b",
               what, state, Trp1Z1, model, model == ST_S3);
    end
  endtask

  // One clock: inputs are already set; step the model on the edge.
  task automatic tick(string what);
    @(posedge clk);
    if (rst_n) model_step();
    #1 check_outputs(what);
  endtask

  // Like tick, starts and ends just after a rising edge.
  task automatic do_reset();
    logic was_trip;
    @(negedge clk);
    was_trip = Trp1Z1;
    rst_n = 1'b0;
    #1;
    model = ST_S0;
    check_outputs("reset");
    if (was_trip && !Trp1Z1) mech_count[M_RESET_CLEARS_TRIP]++;
    @(posedge clk);
    #1 check_outputs("reset held over an edge");
    rst_n = 1'b1;
  endtask

  // ------------------------------------------------------- fault injection
  // pct: fault position in percent of line length; a, b: R and X flags.
  task automatic inject(int pct, logic a, logic b);
    int  exp_lat, lat;
    bit  tripped;
    do_reset();
    BRKF80  = (pct <= 80);
    BRKF100 = (pct <= 100);
    BRKF120 = (pct <= 120);
    if (!(a && b))       exp_lat = -1;
    else if (pct <= 80)  exp_lat = 2;
    else if (pct <= 100) exp_lat = 3;
    else if (pct <= 120) exp_lat = 4;
    else                 exp_lat = -1;
    // The disturbance is seen for one clock, then R and X stay high.
    TrpSig1Z1 = a; b_x = b;
    tripped = 0; lat = -1;
    for (int k = 1; k <= 8; k++) begin
      tick($sformatf("fault %0d%%", pct));
      if (k == 1) begin TrpSig1Z1 = 1'b0; b_x = 1'b0; end
      if (Trp1Z1 && !tripped) begin tripped = 1; lat = k; end
    end
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL fault at %0d%% (A=%b B=%b): trip latency %0d, expected %0d",
               pct, a, b, lat, exp_lat);
    end else
      $display("fault at %3d%% A=%b B=%b: %s", pct, a, b,
               tripped ? $sformatf("trip after %0d clocks", lat) : "no trip");
  endtask

  initial begin
    rst_n = 1'b0; TrpSig1Z1 = 0; b_x = 0; BRKF80 = 0; BRKF100 = 0; BRKF120 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Part 1: fault positions of the study, and random ones.
    inject(80, 1, 1);
    inject(100, 1, 1);
    inject(120, 1, 1);
    inject(88, 1, 1);
    inject(101, 1, 1);
    inject(117, 1, 1);
    inject(130, 1, 1);
    inject(50, 1, 0);
    inject(50, 0, 1);
    inject(50, 0, 0);
    // Part 2: random inputs, checked every clock against the model.
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(15) == 0) do_reset();
      else begin
        @(negedge clk);
        TrpSig1Z1 = ($urandom_range(3) != 0);
        b_x       = ($urandom_range(3) != 0);
        BRKF80    = 1'($urandom_range(1));
        BRKF100   = 1'($urandom_range(1));
        BRKF120   = 1'($urandom_range(1));
        tick("random");
      end
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-20s happened %0d times", mech_name[m], mech_count[m]);
      checks++;
      if (mech_count[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
