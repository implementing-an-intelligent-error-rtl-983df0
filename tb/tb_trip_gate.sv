// Self-checking testbench for trip_gate: all eight state codes, Y must be 1
// for code 011 (state S_3) only.
module tb_trip_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic s0, s1, s2, y;
  int checks = 0, failures = 0;

  trip_gate dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s0, s1, s2} = 3'(v);
      #1;
      checks++;
      if (y !== (v == 3)) begin
        failures++;
        $display("FAIL state=%b y=%b", {s0, s1, s2}, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
