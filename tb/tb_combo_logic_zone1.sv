// Self-checking testbench for combo_logic_zone1.
//
// Applies all 256 combinations of the five inputs A..E and the three present
// state bits and compares S0' S1' S2' with a reference next-state function
// written here as a case statement over the relay's state table (state by
// state, not as Boolean equations). Unused state codes must return to S_0.
// A clock is kept only for the watchdog.
module tb_combo_logic_zone1;
  import ebp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a_r, b_x, c_80, d_100, e_120, s0, s1, s2;
  logic s0p, s1p, s2p;
  int checks = 0, failures = 0;

  combo_logic_zone1 dut (.*);

  function automatic logic [2:0] ref_next(logic [2:0] st, logic a, logic b,
                                          logic c, logic d, logic e);
    case (st)
      ST_S0:   return (a && b) ? ST_S1 : ST_S0;
      ST_S1:   return c ? ST_S3 : ST_S2;
      ST_S2:   return d ? ST_S3 : ST_S4;
      ST_S3:   return ST_S3;
      ST_S4:   return e ? ST_S3 : ST_S0;
      default: return ST_S0;
    endcase
  endfunction

  initial begin
    logic [2:0] exp_ns;
    for (int v = 0; v < 256; v++) begin
      {s0, s1, s2, a_r, b_x, c_80, d_100, e_120} = 8'(v);
      #1;
      exp_ns = ref_next({s0, s1, s2}, a_r, b_x, c_80, d_100, e_120);
      checks++;
      if ({s0p, s1p, s2p} !== exp_ns) begin
        failures++;
        $display("FAIL state=%b ABCDE=%b%b%b%b%b next=%b expected=%b",
                 {s0, s1, s2}, a_r, b_x, c_80, d_100, e_120, {s0p, s1p, s2p}, exp_ns);
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
