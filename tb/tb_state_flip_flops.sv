// Self-checking testbench for state_flip_flops (default WIDTH = 3).
//
// Drives random D values each clock and checks that Q shows, after each
// rising edge, the value D had before it, and that Q-bar is its complement.
// Also checks that reset clears Q at once, without waiting for a clock edge,
// and holds it clear while asserted.
module tb_state_flip_flops;
  localparam int W = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [W-1:0] d, q, q_n;
  int checks = 0, failures = 0;

  state_flip_flops dut (.*);

  task automatic check(logic [W-1:0] exp_q, string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s: q=%b q_n=%b expected q=%b", what, q, q_n, exp_q);
    end
  endtask

  initial begin
    logic [W-1:0] prev;
    rst_n = 1'b1;
    d = '1;
    @(posedge clk); #1;
    check('1, "load before reset");
    // Asynchronous reset: in the middle of a clock period.
    #2 rst_n = 1'b0;
    #1 check('0, "asynchronous reset");
    @(posedge clk); #1;
    check('0, "reset held over a clock edge");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      prev = d;
      @(posedge clk); #1;
      d = W'($urandom);  // change D away from the edge: Q must keep prev
      #2 check(prev, "capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
