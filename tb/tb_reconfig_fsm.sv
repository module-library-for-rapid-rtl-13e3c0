// tb_reconfig_fsm: self-checking testbench of reconfig_fsm.
// Checks the power-on state (STATE1), that a rising edge of the
// reconfiguration request switches STATE1 -> STATE2 and STATE2 -> STATE1 one
// clock later with a one-clock switch pulse, and that a request held high, or
// low, causes no further switch.  A random request pattern is checked against
// an edge-counting model.
module tb_reconfig_fsm;
  import vc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  cfg_state_e st;
  logic sw;
  int checks = 0, failures = 0, n12 = 0, n21 = 0;

  always #5 clk = ~clk;

  reconfig_fsm dut (.clk, .rst_n, .reconf_req(req), .state_o(st), .switch_o(sw));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_state;
    logic prev_req;
    repeat (3) @(posedge clk);
    #1;
    check("reset state", 64'(st), 0);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    #1;
    check("idle state", 64'(st), 0);
    check("idle switch", 64'(sw), 0);
    // directed: edge, hold high, release, edge
    @(negedge clk); req = 1'b1;
    @(posedge clk); #1;
    check("STATE1->STATE2", 64'(st), 1);
    check("switch pulse", 64'(sw), 1);
    repeat (10) begin
      @(posedge clk); #1;
      check("held request keeps STATE2", 64'(st), 1);
      check("no second pulse", 64'(sw), 0);
    end
    @(negedge clk); req = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk); req = 1'b1;
    @(posedge clk); #1;
    check("STATE2->STATE1", 64'(st), 0);
    check("switch pulse 2", 64'(sw), 1);
    @(negedge clk); req = 1'b0;
    @(posedge clk);
    // random
    exp_state = 0;
    prev_req = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = ($urandom_range(0, 5) == 0) ? ~req : req;
      @(posedge clk); #1;
      if (req && !prev_req) begin
        if (exp_state == 0) n12++; else n21++;
        exp_state = 1 - exp_state;
        check("pulse on edge", 64'(sw), 1);
      end else begin
        check("no pulse", 64'(sw), 0);
      end
      check("state", 64'(st), longint'(exp_state));
      prev_req = req;
    end
    if (n12 == 0 || n21 == 0) begin
      failures++;
      $display("FAIL: a transition was never exercised");
    end
    $display("STATE1->STATE2 %0d, STATE2->STATE1 %0d", n12, n21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
