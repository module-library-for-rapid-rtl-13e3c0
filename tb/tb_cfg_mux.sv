// tb_cfg_mux: self-checking testbench of cfg_mux, the configuration
// multiplexer.  Drives two independent random sample streams and a random
// selection and checks that, one clock later, the output carries the valid
// flag and the sample of the selected stream (holding the previous sample
// when that stream had none) and reports which stream it came from.
module tb_cfg_mux;
  import vc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_state_e sel = STATE1;
  logic v1 = 1'b0, v2 = 1'b0;
  ab_t a1 = '0, a2 = '0;
  logic out_valid;
  ab_t ab;
  cfg_state_e sel_o;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  always #5 clk = ~clk;

  cfg_mux dut (.clk, .rst_n, .sel_i(sel), .valid1_i(v1), .ab1_i(a1), .valid2_i(v2), .ab2_i(a2),
               .out_valid, .ab_o(ab), .sel_o);

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
    ab_t held;
    logic ev;
    held = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sel = ($urandom_range(0, 1) == 1) ? STATE2 : STATE1;
      v1 = ($urandom_range(0, 3) != 0);
      v2 = ($urandom_range(0, 3) != 0);
      a1 = ab_t'($urandom);
      a2 = ab_t'($urandom);
      if (sel == STATE1) begin
        ev = v1;
        if (v1) held = a1;
        n1++;
      end else begin
        ev = v2;
        if (v2) held = a2;
        n2++;
      end
      @(posedge clk);
      #1;
      check("valid", 64'(out_valid), 64'(ev));
      check("sd", longint'(ab.sd), longint'(held.sd));
      check("sq", longint'(ab.sq), longint'(held.sq));
      check("sel_o", 64'(sel_o), 64'(sel));
    end
    if (n1 == 0 || n2 == 0) begin
      failures++;
      $display("FAIL: a selection was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
