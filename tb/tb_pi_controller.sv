// tb_pi_controller: self-checking testbench of pi_controller.
// Drives random reference/feedback samples (with gaps in the strobe, large
// errors that clamp the output and the integrator, and integrator clears) and
// compares every output with a model computed here in real arithmetic:
// integrator i += KI*e clamped to the limits scaled by 2^K_FRAC,
// y = floor((KP*e + i) / 2^K_FRAC) clamped to the limits.  It also checks the
// one-clock latency of out_valid.
module tb_pi_controller;
  import vc_pkg::*;

  localparam logic signed [15:0] KP = 16'sd3000;
  localparam logic signed [15:0] KI = 16'sd700;
  localparam int unsigned K_FRAC = 11;
  localparam sample_t OUT_MAX = 16'sd5000;
  localparam sample_t OUT_MIN = -16'sd6000;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  sample_t ref_s = '0, fb_s = '0;
  logic out_valid, sat, windup;
  sample_t y;
  int checks = 0, failures = 0;
  int n_sat = 0, n_windup = 0;

  always #5 clk = ~clk;

  pi_controller #(.KP(KP), .KI(KI), .K_FRAC(K_FRAC), .OUT_MAX(OUT_MAX), .OUT_MIN(OUT_MIN))
    dut (.clk, .rst_n, .clr_i(clr), .in_valid, .ref_i(ref_s), .fb_i(fb_s),
         .out_valid, .y_o(y), .sat_o(sat), .windup_o(windup));

  real integ_m = 0.0;

  function automatic real clampr(real x, real lo, real hi);
    return (x > hi) ? hi : ((x < lo) ? lo : x);
  endfunction

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
    real e, isum, ilo, ihi, yr, yexp;
    logic exp_sat, exp_wu;
    int mode;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      mode = $urandom_range(0, 9);
      @(negedge clk);
      clr = (n % 700 == 699);
      in_valid = (mode != 0);
      if (mode < 3) begin
        ref_s = sample_t'($urandom);
        fb_s  = sample_t'($urandom);
      end else begin
        ref_s = sample_t'($urandom_range(0, 400)) - 16'sd200;
        fb_s  = sample_t'($urandom_range(0, 400)) - 16'sd200;
      end
      @(posedge clk);
      #1;
      check("out_valid latency", 64'(out_valid), 64'(in_valid));
      if (clr) begin
        integ_m = 0.0;
        check("sat after clear", 64'(sat), 0);
      end else if (in_valid) begin
        e = real'(ref_s) - real'(fb_s);
        e = clampr(e, -32768.0, 32767.0);
        ilo  = real'(OUT_MIN) * (2.0 ** K_FRAC);
        ihi  = real'(OUT_MAX) * (2.0 ** K_FRAC);
        isum = integ_m + real'(KI) * e;
        exp_wu = (isum > ihi) || (isum < ilo);
        integ_m = clampr(isum, ilo, ihi);
        yr = $floor((real'(KP) * e + integ_m) / (2.0 ** K_FRAC));
        exp_sat = (yr > real'(OUT_MAX)) || (yr < real'(OUT_MIN));
        yexp = clampr(yr, real'(OUT_MIN), real'(OUT_MAX));
        check("y", longint'(y), longint'(yexp));
        check("sat", 64'(sat), 64'(exp_sat));
        check("windup", 64'(windup), 64'(exp_wu));
        if (sat) n_sat++;
        if (windup) n_windup++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    clr = 1'b0;
    if (n_sat == 0 || n_windup == 0) begin
      failures++;
      $display("FAIL: clamping never exercised (sat=%0d windup=%0d)", n_sat, n_windup);
    end
    $display("output clamped %0d times, integrator clamped %0d times", n_sat, n_windup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
