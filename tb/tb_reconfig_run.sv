// tb_reconfig_run: a 1 s run of the reconfigurable controller with a
// reconfiguration at 0.5 s, at the top's default parameters.
//
// Samples are taken at 10 kHz (one sample every 4 clocks here), so the run is
// 10,000 samples; the flux phasor turns at 50 Hz.  A first-order plant in the
// testbench (time constant 8 samples) follows the d/q outputs of the active
// configuration.  The run starts in STATE1 (tandem converter), the
// reconfiguration request rises after 5,000 samples (0.5 s, e.g. the VSI
// failing) and the run ends in STATE2 (CSI alone).  Checked: every controller
// output and every stator-frame output against the reference models, the
// switch taking place exactly at 0.5 s, the loop settling in both states, and
// the stator-frame references rotating with the flux (their magnitude equals
// the magnitude of the field-oriented references, within rounding).
module tb_reconfig_run;
  import vc_pkg::*;
  import vc_ref_pkg::*;

  localparam int KF = 12;
  localparam int C1KP = 4096, C1KI = 205, C2KP = 2048, C2KI = 82;
  localparam int OMAX = 8192, OMIN = -8192;
  localparam int N_SAMPLES = 10000;
  localparam int N_SWITCH = 5000;
  localparam real PI_R = 3.14159265358979;
  localparam real D_LAMBDA = 2.0 * PI_R * 50.0 / 10000.0;

  logic clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0, req = 1'b0;
  dq_t r = '0, f = '0;
  sample_t c = '0, s = '0;
  logic out_valid, switch_o;
  ab_t ab;
  cfg_state_e st, out_st;
  logic [1:0] cv, sat, wu;
  dq_t ctrl1, ctrl2;
  int checks = 0, failures = 0, n_settled = 0, n_switch = 0, switch_sample = -1;
  int sample_no = 0;

  always #5 clk = ~clk;

  vc_reconfig_top dut (
    .clk, .rst_n, .sample_en, .ref_i(r), .fb_i(f), .cos_i(c), .sin_i(s), .reconf_req(req),
    .out_valid, .ab_o(ab), .state_o(st), .out_state_o(out_st), .switch_o,
    .ctrl_valid_o(cv), .ctrl1_o(ctrl1), .ctrl2_o(ctrl2), .sat_o(sat), .windup_o(wu)
  );

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at sample %0d", what, got, exp, sample_no);
    end
  endtask

  initial begin
    repeat (N_SAMPLES * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (switch_o) begin
      n_switch++;
      switch_sample = sample_no;
    end
  end

  initial begin
    pi_ref pi1d, pi1q, pi2d, pi2q;
    int y1d, y1q, y2d, y2q, yd, yq, ed, eq, cfg;
    real lambda, mag_in, mag_out;
    pi1d = new(C1KP, C1KI, KF, OMIN, OMAX);
    pi1q = new(C1KP, C1KI, KF, OMIN, OMAX);
    pi2d = new(C2KP, C2KI, KF, OMIN, OMAX);
    pi2q = new(C2KP, C2KI, KF, OMIN, OMAX);
    lambda = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    r.d = 16'sd3840;    // 15 A at 1/256 A per LSB
    r.q = 16'sd2560;
    for (sample_no = 0; sample_no < N_SAMPLES; sample_no++) begin
      if (sample_no == N_SWITCH) begin
        @(negedge clk);
        req = 1'b1;
        @(posedge clk);
      end
      cfg = (sample_no < N_SWITCH) ? 0 : 1;
      @(negedge clk);
      sample_en = 1'b1;
      c = sample_t'($rtoi($floor(32767.0 * $cos(lambda) + 0.5)));
      s = sample_t'($rtoi($floor(32767.0 * $sin(lambda) + 0.5)));
      y1d = pi1d.step(int'(r.d), int'(f.d));
      y1q = pi1q.step(int'(r.q), int'(f.q));
      y2d = pi2d.step(int'(r.d), int'(f.d));
      y2q = pi2q.step(int'(r.q), int'(f.q));
      @(negedge clk);
      sample_en = 1'b0;
      check("cfg1 ctrl d", longint'(ctrl1.d), longint'(y1d));
      check("cfg1 ctrl q", longint'(ctrl1.q), longint'(y1q));
      check("cfg2 ctrl d", longint'(ctrl2.d), longint'(y2d));
      check("cfg2 ctrl q", longint'(ctrl2.q), longint'(y2q));
      @(negedge clk);
      @(negedge clk);
      yd = (cfg == 0) ? y1d : y2d;
      yq = (cfg == 0) ? y1q : y2q;
      check("out valid", 64'(out_valid), 1);
      check("out state", 64'(out_st), longint'(cfg));
      check("out sd", longint'(ab.sd), longint'(rot_sd(yd, yq, int'(c), int'(s))));
      check("out sq", longint'(ab.sq), longint'(rot_sq(yd, yq, int'(c), int'(s))));
      mag_in  = $sqrt(real'(yd) * real'(yd) + real'(yq) * real'(yq));
      mag_out = $sqrt(real'(ab.sd) * real'(ab.sd) + real'(ab.sq) * real'(ab.sq));
      checks++;
      if (mag_out - mag_in > 2.0 || mag_in - mag_out > 2.0) begin
        failures++;
        $display("FAIL magnitude %f vs %f", mag_out, mag_in);
      end
      // plant
      f.d = f.d + sample_t'((yd - int'(f.d)) / 8);
      f.q = f.q + sample_t'((yq - int'(f.q)) / 8);
      lambda = lambda + D_LAMBDA;
      if (sample_no == N_SWITCH - 1 || sample_no == N_SAMPLES - 1) begin
        ed = int'(r.d) - int'(f.d);
        eq = int'(r.q) - int'(f.q);
        if (ed >= -4 && ed <= 4 && eq >= -4 && eq <= 4) n_settled++;
        else $display("loop not settled at sample %0d: error %0d/%0d", sample_no, ed, eq);
      end
    end
    check("one reconfiguration", 64'(n_switch), 1);
    check("reconfiguration at 0.5 s (sample)", 64'(switch_sample), 64'(N_SWITCH));
    check("final state STATE2", 64'(st), 1);
    check("loop settled in both states", 64'(n_settled), 2);
    $display("switch at sample %0d, loops settled %0d", switch_sample, n_settled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
