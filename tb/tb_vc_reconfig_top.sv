// tb_vc_reconfig_top: end-to-end testbench of vc_reconfig_top at its default
// parameters.
//
// Scenario, after power-on reset:
//   1. closed loop in STATE1 (tandem converter): a first-order plant in the
//      testbench follows the d/q outputs of the active configuration while the
//      flux phasor turns at a constant rate; the loop must settle;
//   2. a reconfiguration request (the VSI failing) switches to STATE2 (CSI
//      alone) in the middle of the run; the loop must settle again;
//   3. random samples with random strobe gaps, random reconfiguration requests
//      in both directions, and random and sustained large errors that clamp
//      controller outputs and integrators.
// Every controller output of both configurations, every multiplexed
// stator-frame output, the state, the switch pulse and the 1/3-clock
// latencies are compared with the reference models of vc_ref_pkg and with an
// edge-driven state model.  Each mechanism (both switches, output and
// integrator clamping in each structure, outputs in each state, a switch to a
// structure whose integrators were already charged) is counted and must occur.
module tb_vc_reconfig_top;
  import vc_pkg::*;
  import vc_ref_pkg::*;

  // the defaults of vc_reconfig_top, repeated for the models
  localparam int KF = 12;
  localparam int C1KP = 4096, C1KI = 205, C2KP = 2048, C2KI = 82;
  localparam int OMAX = 8192, OMIN = -8192;
  localparam int N_CL = 1500;      // closed-loop samples per state
  localparam int N_RAND = 6000;    // random samples

  logic clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0, req = 1'b0;
  dq_t r = '0, f = '0;
  sample_t c = '0, s = '0;
  logic out_valid, switch_o;
  ab_t ab;
  cfg_state_e st, out_st;
  logic [1:0] cv, sat, wu;
  dq_t ctrl1, ctrl2;

  int checks = 0, failures = 0;
  int n_sw12 = 0, n_sw21 = 0, n_out1 = 0, n_out2 = 0, n_charged = 0, n_settled = 0;
  int n_sat[2] = '{0, 0}, n_wu[2] = '{0, 0};

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
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  pi_ref pi1d, pi1q, pi2d, pi2q;
  int q_c1d[$], q_c1q[$], q_c2d[$], q_c2q[$];
  logic q_s1[$], q_s2[$], q_w1[$], q_w2[$];
  int q_a1d[$], q_a1q[$], q_a2d[$], q_a2q[$];

  // one sample: advance all four controller models, queue the expectations
  task automatic apply_sample(output int y1d, output int y1q, output int y2d, output int y2q);
    y1d = pi1d.step(int'(r.d), int'(f.d));
    y1q = pi1q.step(int'(r.q), int'(f.q));
    y2d = pi2d.step(int'(r.d), int'(f.d));
    y2q = pi2q.step(int'(r.q), int'(f.q));
    q_c1d.push_back(y1d); q_c1q.push_back(y1q);
    q_c2d.push_back(y2d); q_c2q.push_back(y2q);
    q_s1.push_back(pi1d.last_sat | pi1q.last_sat);
    q_s2.push_back(pi2d.last_sat | pi2q.last_sat);
    q_w1.push_back(pi1d.last_wu | pi1q.last_wu);
    q_w2.push_back(pi2d.last_wu | pi2q.last_wu);
    q_a1d.push_back(rot_sd(y1d, y1q, int'(c), int'(s)));
    q_a1q.push_back(rot_sq(y1d, y1q, int'(c), int'(s)));
    q_a2d.push_back(rot_sd(y2d, y2q, int'(c), int'(s)));
    q_a2q.push_back(rot_sq(y2d, y2q, int'(c), int'(s)));
  endtask

  // ---------------------------------------------------------------- checker
  logic v1 = 1'b0, v2 = 1'b0, v3 = 1'b0;
  int   st_m = 0;
  logic req_last = 1'b0;

  always @(posedge clk) begin
    logic edge_now;
    int   sel_used;
    #1;
    if (rst_n) begin
      // latencies
      check("ctrl_valid latency", 64'(cv), v1 ? 3 : 0);
      check("out_valid latency", 64'(out_valid), 64'(v3));
      // controller outputs of both structures, every sample
      if (v1 && q_c1d.size() > 0) begin
        check("cfg1 ctrl d", longint'(ctrl1.d), longint'(q_c1d.pop_front()));
        check("cfg1 ctrl q", longint'(ctrl1.q), longint'(q_c1q.pop_front()));
        check("cfg2 ctrl d", longint'(ctrl2.d), longint'(q_c2d.pop_front()));
        check("cfg2 ctrl q", longint'(ctrl2.q), longint'(q_c2q.pop_front()));
        check("cfg1 sat", 64'(sat[0]), 64'(q_s1[0]));
        check("cfg2 sat", 64'(sat[1]), 64'(q_s2[0]));
        check("cfg1 windup", 64'(wu[0]), 64'(q_w1[0]));
        check("cfg2 windup", 64'(wu[1]), 64'(q_w2[0]));
        if (q_s1.pop_front()) n_sat[0]++;
        if (q_s2.pop_front()) n_sat[1]++;
        if (q_w1.pop_front()) n_wu[0]++;
        if (q_w2.pop_front()) n_wu[1]++;
      end
      // multiplexed output: selected by the state held before this edge
      sel_used = st_m;
      if (v3 && q_a1d.size() > 0) begin
        if (sel_used == 0) begin
          check("out sd (cfg1)", longint'(ab.sd), longint'(q_a1d[0]));
          check("out sq (cfg1)", longint'(ab.sq), longint'(q_a1q[0]));
          n_out1++;
        end else begin
          check("out sd (cfg2)", longint'(ab.sd), longint'(q_a2d[0]));
          check("out sq (cfg2)", longint'(ab.sq), longint'(q_a2q[0]));
          n_out2++;
        end
        check("out state", 64'(out_st), longint'(sel_used));
        void'(q_a1d.pop_front()); void'(q_a1q.pop_front());
        void'(q_a2d.pop_front()); void'(q_a2q.pop_front());
      end
      // state machine
      edge_now = req && !req_last;
      if (edge_now) begin
        if (st_m == 0) begin
          n_sw12++;
          if (pi2d.integ != 0.0 || pi2q.integ != 0.0) n_charged++;
        end else begin
          n_sw21++;
          if (pi1d.integ != 0.0 || pi1q.integ != 0.0) n_charged++;
        end
        st_m = 1 - st_m;
      end
      req_last = req;
      check("state", 64'(st), longint'(st_m));
      check("switch pulse", 64'(switch_o), 64'(edge_now));
    end
  end

  always @(posedge clk) begin
    v3 <= v2;
    v2 <= v1;
    v1 <= sample_en & rst_n;
  end

  // ---------------------------------------------------------------- stimulus
  real lambda = 0.0;

  task automatic set_phasor();
    c = sample_t'($rtoi($floor(32767.0 * $cos(lambda) + 0.5)));
    s = sample_t'($rtoi($floor(32767.0 * $sin(lambda) + 0.5)));
  endtask

  // closed loop: the plant follows the active configuration's outputs
  task automatic closed_loop(int n_samples, int cfg);
    int y1d, y1q, y2d, y2q, yd, yq, ed, eq;
    for (int k = 0; k < n_samples; k++) begin
      @(negedge clk);
      sample_en = 1'b1;
      set_phasor();
      apply_sample(y1d, y1q, y2d, y2q);
      @(negedge clk);
      sample_en = 1'b0;
      yd = (cfg == 0) ? y1d : y2d;
      yq = (cfg == 0) ? y1q : y2q;
      f.d = f.d + sample_t'((yd - int'(f.d)) / 8);
      f.q = f.q + sample_t'((yq - int'(f.q)) / 8);
      lambda = lambda + 0.0314;
    end
    ed = int'(r.d) - int'(f.d);
    eq = int'(r.q) - int'(f.q);
    if (ed >= -4 && ed <= 4 && eq >= -4 && eq <= 4)
      n_settled++;
    else
      $display("loop not settled: error d %0d, q %0d", ed, eq);
  endtask

  initial begin
    int y1d, y1q, y2d, y2q;
    pi1d = new(C1KP, C1KI, KF, OMIN, OMAX);
    pi1q = new(C1KP, C1KI, KF, OMIN, OMAX);
    pi2d = new(C2KP, C2KI, KF, OMIN, OMAX);
    pi2q = new(C2KP, C2KI, KF, OMIN, OMAX);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // 1. STATE1 closed loop: flux reference step and q reference
    r.d = 16'sd2000;
    r.q = 16'sd1000;
    closed_loop(N_CL, 0);
    // 2. reconfiguration to STATE2 (e.g. VSI failure), loop continues
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    r.q = -16'sd1000;
    closed_loop(N_CL, 1);
    @(negedge clk);
    req = 1'b0;
    // 3. random samples, random requests, large errors
    for (int n = 0; n < N_RAND; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 60) == 0) req = ~req;
      sample_en = ($urandom_range(0, 3) != 0);
      if (n % 1500 < 60) begin
        // sustained large error: drives both structures' integrators to a limit
        r.d = (n % 3000 < 1500) ? 16'sd30000 : -16'sd30000;
        r.q = -r.d;
        f.d = -r.d;
        f.q = r.d;
      end else if ($urandom_range(0, 7) == 0) begin
        r.d = sample_t'($urandom); f.d = sample_t'($urandom);
        r.q = sample_t'($urandom); f.q = sample_t'($urandom);
      end else begin
        r.d = sample_t'($urandom_range(0, 2000)) - 16'sd1000; f.d = sample_t'($urandom_range(0, 2000)) - 16'sd1000;
        r.q = sample_t'($urandom_range(0, 2000)) - 16'sd1000; f.q = sample_t'($urandom_range(0, 2000)) - 16'sd1000;
      end
      lambda = real'($urandom_range(0, 62831)) / 10000.0;
      set_phasor();
      if (sample_en) apply_sample(y1d, y1q, y2d, y2q);
    end
    @(negedge clk);
    sample_en = 1'b0;
    repeat (5) @(posedge clk);
    check("all outputs seen", q_a1d.size(), 0);
    // mechanisms
    $display("switches 1->2 %0d, 2->1 %0d, onto charged integrators %0d", n_sw12, n_sw21, n_charged);
    $display("outputs from cfg1 %0d, cfg2 %0d; loops settled %0d", n_out1, n_out2, n_settled);
    $display("output clamps %0d/%0d, integrator clamps %0d/%0d", n_sat[0], n_sat[1], n_wu[0], n_wu[1]);
    if (n_sw12 == 0) begin failures++; $display("FAIL: no STATE1->STATE2 switch"); end
    if (n_sw21 == 0) begin failures++; $display("FAIL: no STATE2->STATE1 switch"); end
    if (n_charged == 0) begin failures++; $display("FAIL: no switch onto a running structure"); end
    if (n_out1 == 0 || n_out2 == 0) begin failures++; $display("FAIL: a configuration never drove the output"); end
    if (n_settled != 2) begin failures++; $display("FAIL: closed loop did not settle in both states"); end
    if (n_sat[0] == 0 || n_sat[1] == 0) begin failures++; $display("FAIL: output clamping not exercised"); end
    if (n_wu[0] == 0 || n_wu[1] == 0) begin failures++; $display("FAIL: integrator clamping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
