// tb_vc_structure: self-checking testbench of vc_structure (d and q PI
// controllers in parallel followed by CooT[D(-lambda)]).
// Streams random samples, sometimes every clock and sometimes with gaps, and
// checks each controller output (one clock after the sample) and each
// stator-frame output (two clocks after) against the reference models of
// vc_ref_pkg, with different gains on the d and q channels.
module tb_vc_structure;
  import vc_pkg::*;
  import vc_ref_pkg::*;

  localparam int KPD = 4096, KID = 300, KPQ = 1500, KIQ = 90, KF = 12;
  localparam int OMAX = 9000, OMIN = -9000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  dq_t r = '0, f = '0;
  sample_t c = '0, s = '0;
  logic ctrl_valid, out_valid, sat, windup;
  dq_t ctrl;
  ab_t ab;
  int checks = 0, failures = 0, n_sat = 0, n_wu = 0;

  always #5 clk = ~clk;

  vc_structure #(.KP_D(16'(KPD)), .KI_D(16'(KID)), .KP_Q(16'(KPQ)), .KI_Q(16'(KIQ)),
                 .K_FRAC(KF), .OUT_MAX(16'(OMAX)), .OUT_MIN(16'(OMIN)))
    dut (.clk, .rst_n, .clr_i(1'b0), .in_valid, .ref_i(r), .fb_i(f), .cos_i(c), .sin_i(s),
         .ctrl_valid, .ctrl_o(ctrl), .out_valid, .ab_o(ab), .sat_o(sat), .windup_o(windup));

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

  // expected outputs, in sample order
  int qcd[$], qcq[$], qsd[$], qsq[$];
  logic qsat[$], qwu[$];
  logic v1 = 1'b0, v2 = 1'b0;   // expected valid one and two clocks after a sample

  initial begin
    pi_ref pid, piq;
    int yd, yq;
    real ang;
    pid = new(KPD, KID, KF, OMIN, OMAX);
    piq = new(KPQ, KIQ, KF, OMIN, OMAX);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = (n % 400 < 200) ? 1'b1 : ($urandom_range(0, 2) == 0);
      if ($urandom_range(0, 9) == 0) begin
        r.d = sample_t'($urandom); f.d = sample_t'($urandom);
        r.q = sample_t'($urandom); f.q = sample_t'($urandom);
      end else begin
        r.d = sample_t'($urandom_range(0, 1000)) - 16'sd500; f.d = sample_t'($urandom_range(0, 1000)) - 16'sd500;
        r.q = sample_t'($urandom_range(0, 1000)) - 16'sd500; f.q = sample_t'($urandom_range(0, 1000)) - 16'sd500;
      end
      ang = real'($urandom_range(0, 62831)) / 10000.0;
      c = sample_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      s = sample_t'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      if (in_valid) begin
        yd = pid.step(int'(r.d), int'(f.d));
        yq = piq.step(int'(r.q), int'(f.q));
        qcd.push_back(yd); qcq.push_back(yq);
        qsat.push_back(pid.last_sat | piq.last_sat);
        qwu.push_back(pid.last_wu | piq.last_wu);
        qsd.push_back(rot_sd(yd, yq, int'(c), int'(s)));
        qsq.push_back(rot_sq(yd, yq, int'(c), int'(s)));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    check("all controller samples seen", qcd.size(), 0);
    check("all stator samples seen", qsd.size(), 0);
    if (n_sat == 0 || n_wu == 0) begin
      failures++;
      $display("FAIL: clamping never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: valid flags must follow the strobe by exactly one and two clocks
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      check("ctrl_valid latency", 64'(ctrl_valid), 64'(v1));
      check("out_valid latency", 64'(out_valid), 64'(v2));
      if (ctrl_valid && qcd.size() > 0) begin
        check("ctrl d", longint'(ctrl.d), longint'(qcd.pop_front()));
        check("ctrl q", longint'(ctrl.q), longint'(qcq.pop_front()));
        check("sat", 64'(sat), 64'(qsat[0]));
        check("windup", 64'(windup), 64'(qwu[0]));
        if (qsat.pop_front()) n_sat++;
        if (qwu.pop_front()) n_wu++;
      end
      if (out_valid && qsd.size() > 0) begin
        check("ab sd", longint'(ab.sd), longint'(qsd.pop_front()));
        check("ab sq", longint'(ab.sq), longint'(qsq.pop_front()));
      end
    end
  end

  always @(posedge clk) begin
    v2 <= v1;
    v1 <= in_valid & rst_n;
  end
endmodule
