// tb_coot_inv: self-checking testbench of coot_inv, the inverse coordinate
// transformation CooT[D(-lambda)].
// Feeds field-oriented components with unit phasors of random angles (and a
// few extreme words that drive the outputs into saturation) and compares each
// stator-frame result with a model worked out here in real arithmetic:
// sd = floor((d*cos - q*sin) / 2^15), sq = floor((d*sin + q*cos) / 2^15),
// each clamped to 16 bits.  Checks the one-clock latency and that back-to-back
// samples are accepted every clock.
module tb_coot_inv;
  import vc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  dq_t dq = '0;
  sample_t c = '0, s = '0;
  logic out_valid;
  ab_t ab;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  coot_inv dut (.clk, .rst_n, .in_valid, .dq_i(dq), .cos_i(c), .sin_i(s), .out_valid, .ab_o(ab));

  function automatic longint model(real x);
    real f;
    f = $floor(x / 32768.0);
    if (f > 32767.0) return 32767;
    if (f < -32768.0) return -32768;
    return longint'(f);
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
    real ang, esd, esq;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      dq.d = sample_t'($urandom);
      dq.q = sample_t'($urandom);
      if (n % 50 == 7) begin
        c = SAMPLE_MIN; s = SAMPLE_MIN;
        dq.d = SAMPLE_MIN; dq.q = SAMPLE_MAX;
      end else begin
        ang = real'($urandom_range(0, 62831)) / 10000.0;
        c = sample_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
        s = sample_t'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      end
      esd = real'(dq.d) * real'(c) - real'(dq.q) * real'(s);
      esq = real'(dq.d) * real'(s) + real'(dq.q) * real'(c);
      @(posedge clk);
      #1;
      check("out_valid latency", 64'(out_valid), 64'(in_valid));
      if (in_valid) begin
        check("sd", longint'(ab.sd), model(esd));
        check("sq", longint'(ab.sq), model(esq));
        if (esd / 32768.0 >= 32768.0 || esq / 32768.0 >= 32768.0 ||
            esd / 32768.0 < -32768.0 || esq / 32768.0 < -32768.0) n_sat++;
      end
    end
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: output saturation never exercised");
    end
    $display("saturated samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
