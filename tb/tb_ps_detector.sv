// tb_ps_detector: self-checking test of the positive sequence detector.
//
// Case 1: balanced three-phase sets of random peak V and angle theta
// (v_a = V cos theta); the positive sequence magnitude must be V/2 and the
// phase theta. Case 2: random, unbalanced line voltages, checked against the
// detector formulas evaluated in floating point,
//   psmag = sqrt((v_ab - v_cb/2)^2 + (sqrt(3)/2 v_cb)^2)/3,
//   psph  = atan2(-sqrt(3)/2 v_cb, v_ab - v_cb/2).
// Also checks the 35-clock latency from start to done.
`timescale 1ns/1ps
module tb_ps_detector;
  import dstatcom_pkg::*;

  localparam real PI_R = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  sample_t vab, vcb, psmag;
  angle_t psph;
  ps_detector dut (.clk, .rst_n, .start, .vab, .vcb, .psmag, .psph, .done);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  int cyc = 0, t_start = 0, lat = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) t_start <= cyc;
    if (done) lat <= cyc - t_start;
  end

  task automatic run(input real ab, input real cb, input real emag, input real eph);
    real gm, gp, dp;
    vab <= sample_t'(longint'(ab * 65536.0));
    vcb <= sample_t'(longint'(cb * 65536.0));
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk);
    gm = real'(psmag) / 65536.0;
    gp = real'(psph) / 268435456.0;
    dp = gp - eph;
    if (dp > PI_R) dp -= 2.0 * PI_R;
    if (dp < -PI_R) dp += 2.0 * PI_R;
    checks++;
    if (fabs(gm - emag) > 1e-3 + 1e-5 * emag) begin
      failures++;
      $display("FAIL mag got %f expected %f (vab %f vcb %f)", gm, emag, ab, cb);
    end
    checks++;
    if (fabs(dp) > 1e-5 && emag > 0.01) begin
      failures++;
      $display("FAIL phase got %f expected %f", gp, eph);
    end
    checks++;
    if (lat != 35) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    vab = '0; vcb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      real v, th, va, vb, vc;
      v = 1.0 + real'($urandom % 200000) / 1000.0;
      th = (real'($urandom % 2000000) / 1000000.0 - 1.0) * PI_R;
      va = v * $cos(th);
      vb = v * $cos(th - 2.0 * PI_R / 3.0);
      vc = v * $cos(th + 2.0 * PI_R / 3.0);
      run(va - vb, vc - vb, v / 2.0, th);
    end
    for (int n = 0; n < 200; n++) begin
      real ab, cb, x, y;
      ab = (real'($urandom % 600000) - 300000.0) / 1000.0;
      cb = (real'($urandom % 600000) - 300000.0) / 1000.0;
      x = ab - cb / 2.0;
      y = -$sqrt(3.0) / 2.0 * cb;
      run(ab, cb, $sqrt(x * x + y * y) / 3.0, $atan2(y, x));
    end
    // exact axes, including the negative real axis (phase pi)
    run(-100.0, 0.0, 100.0 / 3.0, PI_R);
    run(100.0, 0.0, 100.0 / 3.0, 0.0);
    run(0.0, 0.0, 0.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
