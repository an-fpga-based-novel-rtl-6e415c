// tb_uvrc: self-checking test of the unit-vector and reference-current block.
//
// The compensation angle phi_f is derived here independently: the testbench
// designs the 6th-order Butterworth LPF (fc 100 Hz, fs 50 kHz) and evaluates
// its phase at 50 Hz. For random psph in (-pi, pi] and I_sm in +/-20 A the
// expected outputs are
//   U_a1 = sin(psph + pi/2 + phi_f), U_b1 = sin(psph - pi/6 + phi_f),
//   U_c1 = sin(psph + 7pi/6 + phi_f), i*_k = I_sm U_k1.
// Checks every output and the 32-clock latency from start to done.
`timescale 1ns/1ps
module tb_uvrc;
  import dstatcom_pkg::*;

  localparam real PI_R = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  angle_t psph;
  sample_t ism;
  unit_t [2:0] uvec;
  sample_t [2:0] iref;
  uvrc dut (.clk, .rst_n, .start, .psph, .ism, .uvec, .iref, .done);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, lat = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) t_start <= cyc;
    if (done) lat <= cyc - t_start;
  end

  real phif;

  // phase of the Butterworth cascade at 50 Hz, by complex arithmetic
  function automatic real lpf_phase();
    real K, Wc, c, a0, a1, a2, w, ph, th[3], nr, ni, dr, di;
    K = 2.0 * 50000.0;
    Wc = K * $tan(PI_R * 100.0 / 50000.0);
    w = 2.0 * PI_R * 50.0 / 50000.0;
    th[0] = 15.0; th[1] = 75.0; th[2] = 45.0;
    ph = 0.0;
    for (int s = 0; s < 3; s++) begin
      c = $cos(th[s] * PI_R / 180.0);
      a0 = K * K + 2.0 * c * Wc * K + Wc * Wc;
      a1 = 2.0 * (Wc * Wc - K * K) / a0;
      a2 = (K * K - 2.0 * c * Wc * K + Wc * Wc) / a0;
      nr = 1.0 + 2.0 * $cos(w) + $cos(2.0 * w);
      ni = -2.0 * $sin(w) - $sin(2.0 * w);
      dr = 1.0 + a1 * $cos(w) + a2 * $cos(2.0 * w);
      di = -a1 * $sin(w) - a2 * $sin(2.0 * w);
      ph = ph + $atan2(ni, nr) - $atan2(di, dr);
    end
    while (ph < -PI_R) ph += 2.0 * PI_R;
    return ph;
  endfunction

  task automatic run(input real th, input real im);
    real eu[3], g;
    psph <= angle_t'(longint'(th * 268435456.0));
    ism <= sample_t'(longint'(im * 65536.0));
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk);
    eu[0] = $sin(th + PI_R / 2.0 + phif);
    eu[1] = $sin(th - PI_R / 6.0 + phif);
    eu[2] = $sin(th + 7.0 * PI_R / 6.0 + phif);
    for (int k = 0; k < 3; k++) begin
      g = real'(uvec[k]) / 1073741824.0;
      checks++;
      if (g - eu[k] > 2e-6 || eu[k] - g > 2e-6) begin
        failures++;
        $display("FAIL U%0d th=%f got %f expected %f", k, th, g, eu[k]);
      end
      g = real'(iref[k]) / 65536.0;
      checks++;
      if (g - im * eu[k] > 1e-3 || im * eu[k] - g > 1e-3) begin
        failures++;
        $display("FAIL iref%0d got %f expected %f", k, g, im * eu[k]);
      end
    end
    checks++;
    if (lat != 32) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    phif = -lpf_phase();
    $display("LPF1 phase lag at 50 Hz: %f rad", phif);
    psph = '0; ism = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++)
      run((real'($urandom % 2000000) / 1000000.0 - 1.0) * PI_R,
          (real'($urandom % 40000) - 20000.0) / 1000.0);
    run(PI_R, 7.0);
    run(-PI_R / 2.0, 7.0);
    run(PI_R / 2.0, -3.0);
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
