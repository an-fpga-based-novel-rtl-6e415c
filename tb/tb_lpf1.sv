// tb_lpf1: self-checking test of the LPF1 6th-order Butterworth filter.
//
// The expected output comes from a floating-point model that designs the
// same filter on its own (bilinear transform of the 6th-order analog
// Butterworth prototype, fc = 100 Hz, fs = 50 kHz) and runs the cascade in
// double precision. The stimulus is a 70.7 V 50 Hz sine plus a 20 % 5th
// harmonic and a dc offset. Checks: every output sample against the model,
// the latency of ten clocks from in_valid to out_valid, unity dc
// gain, and 5th-harmonic attenuation measured by a one-cycle Fourier sum.
`timescale 1ns/1ps
module tb_lpf1;
  import dstatcom_pkg::*;

  localparam real PI_R = 3.14159265358979;
  localparam real FS = 50000.0;
  localparam int  NS = 7500;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  sample_t x, y;
  lpf1 dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  always #5 clk = ~clk;

  // latency in clocks from the cycle in_valid is high to the cycle out_valid is
  int cyc = 0, t_in = 0, lat_meas = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) t_in <= cyc;
    if (out_valid) lat_meas <= cyc - t_in;
  end

  int checks = 0, failures = 0;
  real kk[3], a1[3], a2[3];
  real w1[3], w2[3];

  function automatic real model_step(real xin);
    real v, w;
    v = xin;
    for (int s = 0; s < 3; s++) begin
      w = kk[s] * v - a1[s] * w1[s] - a2[s] * w2[s];
      v = w + 2.0 * w1[s] + w2[s];
      w2[s] = w1[s];
      w1[s] = w;
    end
    return v;
  endfunction

  initial begin
    real K, Wc, c, a0, xin, ym, err, maxerr, c1, s1, c5, s5, th[3];
    K = 2.0 * FS;
    Wc = K * $tan(PI_R * 100.0 / FS);
    th[0] = 15.0; th[1] = 75.0; th[2] = 45.0;
    for (int s = 0; s < 3; s++) begin
      c = $cos(th[s] * PI_R / 180.0);
      a0 = K * K + 2.0 * c * Wc * K + Wc * Wc;
      a1[s] = 2.0 * (Wc * Wc - K * K) / a0;
      a2[s] = (K * K - 2.0 * c * Wc * K + Wc * Wc) / a0;
      kk[s] = Wc * Wc / a0;
      w1[s] = 0.0; w2[s] = 0.0;
    end
    maxerr = 0.0; c1 = 0; s1 = 0; c5 = 0; s5 = 0;
    x = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      real ph;
      ph = 2.0 * PI_R * 50.0 * real'(n) / FS;
      xin = (n < 5000) ? 70.71 * $sin(ph) + 14.14 * $sin(5.0 * ph) : 50.0;
      x <= sample_t'(longint'(xin * 65536.0));
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      ym = model_step(real'(sample_t'(longint'(xin * 65536.0))) / 65536.0);
      while (!out_valid) @(posedge clk);
      @(negedge clk);
      if (n < 3) begin
        checks++;
        if (lat_meas != 10) begin failures++; $display("FAIL latency %0d", lat_meas); end
      end
      err = real'(y) / 65536.0 - ym;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 1.0e-3) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%f model=%f", n, real'(y) / 65536.0, ym);
      end
      if (n >= 4000 && n < 5000) begin
        c1 += real'(y) * $cos(ph); s1 += real'(y) * $sin(ph);
        c5 += real'(y) * $cos(5.0 * ph); s5 += real'(y) * $sin(5.0 * ph);
      end
      repeat (2) @(posedge clk);
    end
    begin
      real a1m, a5m;
      a1m = 2.0 * $sqrt(c1 * c1 + s1 * s1) / 1000.0 / 65536.0;
      a5m = 2.0 * $sqrt(c5 * c5 + s5 * s5) / 1000.0 / 65536.0;
      $display("max error %g V, 50 Hz amplitude %f, 250 Hz amplitude %f, dc out %f",
               maxerr, a1m, a5m, real'(y) / 65536.0);
      checks++; if (a1m < 70.6 || a1m > 70.8) begin failures++; $display("FAIL fundamental gain"); end
      checks++; if (a5m > 0.1) begin failures++; $display("FAIL 5th harmonic not attenuated"); end
      checks++; if (real'(y) / 65536.0 < 49.9 || real'(y) / 65536.0 > 50.1) begin failures++; $display("FAIL dc gain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
