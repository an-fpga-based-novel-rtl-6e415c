// tb_dstatcom_ctrl: closed-loop, end-to-end test of the DSTATCOM controller
// at its default parameters (100 MHz clock, 50 kHz sampling).
//
// The power circuit is the behavioural model dstatcom_plant: a 50 V rms
// source with a 3 % 5th harmonic, a diode-bridge R-L load whose resistance
// steps from 20 ohm to 12 ohm between 0.08 s and 0.14 s, and the VSC with
// Lf = 1.8 mH, Rf = 0.1 ohm, Cdc = 2100 uF precharged to 130 V.
//
// Checks: gate pairs always complementary; one sample strobe per 2000
// clocks; no leg switching more than once per sample (25 kHz at most); positive sequence magnitude and reference-current amplitude
// consistent with the source voltage and P_lav; reference current in phase
// with the source voltage; dc-link voltage regulated; source-current THD far
// below load-current THD and unity power factor in the final 40 ms.
// Mechanisms counted (each must occur): upper-switch turn-on and turn-off per
// leg, state held inside the band, divide-by-zero guard after reset,
// P_lav rising and falling with the load step.
`timescale 1ns/1ps
module tb_dstatcom_ctrl;
  import dstatcom_pkg::*;

  localparam real TCLK   = 10.0e-9;
  localparam int  PSTEP  = 100;                  // clocks per plant step
  localparam real T_END  = 0.24;
  localparam longint N_CYC = longint'(T_END / TCLK);
  localparam real PI_R   = 3.14159265358979;
  localparam real W0     = 2.0 * PI_R * 50.0;
  localparam real VM     = 50.0 * 1.41421356237;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_tick;
  sample_t vtab, vtcb, vdc_s;
  sample_t [2:0] is_meas;
  logic [5:0] g;
  ctrl_mon_t mon;

  dstatcom_ctrl dut (.clk, .rst_n, .sample_tick, .vtab, .vtcb, .vdc(vdc_s), .is_meas, .g, .mon);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real r(sample_t x);
    return real'(x) / 65536.0;
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- power circuit ----
  dstatcom_plant #(.STEP_CLKS(PSTEP), .TCLK(TCLK)) plant (
    .clk, .g, .vtab, .vtcb, .vdc_s, .is_s(is_meas));

  // ---- checks and mechanism counters ----
  int n_on[3], n_off[3], n_hold;
  int n_divzero, n_ticks, n_p_up, n_p_down;
  logic [5:0] g_prev;
  longint last_tick = -1;
  longint last_sw[3] = '{-1, -1, -1};
  longint min_sw = 1000000000;
  real p_prev = 0.0;
  // Fourier sums over the final window
  localparam real T_WIN0 = T_END - 0.04;
  real sa_c, sa_s, sa_sq, la_c, la_s, la_sq, va_c, va_s, va_sq, ra_c, ra_s, pa;
  int nwin = 0;
  real vdc_min_ss = 1.0e9, vdc_max_ss = -1.0e9;
  real psmag_err_max = 0.0, ism_err_max = 0.0;

  initial begin
    for (int k = 0; k < 3; k++) begin n_on[k] = 0; n_off[k] = 0; end
    n_hold = 0; n_divzero = 0; n_ticks = 0; n_p_up = 0; n_p_down = 0;
    sa_c = 0; sa_s = 0; sa_sq = 0; la_c = 0; la_s = 0; la_sq = 0;
    va_c = 0; va_s = 0; va_sq = 0; ra_c = 0; ra_s = 0; pa = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // complementary gate pairs: (g1,g4) (g3,g6) (g5,g2)
      if (g[0] == g[3] || g[2] == g[5] || g[4] == g[1]) begin
        check(1'b0, $sformatf("gate pair not complementary at cycle %0d: %b", cyc, g));
      end
      for (int k = 0; k < 3; k++) begin
        if (g[2*k] && !g_prev[2*k]) n_on[k]++;
        if (!g[2*k] && g_prev[2*k]) n_off[k]++;
        // at most one change per 2000-clock sample: switching <= 25 kHz
        if (g[2*k] != g_prev[2*k]) begin
          if (last_sw[k] >= 0 && cyc - last_sw[k] < min_sw) min_sw = cyc - last_sw[k];
          last_sw[k] = cyc;
        end
      end
      g_prev <= g;
      if (mon.div_zero) n_divzero++;
      if (sample_tick) begin
        real tt, p_now, err;
        n_ticks++;
        if (last_tick >= 0 && cyc - last_tick != 2000)
          check(1'b0, $sformatf("sample period %0d clocks", cyc - last_tick));
        last_tick <= cyc;
        tt = real'(cyc) * TCLK;
        p_now = r(mon.p_lav);
        if (p_now > p_prev + 1e-6) n_p_up++;
        if (p_now < p_prev - 1e-6) n_p_down++;
        p_prev = p_now;
        // inside-band hold: error within +/-HB (the state cannot change)
        err = r(is_meas[0]) - r(mon.iref[0]);
        if (err < 0.25 && err > -0.25) n_hold++;
        if (tt > 0.06) begin
          // V_m1+ of a balanced 50 V rms set is half the phase peak
          err = r(mon.psmag) - VM / 2.0 * 0.99988;
          if (err < 0) err = -err;
          if (err > psmag_err_max) psmag_err_max = err;
          // I_sm = P_lav / V_m1+
          if (mon.psmag > 0) begin
            err = r(mon.ism) - p_now / r(mon.psmag);
            if (err < 0) err = -err;
            if (err > ism_err_max) ism_err_max = err;
          end
        end
        if (tt > 0.17) begin
          if (plant.vdc < vdc_min_ss) vdc_min_ss = plant.vdc;
          if (plant.vdc > vdc_max_ss) vdc_max_ss = plant.vdc;
        end
        if (tt >= T_WIN0) begin
          real c, sn, ph;
          ph = W0 * tt;
          c = $cos(ph); sn = $sin(ph);
          nwin++;
          sa_c += plant.isrc[0] * c; sa_s += plant.isrc[0] * sn; sa_sq += plant.isrc[0] * plant.isrc[0];
          la_c += plant.il[0] * c;   la_s += plant.il[0] * sn;   la_sq += plant.il[0] * plant.il[0];
          va_c += plant.vs[0] * c;   va_s += plant.vs[0] * sn;   va_sq += plant.vs[0] * plant.vs[0];
          ra_c += r(mon.iref[0]) * c; ra_s += r(mon.iref[0]) * sn;
          pa += plant.vs[0] * plant.isrc[0];
        end
      end
    end else begin
      g_prev <= g;
    end
  end

  function automatic real thd(real cs, real sn, real sq, int n);
    real f2, t2;
    f2 = 2.0 * ((cs * cs + sn * sn) * 4.0 / (real'(n) * real'(n))) / 4.0; // fundamental rms^2
    t2 = sq / real'(n);
    if (t2 <= f2) return 0.0;
    return $sqrt((t2 - f2) / f2) * 100.0;
  endfunction

  initial begin
    real thd_s, thd_l, pf, ang_v, ang_r, dang, i1;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    wait (cyc >= N_CYC);
    @(posedge clk);
    thd_s = thd(sa_c, sa_s, sa_sq, nwin);
    thd_l = thd(la_c, la_s, la_sq, nwin);
    pf = (pa / real'(nwin)) / ($sqrt(va_sq / real'(nwin)) * $sqrt(sa_sq / real'(nwin)));
    ang_v = $atan2(va_s, va_c);
    ang_r = $atan2(ra_s, ra_c);
    dang = ang_r - ang_v;
    if (dang > PI_R) dang -= 2.0 * PI_R;
    if (dang < -PI_R) dang += 2.0 * PI_R;
    i1 = 2.0 * $sqrt(sa_c * sa_c + sa_s * sa_s) / real'(nwin);
    $display("final window: load THD %0.2f %%, source THD %0.2f %%, pf %0.4f, i_s1 peak %0.2f A",
             thd_l, thd_s, pf, i1);
    $display("iref-va angle %0.4f rad, Vdc in [%0.2f, %0.2f] V, P_lav %0.1f W, psmag err %0.4f V, ism err %0.4f A",
             dang, vdc_min_ss, vdc_max_ss, r(mon.p_lav), psmag_err_max, ism_err_max);
    $display("mechanisms: on %0d/%0d/%0d off %0d/%0d/%0d hold %0d divzero %0d ticks %0d p_up %0d p_down %0d",
             n_on[0], n_on[1], n_on[2], n_off[0], n_off[1], n_off[2], n_hold, n_divzero, n_ticks, n_p_up, n_p_down);
    check(thd_l > 20.0, "load current should be distorted");
    check(thd_s < 10.0 && thd_s < thd_l / 2.0, $sformatf("source THD %0.2f %% too high", thd_s));
    check(pf > 0.99, $sformatf("power factor %0.4f", pf));
    check(dang < 0.01 && dang > -0.01, $sformatf("reference current phase error %0.4f rad", dang));
    check(vdc_min_ss > 125.0 && vdc_max_ss < 150.0, "dc-link voltage not regulated");
    check(psmag_err_max < 0.2, $sformatf("psmag error %0.4f V", psmag_err_max));
    check(ism_err_max < 0.01, $sformatf("I_sm error %0.4f A", ism_err_max));
    check(i1 > 4.0 && i1 < 12.0, $sformatf("source fundamental %0.2f A out of range", i1));
    check(n_ticks > int'(T_END * 50000.0) - 2, "too few sample strobes");
    for (int k = 0; k < 3; k++) begin
      check(n_on[k] > 0, $sformatf("leg %0d never turned on", k));
      check(n_off[k] > 0, $sformatf("leg %0d never turned off", k));
    end
    check(n_hold > 0, "hysteresis hold never seen");
    check(min_sw >= 2000, $sformatf("a leg switched twice within %0d clocks", min_sw));
    $display("shortest interval between switchings of one leg: %0d clocks", min_sw);
    check(n_divzero > 0, "divide-by-zero guard never used");
    check(n_p_up > 0 && n_p_down > 0, "P_lav never moved both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (N_CYC + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
