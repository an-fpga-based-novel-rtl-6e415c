// tb_dstatcom_unbalanced: closed-loop test of the DSTATCOM controller with an
// unbalanced load, at the controller's default parameters.
//
// The load is the diode-bridge R-L load (20 ohm, 10 mH, no step) plus a
// floating-neutral star R-L load with 15, 30 and 60 ohm and 10 mH per phase,
// fed from the distorted 50 V rms source of dstatcom_plant. The controller
// should draw balanced, sinusoidal source currents in phase with the phase
// voltages, leaving the unbalance and harmonics to the DSTATCOM.
// Checks over the final 40 ms (two cycles), per phase: load fundamentals
// unbalanced; source fundamentals equal within 5 %; power factor > 0.99;
// source THD < 10 % and well below load THD; dc link regulated.
`timescale 1ns/1ps
module tb_dstatcom_unbalanced;
  import dstatcom_pkg::*;

  localparam real TCLK  = 10.0e-9;
  localparam real T_END = 0.2;
  localparam longint N_CYC = longint'(T_END / TCLK);
  localparam real PI_R  = 3.14159265358979;
  localparam real W0    = 2.0 * PI_R * 50.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_tick;
  sample_t vtab, vtcb, vdc_s;
  sample_t [2:0] is_meas;
  logic [5:0] g;
  ctrl_mon_t mon;

  dstatcom_ctrl dut (.clk, .rst_n, .sample_tick, .vtab, .vtcb, .vdc(vdc_s), .is_meas, .g, .mon);
  dstatcom_plant #(.T_STEP_ON(1.0), .T_STEP_OFF(1.0), .R_UNB_A(15.0), .R_UNB_B(30.0), .R_UNB_C(60.0))
    plant (.clk, .g, .vtab, .vtcb, .vdc_s, .is_s(is_meas));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real sc[3], ss[3], sq[3], lc[3], ls[3], lq[3], vq[3], pp[3];
  real vdc_min = 1.0e9, vdc_max = -1.0e9;
  int nwin = 0;
  initial for (int k = 0; k < 3; k++) begin
    sc[k] = 0; ss[k] = 0; sq[k] = 0; lc[k] = 0; ls[k] = 0; lq[k] = 0; vq[k] = 0; pp[k] = 0;
  end

  always @(posedge clk) begin
    if (rst_n && sample_tick) begin
      real tt;
      tt = real'(cyc) * TCLK;
      if (tt > 0.14) begin
        if (plant.vdc < vdc_min) vdc_min = plant.vdc;
        if (plant.vdc > vdc_max) vdc_max = plant.vdc;
      end
      if (tt >= T_END - 0.04) begin
        nwin++;
        for (int k = 0; k < 3; k++) begin
          real c, sn, ph, il;
          ph = W0 * tt - real'(k) * 2.0 * PI_R / 3.0;
          c = $cos(ph); sn = $sin(ph);
          il = plant.il[k] + plant.iu[k];
          sc[k] += plant.isrc[k] * c; ss[k] += plant.isrc[k] * sn; sq[k] += plant.isrc[k] ** 2;
          lc[k] += il * c; ls[k] += il * sn; lq[k] += il ** 2;
          vq[k] += plant.vs[k] ** 2;
          pp[k] += plant.vs[k] * plant.isrc[k];
        end
      end
    end
  end

  function automatic real thd(real cs, real sn, real q, int n);
    real f2, t2;
    f2 = 2.0 * (cs * cs + sn * sn) / (real'(n) * real'(n));
    t2 = q / real'(n);
    if (t2 <= f2) return 0.0;
    return $sqrt((t2 - f2) / f2) * 100.0;
  endfunction

  initial begin
    real as[3], al[3], th_s[3], th_l[3], pf[3], amax, amin, lmax, lmin;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    wait (cyc >= N_CYC);
    @(posedge clk);
    amax = 0; amin = 1e9; lmax = 0; lmin = 1e9;
    for (int k = 0; k < 3; k++) begin
      as[k] = 2.0 * $sqrt(sc[k] ** 2 + ss[k] ** 2) / real'(nwin);
      al[k] = 2.0 * $sqrt(lc[k] ** 2 + ls[k] ** 2) / real'(nwin);
      th_s[k] = thd(sc[k], ss[k], sq[k], nwin);
      th_l[k] = thd(lc[k], ls[k], lq[k], nwin);
      pf[k] = (pp[k] / real'(nwin)) / ($sqrt(vq[k] / real'(nwin)) * $sqrt(sq[k] / real'(nwin)));
      if (as[k] > amax) amax = as[k];
      if (as[k] < amin) amin = as[k];
      if (al[k] > lmax) lmax = al[k];
      if (al[k] < lmin) lmin = al[k];
      $display("phase %0d: load fund %0.2f A THD %0.2f %%, source fund %0.2f A THD %0.2f %% pf %0.4f",
               k, al[k], th_l[k], as[k], th_s[k], pf[k]);
      check(pf[k] > 0.99, $sformatf("phase %0d power factor %0.4f", k, pf[k]));
      check(th_s[k] < 10.0 && th_s[k] < th_l[k] / 2.0, $sformatf("phase %0d source THD %0.2f", k, th_s[k]));
    end
    $display("Vdc in [%0.2f, %0.2f] V, P_lav %0.1f W", vdc_min, vdc_max, real'(mon.p_lav) / 65536.0);
    check((lmax - lmin) / lmax > 0.1, "load is not unbalanced");
    check((amax - amin) / amax < 0.05, $sformatf("source currents unbalanced: %0.2f..%0.2f A", amin, amax));
    check(vdc_min > 125.0 && vdc_max < 150.0, "dc-link voltage not regulated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_CYC + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
