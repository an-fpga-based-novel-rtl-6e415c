// dstatcom_plant: behavioural model of the power circuit around the DSTATCOM
// controller, for closed-loop testbenches. Not synthesizable (real numbers).
//
// Parts modelled, integrated by forward Euler every STEP_CLKS clocks:
//  - stiff three-phase source, 50 V rms line-to-neutral, 50 Hz, with a 3 %
//    5th harmonic (so the PCC voltage is distorted);
//  - six-diode bridge with an R-L load (R_L, 10 mH): dc current Id obeys
//    L dId/dt = v_rect - R Id and is steered into the phases with the highest
//    and lowest voltage, commutation smoothed by a 0.3 ms first-order lag that
//    stands for the ac-side inductance; R_L is R_STEP between T_STEP_ON and
//    T_STEP_OFF, else 20 ohm;
//  - optional star-connected, floating-neutral linear R-L load with per-phase
//    resistances R_UNB (0 disables it), 10 mH each;
//  - VSC: v_f = Vdc/3*[2 -1 -1; -1 2 -1; -1 -1 2]*g_upper, Lf di_f/dt =
//    -Rf i_f + v_s - v_f (1.8 mH, 0.1 ohm), i_f flowing from the PCC into the
//    converter, Cdc dVdc/dt = sum(g_k i_fk) (2100 uF, starting at VDC0).
// Source current i_s = i_L + i_f. Outputs are reals for the testbench and
// sample_t values for the controller.
`timescale 1ns/1ps
module dstatcom_plant
  import dstatcom_pkg::*;
#(
  parameter int  STEP_CLKS  = 100,
  parameter real TCLK       = 10.0e-9,
  parameter real VDC0       = 130.0,
  parameter real R_STEP     = 12.0,
  parameter real T_STEP_ON  = 0.08,
  parameter real T_STEP_OFF = 0.14,
  parameter real R_UNB_A    = 0.0,
  parameter real R_UNB_B    = 0.0,
  parameter real R_UNB_C    = 0.0
) (
  input  logic          clk,
  input  logic [5:0]    g,
  output sample_t       vtab,
  output sample_t       vtcb,
  output sample_t       vdc_s,
  output sample_t [2:0] is_s
);

  localparam real DT    = TCLK * real'(STEP_CLKS);
  localparam real PI_R  = 3.14159265358979;
  localparam real W0    = 2.0 * PI_R * 50.0;
  localparam real VM    = 50.0 * 1.41421356237;
  localparam real LF_H  = 1.8e-3;
  localparam real RF_O  = 0.1;
  localparam real CDC   = 2100.0e-6;
  localparam real LL    = 10.0e-3;
  localparam real TCOM  = 0.3e-3;
  localparam bit  UNB   = (R_UNB_A > 0.0);

  real t = 0.0;
  real vs[3], ifl[3], il[3], iu[3], isrc[3];
  real vdc = VDC0;
  real id_load = 0.0;
  real rload = 20.0;
  real runb[3];

  function automatic real srcv(int k, real tt);
    real ph;
    ph = W0 * tt - real'(k) * 2.0 * PI_R / 3.0;
    return VM * ($cos(ph) + 0.03 * $cos(5.0 * ph));
  endfunction

  function automatic sample_t s(real r);
    return sample_t'(longint'(r * 65536.0));
  endfunction

  initial begin
    runb[0] = R_UNB_A; runb[1] = R_UNB_B; runb[2] = R_UNB_C;
    for (int k = 0; k < 3; k++) begin
      ifl[k] = 0.0; il[k] = 0.0; iu[k] = 0.0; isrc[k] = 0.0;
      vs[k] = srcv(k, 0.0);
    end
  end

  always_comb begin
    vtab  = s(vs[0] - vs[1]);
    vtcb  = s(vs[2] - vs[1]);
    vdc_s = s(vdc);
    for (int k = 0; k < 3; k++) is_s[k] = s(isrc[k]);
  end

  longint cyc = 0;
  always @(posedge clk) begin
    real vf[3], gu[3], gsum, idc, vn;
    int imax, imin;
    cyc <= cyc + 1;
    if (cyc % STEP_CLKS == 0) begin
      t = real'(cyc) * TCLK;
      rload = (t >= T_STEP_ON && t < T_STEP_OFF) ? R_STEP : 20.0;
      for (int k = 0; k < 3; k++) vs[k] = srcv(k, t);
      // diode bridge
      imax = 0; imin = 0;
      for (int k = 1; k < 3; k++) begin
        if (vs[k] > vs[imax]) imax = k;
        if (vs[k] < vs[imin]) imin = k;
      end
      id_load = id_load + DT * ((vs[imax] - vs[imin]) - rload * id_load) / LL;
      if (id_load < 0.0) id_load = 0.0;
      for (int k = 0; k < 3; k++) begin
        real tgt;
        tgt = (k == imax) ? id_load : ((k == imin) ? -id_load : 0.0);
        il[k] = il[k] + DT / TCOM * (tgt - il[k]);
      end
      // unbalanced linear load, floating neutral
      if (UNB) begin
        vn = 0.0;
        for (int k = 0; k < 3; k++) vn = vn + vs[k] - runb[k] * iu[k];
        vn = vn / 3.0;
        for (int k = 0; k < 3; k++) iu[k] = iu[k] + DT * (vs[k] - vn - runb[k] * iu[k]) / LL;
      end
      // VSC
      gu[0] = real'(g[0]); gu[1] = real'(g[2]); gu[2] = real'(g[4]);
      gsum = gu[0] + gu[1] + gu[2];
      idc = 0.0;
      for (int k = 0; k < 3; k++) begin
        vf[k] = vdc / 3.0 * (3.0 * gu[k] - gsum);
        idc = idc + gu[k] * ifl[k];
      end
      for (int k = 0; k < 3; k++) ifl[k] = ifl[k] + DT * (-RF_O * ifl[k] + vs[k] - vf[k]) / LF_H;
      vdc = vdc + DT * idc / CDC;
      for (int k = 0; k < 3; k++) isrc[k] = il[k] + iu[k] + ifl[k];
    end
  end

endmodule
