// dstatcom_ctrl: all-on-chip DSTATCOM controller (ISCAP-PDC, P_max form).
//
// Every sample period (50 kHz) the controller reads the two PCC line
// voltages v_tab and v_tcb, the dc-link voltage v_dc and the three source
// currents, and updates the six VSC gate signals so that the source supplies
// only a sinusoidal, in-phase current whose amplitude covers the load's
// average active power; the DSTATCOM supplies harmonics and reactive power.
//
// Per sample the chain is:
//   sample_timer tick -> 2 x LPF1 (fundamental of v_tab, v_tcb)
//                      -> ps_detector (V_m1+, phase psph) and line_phase_conv
//   tick -> pi_controller (v_dc error -> P_lav)
//   ps_detector done -> ism_divider (I_sm = P_lav / V_m1+)
//   ism_divider done -> uvrc (unit vectors advanced by the LPF1 delay, x I_sm)
//   uvrc done -> hcc (compare source currents with references, HB = 0.25 A)
// This structure, the filter, the PI law, the detector formulas and the
// hysteresis rules follow the reference design; the serial arithmetic units,
// the number formats and the start/done sequencing are this design's own.
// One pass takes about 130 clocks, well inside the 2000-clock period at the
// assumed 100 MHz clock.
//
// Interface: sample_tick starts the external ADCs; the sampled values
// (sample_t, scaled to volts and amperes) must be valid while sample_tick is
// high. is_meas is indexed 0 = a, 1 = b, 2 = c. g[0..5] = g1..g6, legs a: g1/g4,
// b: g3/g6, c: g5/g2. mon carries the internal quantities for observation.
module dstatcom_ctrl
  import dstatcom_pkg::*;
#(
  parameter int  CLK_HZ  = 100_000_000,
  parameter int  FS_HZ   = 50_000,
  parameter real VDC_REF = 140.0,
  parameter real KP      = 30.0,
  parameter real KI      = 100.0,
  parameter real HB      = 0.25
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          sample_tick,
  input  sample_t       vtab,
  input  sample_t       vtcb,
  input  sample_t       vdc,
  input  sample_t [2:0] is_meas,
  output logic [5:0]    g,
  output ctrl_mon_t     mon
);

  // ---- sampling ----
  logic tick;
  sample_timer #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_timer (.clk, .rst_n, .tick);
  assign sample_tick = tick;

  sample_t [2:0] is_q;                  // source currents of this sample
  always_ff @(posedge clk) begin
    if (!rst_n)    is_q <= '0;
    else if (tick) is_q <= is_meas;
  end

  // ---- LPF1 on both line voltages ----
  sample_t vab_f, vcb_f;
  logic    f_valid, f_valid_b;
  lpf1 u_lpf_ab (.clk, .rst_n, .in_valid(tick), .x(vtab), .out_valid(f_valid),   .y(vab_f));
  lpf1 u_lpf_cb (.clk, .rst_n, .in_valid(tick), .x(vtcb), .out_valid(f_valid_b), .y(vcb_f));

  // ---- line to phase conversion (monitor) ----
  sample_t [2:0] vph;
  logic          vph_valid;
  line_phase_conv u_l2p (.clk, .rst_n, .en(f_valid && f_valid_b), .vab(vab_f), .vcb(vcb_f),
                         .vph, .valid(vph_valid));

  // ---- positive sequence detector ----
  sample_t psmag;
  angle_t  psph;
  logic    ps_done;
  ps_detector u_psd (.clk, .rst_n, .start(f_valid), .vab(vab_f), .vcb(vcb_f),
                     .psmag, .psph, .done(ps_done));

  // ---- dc-link PI controller ----
  sample_t p_lav;
  logic    pi_valid;
  pi_controller #(.VDC_REF(VDC_REF), .KP(KP), .KI(KI), .FS_HZ(FS_HZ)) u_pi (
    .clk, .rst_n, .en(tick), .vdc, .u(p_lav), .valid(pi_valid));

  // ---- I_sm = P_lav / V_m1+ ----
  sample_t ism;
  logic    div_done, div_zero;
  ism_divider u_div (.clk, .rst_n, .start(ps_done), .p(p_lav), .vm(psmag),
                     .ism, .done(div_done), .div_zero);

  // ---- unit vectors and reference currents ----
  unit_t   [2:0] uvec;
  sample_t [2:0] iref;
  logic          uv_done;
  uvrc u_uvrc (.clk, .rst_n, .start(div_done), .psph, .ism, .uvec, .iref, .done(uv_done));

  // ---- hysteresis current controller ----
  hcc #(.HB(HB)) u_hcc (.clk, .rst_n, .en(uv_done), .is_meas(is_q), .is_ref(iref), .g);

  // ---- monitor ----
  sample_t [2:0] vph_q;
  always_ff @(posedge clk) begin
    if (!rst_n)         vph_q <= '0;
    else if (vph_valid) vph_q <= vph;
  end

  always_comb begin
    mon.psmag    = psmag;
    mon.psph     = psph;
    mon.p_lav    = p_lav;
    mon.ism      = ism;
    mon.iref     = iref;
    mon.vph      = vph_q;
    mon.div_zero = div_zero;
  end

  // The whole chain must finish inside one sample period.
  logic busy_chain;
  always_ff @(posedge clk) begin
    if (!rst_n)       busy_chain <= 1'b0;
    else if (tick)    busy_chain <= 1'b1;
    else if (uv_done) busy_chain <= 1'b0;
  end
  a_chain_in_time: assert property (@(posedge clk) disable iff (!rst_n) tick |-> !busy_chain)
    else $error("control chain did not finish within one sample period");

  logic unused_ok;
  assign unused_ok = ^{f_valid_b, pi_valid, uvec};

endmodule
