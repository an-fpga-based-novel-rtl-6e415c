// uvrc: unit-vector and reference-current generator.
//
// The phase angle psph of the positive sequence voltage is measured after
// LPF1 and therefore lags the real PCC voltage by the filter's phase delay
// phi_f at 50 Hz. The unit templates are advanced by that delay (the phase
// delay compensation idea of the controller):
//   U_a1 = sin(psph + pi/2 + phi_f) = cos(psph + phi_f)
//   U_b1 = sin(psph - pi/6 + phi_f) = -1/2 U_a1 + sqrt(3)/2 S
//   U_c1 = sin(psph + 7pi/6 + phi_f) = -1/2 U_a1 - sqrt(3)/2 S
// with S = sin(psph + phi_f), and the reference source currents are
// i*_k = I_sm * U_k1. As in the reference datapath, a CORDIC produces
// cos/sin of psph, a constant rotation by (cos phi_f, sin phi_f) adds phi_f,
// and fixed -1/2 and sqrt(3)/2 products form the other two phases.
// phi_f = 114.52 deg is the lag of the LPF1 built here (dstatcom_pkg).
//
// Interface: psph (angle_t) and ism (sample_t) are read on start. uvec and
// iref are indexed 0 = a, 1 = b, 2 = c. Timing: done pulses ITER+4 clocks
// after start; outputs are held until the next done.
module uvrc
  import dstatcom_pkg::*;
#(
  parameter real COS_PHIF = PHI_F_COS,
  parameter real SIN_PHIF = PHI_F_SIN,
  parameter int  ITER     = 28
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  angle_t        psph,
  input  sample_t       ism,
  output unit_t [2:0]   uvec,
  output sample_t [2:0] iref,
  output logic          done
);

  localparam unit_t CF_Q = to_unit(COS_PHIF);
  localparam unit_t SF_Q = to_unit(SIN_PHIF);
  localparam int PW = 2 * UW + 2;
  localparam int IW = SW + UW;

  unit_t   c0, s0;                  // cos, sin of psph
  logic    cd;
  sample_t ism_q;
  unit_t   ca, sa;                  // cos, sin of psph + phi_f
  logic    st1, st2;

  cordic_rot #(.ITER(ITER)) u_sincos (
    .clk, .rst_n, .start, .theta(psph), .cos_o(c0), .sin_o(s0), .done(cd));

  logic signed [PW-1:0] rc, rs, pb, pc;
  logic signed [IW-1:0] ia, ib, ic;
  unit_t                ub, uc;
  always_comb begin
    rc = PW'(c0) * PW'(CF_Q) - PW'(s0) * PW'(SF_Q);
    rs = PW'(s0) * PW'(CF_Q) + PW'(c0) * PW'(SF_Q);
    pb = PW'(sa) * PW'(UNIT_SQRT3_HALF);
    pc = -(PW'(ca) <<< (UF - 1));       // -1/2 * ca, in the product scale
    ub = unit_t'((pc + pb) >>> UF);
    uc = unit_t'((pc - pb) >>> UF);
    ia = IW'(ism_q) * IW'(uvec[0]);
    ib = IW'(ism_q) * IW'(uvec[1]);
    ic = IW'(ism_q) * IW'(uvec[2]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ism_q <= '0;
      ca    <= '0;
      sa    <= '0;
      uvec  <= '0;
      iref  <= '0;
      st1   <= 1'b0;
      st2   <= 1'b0;
      done  <= 1'b0;
    end else begin
      st1  <= cd;
      st2  <= st1;
      done <= st2;
      if (start) ism_q <= ism;
      if (cd) begin
        ca <= unit_t'(rc >>> UF);
        sa <= unit_t'(rs >>> UF);
      end
      if (st1) begin
        uvec[0] <= ca;
        uvec[1] <= ub;
        uvec[2] <= uc;
      end
      if (st2) begin
        iref[0] <= sample_t'(ia >>> UF);
        iref[1] <= sample_t'(ib >>> UF);
        iref[2] <= sample_t'(ic >>> UF);
      end
    end
  end

endmodule
