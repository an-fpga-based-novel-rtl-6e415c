// dstatcom_pkg: number formats, shared constants and tables of the DSTATCOM
// controller.
//
// All analog quantities (volts, amperes, watts) travel as sample_t, a signed
// 32-bit fixed-point number with 16 fractional bits (range +/-32768, step
// 15 uV/uA/uW). Angles are radians as angle_t, signed 32-bit with 28
// fractional bits. Sines, cosines and unit vectors are unit_t, signed 32-bit
// with 30 fractional bits. These widths are this design's choice; the
// original controller was assembled from fixed-point library blocks with
// per-wire formats.
//
// LPF1 coefficients come from a bilinear-transform Butterworth design, order 6,
// cutoff fc = 100 Hz, sampling fs = 50 kHz, split into three second-order
// sections. With K = 2*fs, Wc = K*tan(pi*fc/fs) and the analog pole pair at
// angle theta (15, 75 and 45 degrees) from the negative real axis:
//   a0 = K^2 + 2*cos(theta)*Wc*K + Wc^2
//   a1 = 2*(Wc^2 - K^2)/a0,  a2 = (K^2 - 2*cos(theta)*Wc*K + Wc^2)/a0
//   k  = Wc^2/a0,            numerator 1 + 2 z^-1 + z^-2
// Each section is H(z) = k(1 + 2z^-1 + z^-2)/(1 + a1 z^-1 + a2 z^-2) and has unity
// gain at DC. The values below are those numbers times 2^40, rounded.
package dstatcom_pkg;

  // ---- signal, angle and unit formats ----
  localparam int SW = 32;          // sample width
  localparam int SF = 16;          // sample fractional bits
  typedef logic signed [SW-1:0] sample_t;

  localparam int AW = 32;          // angle width
  localparam int AF = 28;          // angle fractional bits
  typedef logic signed [AW-1:0] angle_t;

  localparam int UW = 32;          // unit-value width
  localparam int UF = 30;          // unit-value fractional bits
  typedef logic signed [UW-1:0] unit_t;

  localparam angle_t ANGLE_PI      = 32'sd843314857;   // pi   * 2^28
  localparam angle_t ANGLE_HALF_PI = 32'sd421657428;   // pi/2 * 2^28
  localparam unit_t  UNIT_ONE_THIRD  = 32'sd357913941; // 1/3       * 2^30
  localparam unit_t  UNIT_SQRT3_HALF = 32'sd929887697; // sqrt(3)/2 * 2^30
  localparam unit_t  UNIT_CORDIC_INVK = 32'sd652032874; // 1/prod(sqrt(1+2^-2i)) * 2^30

  localparam sample_t SAMPLE_MAX = 32'sh7FFF_FFFF;
  localparam sample_t SAMPLE_MIN = -32'sh7FFF_FFFF;

  // Convert a real number to sample_t (used for parameters only).
  function automatic sample_t to_sample(real r);
    return sample_t'(longint'(r * 65536.0));
  endfunction

  function automatic unit_t to_unit(real r);
    return unit_t'(longint'(r * 1073741824.0));
  endfunction

  // atan(2^-i) in angle_t units, i = 0..31
  function automatic angle_t cordic_atan(int i);
    case (i)
      0:  return 32'sd210828714;
      1:  return 32'sd124459457;
      2:  return 32'sd65760959;
      3:  return 32'sd33381290;
      4:  return 32'sd16755422;
      5:  return 32'sd8385879;
      6:  return 32'sd4193963;
      7:  return 32'sd2097109;
      8:  return 32'sd1048571;
      9:  return 32'sd524287;
      10: return 32'sd262144;
      11: return 32'sd131072;
      12: return 32'sd65536;
      13: return 32'sd32768;
      14: return 32'sd16384;
      15: return 32'sd8192;
      16: return 32'sd4096;
      17: return 32'sd2048;
      18: return 32'sd1024;
      19: return 32'sd512;
      20: return 32'sd256;
      21: return 32'sd128;
      22: return 32'sd64;
      23: return 32'sd32;
      24: return 32'sd16;
      25: return 32'sd8;
      26: return 32'sd4;
      27: return 32'sd2;
      28: return 32'sd1;
      default: return 32'sd0;
    endcase
  endfunction

  // ---- LPF1 (6th-order Butterworth, 3 biquads) ----
  localparam int LW = 64;          // filter state width
  localparam int LF = 40;          // filter state fractional bits
  localparam int CW = 48;          // coefficient width
  localparam int CF = 40;          // coefficient fractional bits

  typedef struct packed {
    logic signed [CW-1:0] k;       // section gain
    logic signed [CW-1:0] a1;      // denominator 1 + a1 z^-1 + a2 z^-2
    logic signed [CW-1:0] a2;
  } biquad_coef_t;

  localparam biquad_coef_t LPF1_SEC1 = '{k:  48'sd42885865,
                                          a1: -48'sd2172480362093,
                                          a2: 48'sd1073140277778};
  localparam biquad_coef_t LPF1_SEC2 = '{k:  48'sd43265694,
                                          a1: -48'sd2191721427598,
                                          a2: 48'sd1092382862596};
  localparam biquad_coef_t LPF1_SEC3 = '{k:  48'sd43024116,
                                          a1: -48'sd2179483757221,
                                          a2: 48'sd1080144225908};

  // Phase lag of LPF1 at 50 Hz (1.998821 rad = 114.52 deg), used to advance
  // the unit vectors: cos and sin of that angle.
  localparam real PHI_F_COS = -0.4150740513;
  localparam real PHI_F_SIN = 0.9097876301;

  // Monitor bundle brought out of the top level.
  typedef struct packed {
    sample_t psmag;                // positive sequence peak magnitude V_m1+
    angle_t  psph;                 // positive sequence phase angle
    sample_t p_lav;                // PI output, load average power per phase
    sample_t ism;                  // peak source reference current
    sample_t [2:0] iref;           // reference source currents c,b,a
    sample_t [2:0] vph;            // filtered phase voltages c,b,a
    logic    div_zero;             // last division had a zero divisor
  } ctrl_mon_t;

endpackage
