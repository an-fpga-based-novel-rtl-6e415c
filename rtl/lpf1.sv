// lpf1: the LPF1 fundamental-extraction filter for one PCC line voltage.
//
// A 6th-order Butterworth low-pass IIR, fc = 100 Hz at fs = 50 kHz, built as
// three cascaded direct-form-II second-order sections, as the controller's
// reference-generation scheme specifies. Section s computes, with its gain
// k applied at the input,
//   w(n) = k*v(n) - a1*w(n-1) - a2*w(n-2),   out(n) = w(n) + 2*w(n-1) + w(n-2)
// i.e. H(z) = k(1 + 2z^-1 + z^-2)/(1 + a1 z^-1 + a2 z^-2), and feeds out(n) to
// the next section. At 50 Hz the cascade passes the fundamental with gain
// 0.99988 and a phase lag of 114.52 degrees, which the unit vector generator
// (uvrc) adds back; the 5th harmonic is attenuated by about 48 dB. The
// coefficients are computed from the Butterworth formula in dstatcom_pkg.
//
// Putting k at the section input is this design's choice: the poles sit
// close to z = 1, and a state taken before the gain would be thousands of
// times the signal. State has 40 fractional bits, coefficients 40.
//
// The nine products per sample share one multiplier and one accumulator
// (this design's choice, so that both filters and the rest of the controller
// fit a device with about a hundred 18x18 multipliers): three clocks per
// section, k*v, then -a1*w1, then -a2*w2, with the state update and the
// numerator (shifts and adds only) done on the third.
//
// Interface: x is a sample_t presented with in_valid (one pulse per sample,
// at least 10 clocks apart); y is the filtered sample_t, valid with the
// out_valid pulse 10 clocks after in_valid and held until the next one.
module lpf1
  import dstatcom_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);

  localparam int PW = LW + CW;     // product and accumulator width

  typedef enum logic [1:0] {S_IDLE, S_K, S_A1, S_A2} step_t;

  step_t                step;
  logic [1:0]           sec;       // section 0..2
  logic signed [LW-1:0] v;         // input of the current section
  logic signed [LW-1:0] w1 [3];    // w(n-1) per section
  logic signed [LW-1:0] w2 [3];    // w(n-2) per section
  logic signed [PW-1:0] acc;

  // coefficient of the current section and step
  biquad_coef_t         cf;
  logic signed [CW-1:0] mb;
  logic signed [LW-1:0] ma;
  logic signed [PW-1:0] prod, acc_n;
  logic signed [LW-1:0] w_new, out_sec;

  always_comb begin
    case (sec)
      2'd0:    cf = LPF1_SEC1;
      2'd1:    cf = LPF1_SEC2;
      default: cf = LPF1_SEC3;
    endcase
    case (step)
      S_K:     begin ma = v;        mb = cf.k;   end
      S_A1:    begin ma = w1[sec];  mb = -cf.a1; end
      default: begin ma = w2[sec];  mb = -cf.a2; end
    endcase
    prod    = PW'(ma) * PW'(mb);
    acc_n   = (step == S_K) ? prod : acc + prod;
    w_new   = LW'(acc_n >>> CF);
    out_sec = w_new + (w1[sec] <<< 1) + w2[sec];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step      <= S_IDLE;
      sec       <= '0;
      v         <= '0;
      acc       <= '0;
      w1        <= '{default: '0};
      w2        <= '{default: '0};
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (step)
        S_IDLE: if (in_valid) begin
          v    <= LW'(x) <<< (LF - SF);
          sec  <= '0;
          step <= S_K;
        end
        S_K: begin
          acc  <= acc_n;
          step <= S_A1;
        end
        S_A1: begin
          acc  <= acc_n;
          step <= S_A2;
        end
        default: begin            // S_A2: finish the section
          w2[sec] <= w1[sec];
          w1[sec] <= w_new;
          v       <= out_sec;
          if (sec == 2'd2) begin
            y         <= sample_t'(out_sec >>> (LF - SF));
            out_valid <= 1'b1;
            step      <= S_IDLE;
          end else begin
            sec  <= sec + 1'b1;
            step <= S_K;
          end
        end
      endcase
    end
  end

endmodule
