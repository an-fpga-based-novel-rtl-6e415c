// pi_controller: dc-link voltage PI controller producing the power estimate.
//
// On every sample strobe it takes the error e(n) = VDC_REF - v_dc and applies
// the incremental PI law of the reference design
//   u(n) = u(n-1) + KP*(e(n) - e(n-1)) + (Ts/2)*KI*e(n),   Ts = 1/FS_HZ
// The output u is the per-phase load average active power P_lav (P_max):
// when the dc link sags, more active power is drawn from the source to
// recharge it. Gains and reference default to 30, 100 and 140 V.
//
// Coefficients are held with 32 fractional bits and u(n) with 48, so the
// small integral step (0.001 per volt per sample) is not lost. The output
// limit is not specified in the reference design; here u only saturates at
// the sample_t range. Reset clears u and e(n-1).
//
// Interface: vdc is sample_t, read when en is high; u (sample_t, watts) and
// valid are registered one clock later.
module pi_controller
  import dstatcom_pkg::*;
#(
  parameter real VDC_REF = 140.0,
  parameter real KP      = 30.0,
  parameter real KI      = 100.0,
  parameter int  FS_HZ   = 50000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t vdc,
  output sample_t u,
  output logic    valid
);

  localparam int QF = 32;                       // coefficient fraction bits
  localparam int EW = SW + 1;                   // error width
  localparam int AW2 = EW + 64 + 4;             // accumulator width
  localparam logic signed [63:0] KP_Q  = 64'(longint'(KP * 4294967296.0));
  localparam logic signed [63:0] KIT_Q = 64'(longint'(KI / (2.0 * real'(FS_HZ)) * 4294967296.0));
  localparam sample_t VREF_Q = to_sample(VDC_REF);
  localparam logic signed [AW2-1:0] ACC_MAX = AW2'(SAMPLE_MAX) <<< (QF + SF - SF);
  localparam logic signed [AW2-1:0] ACC_MIN = AW2'(SAMPLE_MIN) <<< (QF + SF - SF);

  logic signed [EW-1:0]  e, e1;
  logic signed [AW2-1:0] acc, acc_n, du;

  // acc holds u with QF+SF fractional bits
  always_comb begin
    e     = EW'(VREF_Q) - EW'(vdc);
    du    = AW2'(KP_Q) * AW2'(e - e1) + AW2'(KIT_Q) * AW2'(e);
    acc_n = acc + du;
    if (acc_n > ACC_MAX)      acc_n = ACC_MAX;
    else if (acc_n < ACC_MIN) acc_n = ACC_MIN;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e1    <= '0;
      acc   <= '0;
      u     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        e1  <= e;
        acc <= acc_n;
        u   <= sample_t'(acc_n >>> QF);
      end
    end
  end

endmodule
