// ism_divider: peak source-current amplitude I_sm = P_lav / V_m1+.
//
// The PI controller's per-phase power estimate divided by the positive
// sequence peak voltage gives the peak of the fundamental source current
// that supplies it (per-phase power = V_m*I_m/2 with the detector's half-peak
// scaling, so no further constant is needed). The reference design
// names a divider here; this one is a bit-serial restoring divider on the
// magnitudes, one quotient bit per clock, with the sign restored at the end.
//
// A zero or negative divisor (no voltage yet, e.g. right after reset) gives
// I_sm = 0 and raises div_zero; a quotient beyond the sample_t range is
// saturated. Both rules are this design's choice.
//
// Interface: p and vm (sample_t) are read on start; ism (sample_t, amperes)
// is held until the next result. Timing: done pulses SW+SF+1 = 49 clocks
// after start, or 1 clock after start for a zero divisor.
//
// The stored remainder keeps one bit more than the divisor so the trial
// subtraction cannot overflow; that top bit is always zero after the
// restore step and is never read, which lint reports as unused.
module ism_divider
  import dstatcom_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t p,
  input  sample_t vm,
  output sample_t ism,
  output logic    done,
  output logic    div_zero
);

  localparam int NW = SW + SF;          // dividend magnitude bits (Q.32)
  localparam int CNTW = $clog2(NW + 1);

  logic [NW-1:0]   num;                 // shifts out dividend, shifts in quotient
  logic [SW:0]     rem;
  logic [SW-1:0]   den;
  logic            neg, busy;
  logic [CNTW-1:0] cnt;

  logic [SW-1:0] pmag;
  logic [SW:0]   rem_sh;
  logic          ge;
  logic [NW-1:0] q_final;
  always_comb begin
    pmag    = (p < 0) ? $unsigned(-p) : $unsigned(p);
    rem_sh  = {rem[SW-1:0], num[NW-1]};
    ge      = rem_sh >= {1'b0, den};
    q_final = {num[NW-2:0], ge};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      num      <= '0;
      rem      <= '0;
      den      <= '0;
      neg      <= 1'b0;
      busy     <= 1'b0;
      cnt      <= '0;
      ism      <= '0;
      done     <= 1'b0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (vm <= 0) begin
          ism      <= '0;
          div_zero <= 1'b1;
          done     <= 1'b1;
          busy     <= 1'b0;
        end else begin
          div_zero <= 1'b0;
          num      <= NW'(pmag) << SF;
          neg      <= p < 0;
          den      <= $unsigned(vm);
          rem      <= '0;
          cnt      <= CNTW'(NW);
          busy     <= 1'b1;
        end
      end else if (busy) begin
        rem <= ge ? rem_sh - {1'b0, den} : rem_sh;
        num <= q_final;
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (q_final > NW'(SAMPLE_MAX)) ism <= neg ? SAMPLE_MIN : SAMPLE_MAX;
          else                           ism <= neg ? -sample_t'(q_final) : sample_t'(q_final);
        end
      end
    end
  end

endmodule
