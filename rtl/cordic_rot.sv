// cordic_rot: iterative rotation-mode CORDIC returning cos and sin of an angle.
//
// The vector (1/K, 0) is rotated by +/-atan(2^-i), i = 0..ITER-1, one step per
// clock, driving the residual angle to zero; K is the CORDIC gain, so the
// vector ends at (cos, sin) with unit length. Angles outside +/-pi/2 are first
// folded by pi and the result negated. This is the sin/cos generator of the
// unit-vector block (the CORDIC SINCOS block of the original design).
//
// Interface: theta is angle_t in (-pi, pi]; cos_o and sin_o are unit_t (30
// fractional bits). Timing: start loads theta, done pulses ITER+1 clocks later,
// outputs held until the next start.
module cordic_rot
  import dstatcom_pkg::*;
#(
  parameter int ITER = 28
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t theta,
  output unit_t  cos_o,
  output unit_t  sin_o,
  output logic   done
);

  logic busy;
  localparam int XW = UW + 2;
  localparam int CNTW = $clog2(ITER + 1);

  logic signed [XW-1:0] x, y;
  angle_t               z;
  logic                 neg;
  logic [CNTW-1:0]      i;
  logic signed [XW-1:0] xn, yn;

  always_comb begin
    if (z >= 0) begin
      xn = x - (y >>> i);
      yn = y + (x >>> i);
    end else begin
      xn = x + (y >>> i);
      yn = y - (x >>> i);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      neg   <= 1'b0;
      i     <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x <= XW'(UNIT_CORDIC_INVK);
        y <= '0;
        if (theta > ANGLE_HALF_PI) begin
          z   <= theta - ANGLE_PI;
          neg <= 1'b1;
        end else if (theta < -ANGLE_HALF_PI) begin
          z   <= theta + ANGLE_PI;
          neg <= 1'b1;
        end else begin
          z   <= theta;
          neg <= 1'b0;
        end
        i    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        x <= xn;
        y <= yn;
        z <= (z >= 0) ? z - cordic_atan(int'(i)) : z + cordic_atan(int'(i));
        i <= i + 1'b1;
        if (i == CNTW'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          cos_o <= neg ? -unit_t'(xn) : unit_t'(xn);
          sin_o <= neg ? -unit_t'(yn) : unit_t'(yn);
        end
      end
    end
  end

endmodule
