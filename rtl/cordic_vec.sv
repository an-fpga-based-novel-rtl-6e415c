// cordic_vec: iterative vectoring-mode CORDIC returning atan2(y, x).
//
// The vector (x, y) is rotated toward the positive x axis by +/-atan(2^-i),
// i = 0..ITER-1, one micro-rotation per clock, and the applied rotations are
// summed into the angle. A vector in the left half plane is first turned by
// 180 degrees (angle preset to +/-pi), so the result covers (-pi, pi].
// This is the phase part of the positive sequence detector (the CORDIC ATAN
// block of the original design). Inputs are signed W-bit numbers of any
// common scale; the angle is angle_t (radians, 28 fractional bits).
//
// Timing: start loads x and y; done pulses ITER+1 clocks later and angle is
// held until the next start.
module cordic_vec
  import dstatcom_pkg::*;
#(
  parameter int W    = 32,
  parameter int ITER = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output angle_t              angle,
  output logic                done
);

  logic busy;
  localparam int XW = W + 3;       // room for the 1.65 CORDIC growth
  localparam int CNTW = $clog2(ITER + 1);

  logic signed [XW-1:0] x, y;
  angle_t               z;
  logic [CNTW-1:0]      i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      i     <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      angle <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (x_in < 0) begin
          x <= -XW'(x_in);
          y <= -XW'(y_in);
          z <= (y_in < 0) ? -ANGLE_PI : ANGLE_PI;
        end else begin
          x <= XW'(x_in);
          y <= XW'(y_in);
          z <= '0;
        end
        i    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (y >= 0) begin
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + cordic_atan(int'(i));
        end else begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - cordic_atan(int'(i));
        end
        i <= i + 1'b1;
        if (i == CNTW'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          angle <= (y >= 0) ? z + cordic_atan(int'(i)) : z - cordic_atan(int'(i));
        end
      end
    end
  end

endmodule
