// isqrt: bit-serial integer square root, root = floor(sqrt(radicand)).
//
// Classic digit-by-digit (restoring) method: each clock brings down two bits
// of the radicand, compares the partial remainder with 4*root+1 and sets one
// bit of the root. W must be even; the root has W/2 bits. This stands in for
// the CORDIC square-root block of the positive sequence detector.
//
// Timing: start loads the radicand; done pulses W/2+1 clocks later with root
// valid, and root is held until the next start.
//
// The partial remainder is two bits wider than the root so the trial
// subtraction has room; its top two bits stay zero after each restoring step
// and are never read, which lint reports as unused.
module isqrt #(
  parameter int W = 66
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     radicand,
  output logic [W/2-1:0]   root,
  output logic             done
);

  logic busy;
  localparam int RW = W/2 + 2;
  localparam int CNTW = $clog2(W/2 + 1);

  logic [W-1:0]   rad;
  logic [RW-1:0]  rem;
  logic [W/2-1:0] q;
  logic [CNTW-1:0] cnt;

  logic [RW-1:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem[RW-3:0], rad[W-1 -: 2]};
    trial  = {q, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      q    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rad  <= radicand;
        rem  <= '0;
        q    <= '0;
        cnt  <= CNTW'(W/2);
        busy <= 1'b1;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_sh >= trial) begin
          rem <= rem_sh - trial;
          q   <= {q[W/2-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[W/2-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (rem_sh >= trial) ? {q[W/2-2:0], 1'b1} : {q[W/2-2:0], 1'b0};
        end
      end
    end
  end

endmodule
