// ps_detector: positive sequence detector of the PCC voltage.
//
// From the filtered line voltages v_ab and v_cb it forms the two orthogonal
// components
//   X = v_ab - v_cb/2,   Y = -(sqrt(3)/2) v_cb
// (for a balanced set with phase peak V these are 1.5V cos(wt) and
// 1.5V sin(wt)) and returns
//   psmag = sqrt(X^2 + Y^2)/3   the positive sequence peak magnitude V_m1+
//   psph  = atan2(Y, X)         its phase angle, radians in (-pi, pi].
// These are the two formulas of the reference design. The magnitude path
// squares, adds, takes a bit-serial integer square root (isqrt) and scales
// by 1/3; the angle path is a vectoring CORDIC (cordic_vec). Both run in
// parallel; these serial units are this design's choice.
//
// Interface: vab/vcb are sample_t and are read on the start pulse; psmag is
// sample_t (volts), psph is angle_t. Timing: done pulses 35 clocks after start
// (the square root is the longer path); outputs are held until the next done.
module ps_detector
  import dstatcom_pkg::*;
#(
  parameter int ITER = 28
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t vab,
  input  sample_t vcb,
  output sample_t psmag,
  output angle_t  psph,
  output logic    done
);

  localparam int XW = SW + 2;            // X and Y
  localparam int RW = 2 * XW - 2;        // radicand: X^2 + Y^2 < 2^(RW)
  localparam int MW = RW/2 + UW + 1;
  localparam int DW = 2 * XW;

  logic signed [XW-1:0]    x, y;
  logic signed [SW+UW-1:0] vcb_k;
  logic [DW-1:0]           x2, y2;
  logic [RW-1:0]           radicand;

  always_comb begin
    vcb_k    = (SW+UW)'(vcb) * (SW+UW)'(UNIT_SQRT3_HALF);
    x        = XW'(vab) - (XW'(vcb) >>> 1);
    y        = -XW'(vcb_k >>> UF);
    x2       = $unsigned(DW'(x) * DW'(x));
    y2       = $unsigned(DW'(y) * DW'(y));
    radicand = RW'(x2 + y2);
  end

  logic [RW/2-1:0] root;
  logic            sq_done, at_done;
  angle_t          angle;

  isqrt #(.W(RW)) u_sqrt (
    .clk, .rst_n, .start, .radicand, .root, .done(sq_done));

  cordic_vec #(.W(XW), .ITER(ITER)) u_atan (
    .clk, .rst_n, .start, .x_in(x), .y_in(y), .angle, .done(at_done));

  // Wait for both results, then publish them together.
  logic sq_have, at_have;
  logic [MW-1:0] mag3;
  assign mag3 = MW'(root) * MW'(UNIT_ONE_THIRD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sq_have <= 1'b0;
      at_have <= 1'b0;
      psmag   <= '0;
      psph    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sq_have <= 1'b0;
        at_have <= 1'b0;
      end else begin
        if (sq_done) sq_have <= 1'b1;
        if (at_done) at_have <= 1'b1;
        if ((sq_have || sq_done) && (at_have || at_done) && !(sq_have && at_have)) begin
          psmag <= sample_t'(mag3 >> UF);
          psph  <= angle;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
