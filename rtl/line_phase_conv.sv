// line_phase_conv: line-to-phase voltage conversion for a three-wire system.
//
// From the two filtered line voltages v_ab and v_cb, and the three-wire
// condition v_a + v_b + v_c = 0, it recovers the three phase voltages
//   v_a = (2 v_ab - v_cb)/3,  v_b = -(v_ab + v_cb)/3,  v_c = (2 v_cb - v_ab)/3.
// The block is only named in the controller's block diagram; these formulas
// are the plain conversion it must perform. In this controller the result is
// a monitor output: the positive sequence detector works on the line voltages.
//
// Timing: vph and valid are registered one clock after en. vph[0..2] = a, b, c.
module line_phase_conv
  import dstatcom_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  sample_t       vab,
  input  sample_t       vcb,
  output sample_t [2:0] vph,
  output logic          valid
);

  localparam int PW = SW + UW + 2;

  logic signed [SW+1:0] na, nb, nc;      // 3 * phase voltage
  logic signed [PW-1:0] pa, pb, pc;

  always_comb begin
    na = ((SW+2)'(vab) <<< 1) - (SW+2)'(vcb);
    nb = -((SW+2)'(vab) + (SW+2)'(vcb));
    nc = ((SW+2)'(vcb) <<< 1) - (SW+2)'(vab);
    pa = PW'(na) * PW'(UNIT_ONE_THIRD);
    pb = PW'(nb) * PW'(UNIT_ONE_THIRD);
    pc = PW'(nc) * PW'(UNIT_ONE_THIRD);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vph   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        vph[0] <= sample_t'(pa >>> UF);
        vph[1] <= sample_t'(pb >>> UF);
        vph[2] <= sample_t'(pc >>> UF);
      end
    end
  end

endmodule
