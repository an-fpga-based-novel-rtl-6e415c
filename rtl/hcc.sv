// hcc: three-leg hysteresis current controller.
//
// For each phase k the source-current error e = i_sk - i*_sk is compared with
// the hysteresis band HB (0.25 A by default), following the controller's
// switching rules:
//   e >= +HB  -> upper switch ON,  lower OFF
//   e <= -HB  -> upper switch OFF, lower ON
//   otherwise -> previous state held
// The held state is one register per leg, updated on every en strobe (one
// per sample), so the switching frequency is at most half the sample rate.
// The lower gate is always the complement of the upper gate; no dead time
// is inserted (the gate driver is expected to provide it).
//
// Gate numbering follows the usual bridge convention, leg a: g1/g4,
// leg b: g3/g6, leg c: g5/g2. g[0] is g1 ... g[5] is g6. Reset state: every
// upper switch OFF, every lower switch ON.
//
// Interface: is_meas, is_ref indexed 0 = a, 1 = b, 2 = c (sample_t, amperes),
// read when en is high; g is registered one clock later.
module hcc
  import dstatcom_pkg::*;
#(
  parameter real HB = 0.25
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  sample_t [2:0] is_meas,
  input  sample_t [2:0] is_ref,
  output logic [5:0]    g
);

  localparam logic signed [SW:0] HB_Q = (SW+1)'(to_sample(HB));

  logic [2:0] up;                       // upper switch state per leg
  logic [2:0] up_n;
  logic signed [SW:0] err [3];

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      err[k] = (SW+1)'(is_meas[k]) - (SW+1)'(is_ref[k]);
      if (err[k] >= HB_Q)       up_n[k] = 1'b1;
      else if (err[k] <= -HB_Q) up_n[k] = 1'b0;
      else                      up_n[k] = up[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) up <= '0;
    else if (en) up <= up_n;
  end

  // g1..g6 = {a_up, c_lo, b_up, a_lo, c_up, b_lo}
  assign g[0] = up[0];     // g1
  assign g[1] = ~up[2];    // g2
  assign g[2] = up[1];     // g3
  assign g[3] = ~up[0];    // g4
  assign g[4] = up[2];     // g5
  assign g[5] = ~up[1];    // g6

endmodule
