// tb_hcc: self-checking test of the three-leg hysteresis current controller.
//
// A reference model keeps one upper-switch state per leg and applies the
// rules: error i_s - i*_s >= 0.25 A turns the upper switch on, <= -0.25 A turns
// it off, anything between holds the state. Random currents around the
// references (many inside the band), exact band edges, updates without en
// (must be ignored) and reset are exercised. Gate mapping checked:
// leg a g1/g4, leg b g3/g6, leg c g5/g2, lower = not upper.
`timescale 1ns/1ps
module tb_hcc;
  import dstatcom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t [2:0] is_meas, is_ref;
  logic [5:0] g;
  hcc dut (.clk, .rst_n, .en, .is_meas, .is_ref, .g);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2:0] st = '0;
  int n_on = 0, n_off = 0, n_hold = 0;

  function automatic logic [5:0] gates(logic [2:0] u);
    return {~u[1], u[2], ~u[0], u[1], ~u[2], u[0]};
  endfunction

  task automatic apply(input sample_t [2:0] im, input sample_t [2:0] ir, input bit use_en);
    is_meas <= im;
    is_ref <= ir;
    en <= use_en;
    @(posedge clk);
    en <= 1'b0;
    if (use_en) begin
      for (int k = 0; k < 3; k++) begin
        longint e;
        e = longint'(im[k]) - longint'(ir[k]);
        if (e >= 16384) begin if (!st[k]) n_on++; st[k] = 1'b1; end
        else if (e <= -16384) begin if (st[k]) n_off++; st[k] = 1'b0; end
        else n_hold++;
      end
    end
    @(negedge clk);
    checks++;
    if (g != gates(st)) begin
      failures++;
      $display("FAIL g=%b expected %b", g, gates(st));
    end
  endtask

  initial begin
    sample_t [2:0] a, b;
    is_meas = '0; is_ref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (g != 6'b101010) begin failures++; $display("FAIL reset gates %b", g); end
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 3; k++) begin
        b[k] = sample_t'(longint'($urandom % 1310720) - 655360);       // +/-10 A
        a[k] = b[k] + sample_t'(longint'($urandom % 65536) - 32768);   // +/-0.5 A error
      end
      apply(a, b, ($urandom % 8) != 0);
    end
    // exact band edges
    a = '{32'sd16384, -32'sd16384, 32'sd16383};
    b = '0;
    apply(a, b, 1'b1);
    a = '{-32'sd16383, 32'sd16384, -32'sd16384};
    apply(a, b, 1'b1);
    $display("on %0d off %0d hold %0d", n_on, n_off, n_hold);
    checks++;
    if (n_on == 0 || n_off == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    // reset returns to upper off
    rst_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (g != 6'b101010) begin failures++; $display("FAIL reset gates %b", g); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
