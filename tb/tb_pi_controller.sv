// tb_pi_controller: self-checking test of the dc-link PI controller.
//
// A floating-point model of u(n) = u(n-1) + KP (e(n) - e(n-1)) + Ts/2 KI e(n),
// with e = 140 V - v_dc, KP = 30, KI = 100, Ts = 20 us, runs beside the block
// over a sequence of random dc-link voltages (including long runs that make
// the integral term dominate). Checks every output, the one-clock update
// after en, that u is held without en, and saturation at the format limit.
`timescale 1ns/1ps
module tb_pi_controller;
  import dstatcom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  sample_t vdc, u;
  pi_controller dut (.clk, .rst_n, .en, .vdc, .u, .valid);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real um = 0.0, e1m = 0.0;

  task automatic step(input real v);
    real e, got;
    sample_t vq;
    vq = sample_t'(longint'(v * 65536.0));
    vdc <= vq;
    en <= 1'b1;
    @(posedge clk);
    en <= 1'b0;
    @(negedge clk);
    e = 140.0 - real'(vq) / 65536.0;
    um = um + 30.0 * (e - e1m) + 0.5 / 50000.0 * 100.0 * e;
    e1m = e;
    got = real'(u) / 65536.0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid"); end
    checks++;
    if (got - um > 1e-3 || um - got > 1e-3) begin
      failures++;
      $display("FAIL u got %f expected %f", got, um);
    end
  endtask

  initial begin
    sample_t hold;
    vdc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (u != 0) begin failures++; $display("FAIL reset value"); end
    for (int n = 0; n < 300; n++) step(120.0 + real'($urandom % 40000) / 1000.0);
    for (int n = 0; n < 3000; n++) step(135.0);   // integral accumulates
    for (int n = 0; n < 3000; n++) step(145.0);
    // held without en
    hold = u;
    vdc <= '0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    checks++;
    if (u != hold) begin failures++; $display("FAIL u changed without en"); end
    // saturation
    for (int n = 0; n < 4; n++) begin
      vdc <= sample_t'(-32'sd2000000000);
      en <= 1'b1;
      @(posedge clk);
    end
    en <= 1'b0;
    @(negedge clk);
    checks++;
    if (u != SAMPLE_MAX) begin failures++; $display("FAIL no positive saturation, u=%0d", u); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
