// tb_ism_divider: self-checking test of I_sm = P_lav / V_m1+.
//
// Expected quotients are computed exactly with 64-bit integer division
// (|p| * 2^16 / vm, truncated, sign of p). Random powers +/-3000 W and
// voltages 0.5..200 V, then the divide-by-zero guard (vm = 0 and vm < 0) and
// saturation (tiny divisor). Checks the 49-clock latency as well.
`timescale 1ns/1ps
module tb_ism_divider;
  import dstatcom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, div_zero;
  sample_t p, vm, ism;
  ism_divider dut (.clk, .rst_n, .start, .p, .vm, .ism, .done, .div_zero);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, lat = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) t_start <= cyc;
    if (done) lat <= cyc - t_start;
  end

  task automatic run(input sample_t pp, input sample_t vv, input sample_t expect_q,
                     input bit expect_zero, input int expect_lat);
    p <= pp;
    vm <= vv;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk);
    checks++;
    if (ism != expect_q || div_zero != expect_zero) begin
      failures++;
      $display("FAIL p=%0d vm=%0d got %0d/%0b expected %0d/%0b", pp, vv, ism, div_zero, expect_q, expect_zero);
    end
    checks++;
    if (lat != expect_lat) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    p = '0; vm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      longint pp, vv, q;
      pp = longint'($urandom % 393216000) - 196608000;       // +/-3000 W
      vv = 32768 + longint'($urandom % 13074432);             // 0.5..200 V
      q = ((pp < 0 ? -pp : pp) <<< 16) / vv;
      if (q > 64'sh7FFF_FFFF) q = 64'sh7FFF_FFFF;
      run(sample_t'(pp), sample_t'(vv), sample_t'(pp < 0 ? -q : q), 1'b0, 49);
    end
    run(sample_t'(32'sd1000000), '0, '0, 1'b1, 1);
    run(sample_t'(32'sd1000000), -32'sd5, '0, 1'b1, 1);
    run(sample_t'(32'sd2000000000), 32'sd1, SAMPLE_MAX, 1'b0, 49);
    run(-sample_t'(32'sd2000000000), 32'sd1, SAMPLE_MIN, 1'b0, 49);
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
