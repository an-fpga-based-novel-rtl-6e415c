// tb_line_phase_conv: self-checking test of the line-to-phase conversion.
//
// Random line voltages v_ab, v_cb in +/-200 V, plus a balanced 50 Hz set whose
// phase voltages are known. Expected phase voltages are computed in floating
// point from v_a = (2v_ab - v_cb)/3, v_b = -(v_ab + v_cb)/3, v_c = (2v_cb - v_ab)/3.
// Also checks the one-clock latency and that v_a + v_b + v_c stays zero.
`timescale 1ns/1ps
module tb_line_phase_conv;
  import dstatcom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  sample_t vab, vcb;
  sample_t [2:0] vph;
  line_phase_conv dut (.clk, .rst_n, .en, .vab, .vcb, .vph, .valid);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic apply(input real ab, input real cb, input real ea, input real eb, input real ec);
    real got[3], exp_v[3];
    vab <= sample_t'(longint'(ab * 65536.0));
    vcb <= sample_t'(longint'(cb * 65536.0));
    en  <= 1'b1;
    @(posedge clk);
    en  <= 1'b0;
    @(negedge clk);
    checks++;
    if (!valid) begin failures++; $display("FAIL valid not one clock after en"); end
    exp_v[0] = ea; exp_v[1] = eb; exp_v[2] = ec;
    for (int k = 0; k < 3; k++) begin
      got[k] = real'(vph[k]) / 65536.0;
      checks++;
      if (got[k] - exp_v[k] > 1e-4 || exp_v[k] - got[k] > 1e-4) begin
        failures++;
        $display("FAIL phase %0d got %f expected %f", k, got[k], exp_v[k]);
      end
    end
    checks++;
    if (fabs(got[0] + got[1] + got[2]) > 1e-4) begin failures++; $display("FAIL sum not zero"); end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
  endtask

  initial begin
    vab = '0; vcb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      real ab, cb;
      ab = (real'($urandom % 400000) - 200000.0) / 1000.0;
      cb = (real'($urandom % 400000) - 200000.0) / 1000.0;
      apply(ab, cb, (2.0 * ab - cb) / 3.0, -(ab + cb) / 3.0, (2.0 * cb - ab) / 3.0);
    end
    for (int n = 0; n < 50; n++) begin
      real th, va, vb, vc;
      th = 2.0 * 3.14159265358979 * real'(n) / 50.0;
      va = 70.71 * $cos(th);
      vb = 70.71 * $cos(th - 2.0943951);
      vc = 70.71 * $cos(th + 2.0943951);
      apply(va - vb, vc - vb, va, vb, vc);
    end
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
