// tb_sample_timer: self-checking test of the sampling strobe generator at
// its default 100 MHz / 50 kHz setting: the first tick 2000 clocks after
// reset, then exactly one one-clock tick every 2000 clocks.
`timescale 1ns/1ps
module tb_sample_timer;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  sample_timer dut (.clk, .rst_n, .tick);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nt = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (tick) begin
        checks++;
        if (cyc - last != 2000) begin
          failures++;
          $display("FAIL tick spacing %0d", cyc - last);
        end
        last <= cyc;
        nt <= nt + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20500) @(posedge clk);
    checks++;
    if (nt != 10) begin failures++; $display("FAIL %0d ticks", nt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
