// sample_timer: sampling strobe generator.
//
// Divides the system clock down to the controller sampling rate (50 kHz by
// default) and emits a one-clock tick per sample period. The tick starts the
// external ADC conversions and one pass of the control chain. The system
// clock frequency is not specified for the reference design; 100 MHz is
// assumed, giving 2000 clocks per sample.
//
// Timing: the first tick comes CLK_HZ/FS_HZ clocks after reset is released,
// then one every CLK_HZ/FS_HZ clocks.
module sample_timer #(
  parameter int CLK_HZ = 100_000_000,
  parameter int FS_HZ  = 50_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int DIV = CLK_HZ / FS_HZ;
  localparam int CW2 = $clog2(DIV);

  logic [CW2-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW2'(DIV - 1));
      cnt  <= (cnt == CW2'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
