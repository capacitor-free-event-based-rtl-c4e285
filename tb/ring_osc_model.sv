// ring_osc_model: timing model of the enable-controlled on-chip oscillator,
// for simulation only. While `en` is high, `clk` toggles every PERIOD_NS/2;
// when `en` falls, the next toggle is suppressed and `clk` stays where it is.
// The first toggle after `en` rises comes half a period later.
`timescale 1ns/1ps
module ring_osc_model #(
  parameter real PERIOD_NS = 20.0   // 50 MHz
) (
  input  logic en,
  output logic clk
);
  initial clk = 1'b0;

  always begin
    if (en) begin
      #(PERIOD_NS / 2.0);
      if (en) clk = ~clk;
    end else begin
      @(posedge en);
    end
  end
endmodule
