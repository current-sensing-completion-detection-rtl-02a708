// Control signal generator of the current sensor.
//
// Decodes the clock and its delayed copy into the three sensor phases:
//   precharge = clk & dclk   the latch inputs are equalised (T4 on)
//   accum     = ~clk         the sensed and reference currents charge the
//                            latch inputs (T1, T2 on)
//   eval      = clk & ~dclk  the latch is powered and resolves (T3 on)
// Exactly one phase is active at any time. The phases and the transistor
// states follow the published timing diagram; where its phase boundaries
// fall relative to the two clock edges is this design's reading of it.
// Purely combinational.
module control_signal_generator (
  input  logic clk,
  input  logic dclk,
  output logic precharge,
  output logic accum,
  output logic eval
);
  timeunit 1ps; timeprecision 1ps;

  assign precharge = clk & dclk;
  assign accum     = ~clk;
  assign eval      = clk & ~dclk;
endmodule
