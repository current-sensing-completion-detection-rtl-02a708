// Behavioural model of the clock delay generator (CDG), an analog delay line.
//
// dclk is clk delayed by DELAY_PS (0.4 ns, the evaluation time of the
// current sensor). The delay exists only in simulation; a real design would
// use a tuned delay cell here. Together clk and dclk define the three sensor
// phases (see control_signal_generator) and the rising edge of dclk, the end
// of the evaluation phase, is the edge at which the datapath around the
// adder loads.
module clock_delay_generator
  import cscd_pkg::*;
#(
  parameter int unsigned DELAY_PS = CDG_DELAY_PS
) (
  input  logic clk,
  output logic dclk
);
  timeunit 1ps; timeprecision 1ps;

  assign #(DELAY_PS) dclk = clk;
endmodule
