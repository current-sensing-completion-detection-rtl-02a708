// Ripple carry adder with current-sensing completion detection.
//
// A WIDTH-bit ripple carry adder whose every carry node also drives a
// minimum-size sense inverter. Only the sense inverters' supply current is
// monitored, never the adder's own supply, so the functional path sees
// just the small extra fan-out (SENSE_LOAD_PS per stage).
// The clock delay generator derives dclk from clk, the control signal
// generator splits each clock period into precharge / accumulate / evaluate,
// and the current sensor raises done at the start of an evaluation phase if
// no carry node switched during the accumulation window before it.
//
// Timing contract: operands change at a rising edge of dclk. done, sampled
// at a later rising edge of dclk, tells whether sum/cout have settled; if
// not, the caller waits one more clock and samples again. An addition whose
// carries settle within the first precharge phase completes in one clock.
// The structure follows the published adder-with-sensor diagram; the exact
// phase reading and the sensor model are this design's own.
module cscd_adder
  import cscd_pkg::*;
#(
  parameter int unsigned WIDTH    = OPERAND_WIDTH,
  parameter int unsigned TPD_PS   = STAGE_DELAY_PS + SENSE_LOAD_PS,
  parameter int unsigned DELAY_PS = CDG_DELAY_PS,
  parameter int unsigned RAMP_PS  = SENSE_RAMP_PS,
  parameter int unsigned IREF     = SENSE_IREF
) (
  input  logic             clk,
  output logic             dclk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             done
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] carry;
  logic             precharge, accum, eval;
  int unsigned      isens;

  ripple_carry_adder #(.WIDTH(WIDTH), .TPD_PS(TPD_PS)) u_rca (
    .a, .b, .cin, .sum, .cout, .carry
  );

  clock_delay_generator #(.DELAY_PS(DELAY_PS)) u_cdg (
    .clk, .dclk
  );

  control_signal_generator u_csg (
    .clk, .dclk, .precharge, .accum, .eval
  );

  sense_inverter_array #(.WIDTH(WIDTH), .RAMP_PS(RAMP_PS)) u_sense (
    .carry, .isens
  );

  current_sensor #(.IREF(IREF)) u_sensor (
    .isens, .precharge, .accum, .eval, .addcomp(done)
  );
endmodule
