// Behavioural model of the sense inverters: one minimum-size CMOS inverter
// on every carry node of the ripple carry adder, their ground rails joined
// into one sense line.
//
// An inverter draws supply current only while its input is between the
// rails, i.e. while the carry node it watches is switching. The model counts
// a node as switching for RAMP_PS after each change of its logic value and
// reports the total sense current isens in units of one inverter's peak
// current (so 0..WIDTH; all carries switching at once gives WIDTH times one
// inverter). The inverters' outputs are unloaded and are not modelled.
// Analog in reality; simulation only.
module sense_inverter_array
  import cscd_pkg::*;
#(
  parameter int unsigned WIDTH   = OPERAND_WIDTH,
  parameter int unsigned RAMP_PS = SENSE_RAMP_PS
) (
  input  logic [WIDTH-1:0] carry,
  output int unsigned      isens
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] settled;

  // A node is mid-rail while it differs from its value RAMP_PS ago.
  assign #(RAMP_PS) settled = carry;
  assign isens = $countones(carry ^ settled);
endmodule
