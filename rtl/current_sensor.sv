// Behavioural model of the latch-type current sensor that turns the sense
// current into the add-completion flag addcomp.
//
// The real circuit is a pair of cross-coupled inverters (Inv1, Inv2) whose
// inputs are equalised in the precharge phase, charged by the sense current
// and by a reference current in the accumulation phase, and powered up in
// the evaluation phase so that the side that received more charge wins; a
// buffer (Inv3) gives an active-low "carry still propagating" output, high
// meaning the addition is complete.
// The model: precharge clears a flag; during accumulation the flag is set
// whenever isens exceeds IREF (in units of one sense inverter's current);
// at the start of evaluation addcomp is updated to the inverse of the flag
// and then held until the next evaluation. addcomp therefore answers: "did
// any watched carry node switch during the last accumulation window?".
// Analog in reality; simulation only.
module current_sensor
  import cscd_pkg::*;
#(
  parameter int unsigned IREF = SENSE_IREF
) (
  input  int unsigned isens,
  input  logic        precharge,
  input  logic        accum,
  input  logic        eval,
  output logic        addcomp
);
  timeunit 1ps; timeprecision 1ps;

  logic busy_seen;
  logic over_ref;

  // Sense current above the reference while the latch inputs accumulate.
  assign over_ref = accum && (isens > IREF);

  initial addcomp = 1'b0;

  // Cleared by precharge, set by any excess current during accumulation.
  always_ff @(posedge over_ref or posedge precharge) begin
    if (precharge) busy_seen <= 1'b0;
    else           busy_seen <= 1'b1;
  end

  always @(posedge eval) addcomp <= !busy_seen;
endmodule
