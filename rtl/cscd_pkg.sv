// Shared constants and types of the current-sensing completion-detection
// (CSCD) ripple carry adder and of the radix-4 Booth multiplier built on it.
//
// Delays are in picoseconds. The stage delay is the worst-case 32-stage
// ripple of 4.9 ns divided over 32 full adders; the extra load of one
// minimum-size sense inverter per carry node adds 0.2 ns over the whole
// chain, about 6 ps per stage; the clock delay generator (CDG) delay of
// 0.4 ns is the evaluation time of the current sensor. Those three numbers
// follow the published design. The transition window of a carry node
// (how long a sense inverter conducts after its input moves) is this
// model's own choice.
package cscd_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned OPERAND_WIDTH  = 32;   // adder and multiplier operand width
  localparam int unsigned STAGE_DELAY_PS = 153;  // 4.9 ns / 32 stages
  localparam int unsigned SENSE_LOAD_PS  = 6;    // 0.2 ns / 32 stages, sense-inverter load
  localparam int unsigned CDG_DELAY_PS   = 400;  // clock delay generator = sensor evaluation time
  localparam int unsigned SENSE_RAMP_PS  = 100;  // time a sense inverter conducts after its input moves
  localparam int unsigned SENSE_IREF     = 0;    // sensor trips when more than this many inverters conduct

  // Radix-4 Booth digit, one-hot magnitude plus sign:
  // one=1 -> |d|=1, two=1 -> |d|=2, neither -> d=0 (addition skipped).
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_sel_t;
endpackage
