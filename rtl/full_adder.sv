// One-bit full adder, the repeated cell of the ripple carry adder.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Both outputs carry an
// inertial delay TPD_PS (two gate delays per stage) so that in simulation the
// carry really ripples stage by stage and the completion sensor has
// something to observe; synthesis ignores the delay. The default of 153 ps is
// the published 4.9 ns worst-case 32-stage delay divided by 32.
module full_adder
  import cscd_pkg::*;
#(
  parameter int unsigned TPD_PS = STAGE_DELAY_PS
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  timeunit 1ps; timeprecision 1ps;

  assign #(TPD_PS) sum  = a ^ b ^ cin;
  assign #(TPD_PS) cout = (a & b) | (cin & (a ^ b));
endmodule
