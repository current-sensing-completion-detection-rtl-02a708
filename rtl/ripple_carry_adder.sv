// WIDTH-bit ripple carry adder: a string of full adders joined by their
// carries, stage i taking the carry out of stage i-1.
//
// Besides the sum it brings out every stage's carry-out, carry[i], which are
// the late-settling nodes the completion sensor watches (carry[WIDTH-1] is
// cout). Settling time is proportional to the longest carry chain the
// operands excite, WIDTH*TPD_PS in the worst case. Purely combinational.
module ripple_carry_adder
  import cscd_pkg::*;
#(
  parameter int unsigned WIDTH  = OPERAND_WIDTH,
  parameter int unsigned TPD_PS = STAGE_DELAY_PS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] carry
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder #(.TPD_PS(TPD_PS)) u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign carry = c[WIDTH:1];
  assign cout  = c[WIDTH];
endmodule
