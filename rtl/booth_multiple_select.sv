// Booth multiple selector (the "CB2" block between the multiplicand
// register and the adder).
//
// Forms the adder operand for one radix-4 step from the multiplicand m and
// the decoded digit: 0, m or 2m, sign-extended to W bits, and bit-inverted
// for a negative digit with cin = 1 so that the adder adds the two's
// complement. W = N + 2 keeps +/-2m and the running partial product exact.
// The block's name and position come from the published multiplier diagram;
// its function is this design's reading of it. Purely combinational.
module booth_multiple_select
  import cscd_pkg::*;
#(
  parameter int unsigned N = OPERAND_WIDTH,
  parameter int unsigned W = N + 2
) (
  input  logic [N-1:0] m,
  input  booth_sel_t   sel,
  output logic [W-1:0] operand,
  output logic         cin
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] m_ext, mult;

  always_comb begin
    m_ext = W'($signed(m));
    if (sel.two)      mult = m_ext << 1;
    else if (sel.one) mult = m_ext;
    else              mult = '0;
    operand = (sel.neg && (sel.one || sel.two)) ? ~mult : mult;
    cin     = sel.neg && (sel.one || sel.two);
  end
endmodule
