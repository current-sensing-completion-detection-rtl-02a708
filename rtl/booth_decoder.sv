// Radix-4 Booth decoder.
//
// Recodes the multiplier bit triple {y[2i+1], y[2i], y[2i-1]} into a digit
// in {-2, -1, 0, +1, +2}:
//   000 0 | 001 +1 | 010 +1 | 011 +2 | 100 -2 | 101 -1 | 110 -1 | 111 0
// A zero digit (runs of 0s or of 1s) means the step needs no addition.
// Radix-4 recoding follows the published multiplier; the one-hot encoding
// of the digit is this design's choice. Purely combinational.
module booth_decoder
  import cscd_pkg::*;
(
  input  logic [2:0]  bits,
  output booth_sel_t  sel,
  output logic        zero
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    sel.one = bits[1] ^ bits[0];
    sel.two = (bits == 3'b011) || (bits == 3'b100);
    sel.neg = bits[2] && !(bits[1] && bits[0]);
    zero    = !(sel.one || sel.two);
  end
endmodule
