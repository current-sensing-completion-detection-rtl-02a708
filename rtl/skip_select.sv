// Skip selector (the "CB3" block between the adder and the product register).
//
// Chooses what the product register takes in the current Booth step: the
// adder's sum, or, when the Booth digit is zero and the addition is
// skipped, the unchanged partial product fed back from the register. The
// block's name and position come from the published multiplier diagram; its
// function is this design's reading of it. Purely combinational.
module skip_select #(
  parameter int unsigned W = 34
) (
  input  logic [W-1:0] sum,
  input  logic [W-1:0] acc,
  input  logic         skip,
  output logic [W-1:0] next_acc
);
  timeunit 1ps; timeprecision 1ps;

  assign next_acc = skip ? acc : sum;
endmodule
