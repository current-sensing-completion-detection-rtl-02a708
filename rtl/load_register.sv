// Load register holding the multiplicand for the whole multiplication.
//
// Takes d on a rising clock edge while load is high, otherwise holds.
// Asynchronous active-low reset to zero (the reset is this design's choice).
module load_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
