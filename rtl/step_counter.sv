// Up counter of completed Booth steps.
//
// clear resets the count, inc adds one on a rising clock edge. last is high
// while the count is at its maximum, 2**WIDTH - 1: with WIDTH = 4 that is the
// 16th and final radix-4 step of a 32-bit multiplication. Asynchronous
// active-low reset.
module step_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             last
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (inc)   count <= count + 1'b1;
  end

  assign last = &count;
endmodule
