// Load/shift register of the radix-4 Booth multiplier.
//
// Holds {acc, q, qm1}: acc is the W-bit (N+2) running partial product, q the
// N-bit multiplier being consumed two bits per step, qm1 the bit shifted out
// last (y[-1], zero at the start). load (start of a multiplication) sets
// {0, multiplier, 0}. step takes next_acc as the new partial product and
// shifts the whole register right by two, arithmetically. After N/2 steps
// {acc[N-1:0], q} is the 2N-bit product. The published register is 64 bits;
// the two guard bits of acc and the Booth bit qm1 are this design's addition
// for an exact signed result.
// Timing: one rising clock edge per step; asynchronous active-low reset.
module product_shift_register #(
  parameter int unsigned N = 32,
  parameter int unsigned W = N + 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N-1:0]   multiplier,
  input  logic           step,
  input  logic [W-1:0]   next_acc,
  output logic [W-1:0]   acc,
  output logic [2:0]     booth_bits,
  output logic [2*N-1:0] product
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0]     q;
  logic             qm1;
  localparam int unsigned L = W + N + 1;
  logic [L-1:0]     shifted;

  assign shifted = L'($signed({next_acc, q, qm1}) >>> 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      q   <= '0;
      qm1 <= 1'b0;
    end else if (load) begin
      acc <= '0;
      q   <= multiplier;
      qm1 <= 1'b0;
    end else if (step) begin
      {acc, q, qm1} <= shifted;
    end
  end

  assign booth_bits = {q[1:0], qm1};
  assign product    = {acc[N-1:0], q};
endmodule
