// Radix-4 Booth multiplier built around a ripple carry adder with
// current-sensing completion detection.
//
// A signed N x N -> 2N multiplier that takes N/2 radix-4 Booth steps. Each
// step adds 0, +/-M or +/-2M to the running partial product and shifts the
// product register right by two. Instead of giving every addition the
// worst-case ripple time, the step controller moves on as soon as the
// adder's current sensor reports that its carries have stopped switching,
// and at once when the Booth digit is zero and no addition is needed.
// The cost of a multiplication is therefore the sum of its additions'
// actual carry-chain delays, rounded up to whole clocks.
//
// Blocks: multiplicand load register, Booth multiple selector (CB2),
// N+2-bit completion-sensing adder (with its delay generator, control
// signal generator, sense inverters and current sensor), skip selector
// (CB3), product load/shift register, Booth decoder, step counter and step
// controller, connected as in the published multiplier diagram.
//
// Interface: start (one clock, while idle) with multiplicand and
// multiplier; done rises when product is valid and holds until the next
// start. All registers load on the rising edge of dclk, the clock delayed by
// the sensor evaluation time; start is sampled there too. addcomp, skip and
// stall expose the step handshake for observation.
// The adder is N+2 bits wide rather than N so that +/-2M and the partial
// product stay exact, which also leaves its carry-out unused (the sum wraps
// in two's complement); the step count is only needed for its last-step
// flag. The width, the reset and the observation ports are this design's
// choices.
module cscd_booth_multiplier
  import cscd_pkg::*;
#(
  parameter int unsigned N = OPERAND_WIDTH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product,
  output logic           busy,
  output logic           done,
  output logic           dclk,
  output logic           addcomp,
  output logic           skip,
  output logic           stall
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W  = N + 2;
  localparam int unsigned CW = $clog2(N / 2);

  logic [N-1:0]  m;
  logic [W-1:0]  acc, operand, sum, next_acc;
  logic          cin, cout;
  logic [2:0]    booth_bits;
  booth_sel_t    sel;
  logic          load, step, last;
  logic [CW-1:0] count;

  cscd_adder #(.WIDTH(W)) u_adder (
    .clk, .dclk,
    .a(acc), .b(operand), .cin,
    .sum, .cout, .done(addcomp)
  );

  load_register #(.WIDTH(N)) u_mcand (
    .clk(dclk), .rst_n, .load, .d(multiplicand), .q(m)
  );

  booth_decoder u_dec (
    .bits(booth_bits), .sel, .zero(skip)
  );

  booth_multiple_select #(.N(N), .W(W)) u_cb2 (
    .m, .sel, .operand, .cin
  );

  skip_select #(.W(W)) u_cb3 (
    .sum, .acc, .skip, .next_acc
  );

  product_shift_register #(.N(N), .W(W)) u_preg (
    .clk(dclk), .rst_n, .load, .multiplier, .step, .next_acc,
    .acc, .booth_bits, .product
  );

  step_counter #(.WIDTH(CW)) u_cnt (
    .clk(dclk), .rst_n, .clear(load), .inc(step), .count, .last
  );

  booth_step_control u_ctl (
    .clk(dclk), .rst_n, .start, .addcomp, .skip, .last,
    .load, .step, .stall, .busy, .done
  );
endmodule
