// Step controller of the Booth multiplier (the adder-enable logic).
//
// Sequences one multiplication. In IDLE a start loads the operands and moves
// to RUN. In RUN each rising clock edge either advances one Booth step or
// waits:
//   skip    the Booth digit is zero, no addition is needed: step now;
//   addcomp the adder's completion flag is high: the sum has settled, step;
//   neither the addition is still rippling: hold and test again next clock.
// When the last step is taken, done (multiplication complete) rises and
// stays high until the next start. stall is high in the cycles spent
// waiting for the adder. Stepping on either start or add completion follows
// the published multiplier; the encoding of states is this design's own.
// The clock is the delayed clock, whose rising edge ends the sensor's
// evaluation phase. Asynchronous active-low reset.
module booth_step_control (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic addcomp,
  input  logic skip,
  input  logic last,
  output logic load,
  output logic step,
  output logic stall,
  output logic busy,
  output logic done
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  assign busy  = (state == RUN);
  assign load  = (state == IDLE) && start;
  assign step  = busy && (skip || addcomp);
  assign stall = busy && !step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
    end else if (load) begin
      state <= RUN;
      done  <= 1'b0;
    end else if (step && last) begin
      state <= IDLE;
      done  <= 1'b1;
    end
  end

  // A step is only ever taken inside a multiplication.
  a_step_in_run: assert property (@(posedge clk) disable iff (!rst_n) step |-> busy);
  // Start and done never coincide with a running multiplication's load.
  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load);
endmodule
