// Test of the control signal generator: for every combination of clock and
// delayed clock, the phase outputs are compared with the phase table
// (precharge when both high, accumulate when clock low, evaluate when clock
// high and delayed clock low), and exactly one phase must be active.
module tb_control_signal_generator;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, dclk = 1'b0, precharge, accum, eval;
  int unsigned checks = 0, failures = 0;

  control_signal_generator dut (.clk, .dclk, .precharge, .accum, .eval);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [2:0] expect_v;
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        {clk, dclk} = 2'(v);
        #1;
        case ({clk, dclk})
          2'b11:   expect_v = 3'b100;
          2'b10:   expect_v = 3'b001;
          default: expect_v = 3'b010;
        endcase
        check({precharge, accum, eval} == expect_v,
              $sformatf("clk=%b dclk=%b: got %b", clk, dclk, {precharge, accum, eval}));
        check($onehot({precharge, accum, eval}), "phases overlap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
