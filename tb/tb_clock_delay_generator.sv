// Test of the clock delay generator: dclk must copy clk 400 ps later, and
// must not have moved 10 ps before that.
module tb_clock_delay_generator;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 400;

  logic clk = 1'b0, dclk;
  int unsigned checks = 0, failures = 0;

  clock_delay_generator dut (.clk, .dclk);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(2 * D);
    for (int k = 0; k < 20; k++) begin
      clk = ~clk;
      #(D - 10);
      check(dclk != clk, "dclk moved too early");
      #20;
      check(dclk == clk, "dclk did not follow clk after the delay");
      #(D + 300);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
