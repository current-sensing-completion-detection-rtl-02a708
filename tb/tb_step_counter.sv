// Test of the 4-bit step counter against a reference count: clear, count
// with wrap-around from 15 to 0, hold, and last high exactly at 15.
module tb_step_counter;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b1, clear = 1'b0, inc = 1'b0, last;
  logic [3:0] count, model;
  int unsigned checks = 0, failures = 0, n_last = 0;

  always #500 clk = ~clk;

  step_counter dut (.clk, .rst_n, .clear, .inc, .count, .last);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #90;
    check(count == 0, "reset value");
    rst_n = 1'b1;
    model = '0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 29) == 0);
      inc   = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear)    model = '0;
      else if (inc) model = model + 1'b1;
      #1;
      check(count == model, $sformatf("cycle %0d: count %0d expected %0d", k, count, model));
      check(last == (model == 4'hF), "last flag");
      if (last) n_last++;
    end
    check(n_last > 0, "never reached the last step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
