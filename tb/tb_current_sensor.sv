// Test of the current sensor model. Phases are driven as the control signal
// generator makes them (precharge, accumulate, evaluate). Each period either
// keeps the sense current at zero, or raises it for a short pulse at a
// random point of the accumulation window, or raises it only during
// precharge. addcomp must be high after evaluation exactly when no current
// flowed during accumulation, and must hold its value until the next
// evaluation.
module tb_current_sensor;
  timeunit 1ps; timeprecision 1ps;

  logic        precharge = 1'b0, accum = 1'b0, eval = 1'b0, addcomp;
  int unsigned isens = 0;
  int unsigned checks = 0, failures = 0;

  current_sensor dut (.isens, .precharge, .accum, .eval, .addcomp);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned kind, at;
    bit expect_v;
    for (int k = 0; k < 200; k++) begin
      kind = $urandom_range(0, 2);
      at   = $urandom_range(10, 500);
      // precharge
      precharge = 1'b1;
      if (kind == 2) begin isens = 5; #100; isens = 0; #200; end else #300;
      precharge = 1'b0;
      // accumulate
      accum = 1'b1;
      if (kind == 1) begin #(at); isens = $urandom_range(1, 32); #30; isens = 0; #(600 - at - 30); end
      else #600;
      accum = 1'b0;
      expect_v = (kind != 1);
      // evaluate
      eval = 1'b1;
      #50;
      check(addcomp == expect_v, $sformatf("period %0d kind %0d: addcomp %b", k, kind, addcomp));
      #350;
      eval = 1'b0;
      #1;
      check(addcomp == expect_v, "addcomp did not hold after evaluation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
