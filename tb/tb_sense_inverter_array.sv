// Test of the sense inverter array model: toggling k carry nodes must give a
// sense current of k units at once, which must return to 0 once the 100 ps
// transition window has passed; all 32 nodes switching gives 32 units.
module tb_sense_inverter_array;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W    = 32;
  localparam int unsigned RAMP = 100;

  logic [W-1:0] carry = '0;
  int unsigned  isens;
  int unsigned  checks = 0, failures = 0;

  sense_inverter_array dut (.carry, .isens);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] flip;
    #(3 * RAMP);
    check(isens == 0, "current with quiet nodes");
    for (int k = 0; k < 40; k++) begin
      flip = (k == 0) ? '1 : W'($urandom);
      carry = carry ^ flip;
      #(RAMP / 2);
      check(isens == $countones(flip), $sformatf("isens %0d for %0d switching nodes", isens, $countones(flip)));
      #(RAMP);
      check(isens == 0, "current did not stop after the transition window");
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
