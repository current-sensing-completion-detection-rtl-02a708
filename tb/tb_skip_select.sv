// Test of the skip selector: with skip high the unchanged partial product
// must pass, with skip low the adder sum.
module tb_skip_select;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = 34;

  logic [W-1:0] sum = '0, acc = '0, next_acc;
  logic         skip = 1'b0;
  int unsigned  checks = 0, failures = 0;

  skip_select dut (.sum, .acc, .skip, .next_acc);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 100; k++) begin
      sum  = {$urandom, $urandom};
      acc  = {$urandom, $urandom};
      skip = 1'($urandom);
      #1;
      check(next_acc == (skip ? acc : sum), $sformatf("skip=%b", skip));
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
