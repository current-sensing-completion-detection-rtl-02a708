// Exhaustive test of the full adder: all eight input combinations, checked
// against the arithmetic sum, and the output delay checked: the outputs must
// still hold their old values just prev TPD_PS and the new ones just after.
module tb_full_adder;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TPD = 153;

  logic a = 1'b0, b = 1'b0, cin = 1'b0;
  logic sum, cout;
  int unsigned checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] expect_v, prev;
    #(2 * TPD);
    for (int v = 0; v < 8; v++) begin
      prev   = {cout, sum};
      {a, b, cin} = 3'(v);
      expect_v = 2'(a) + 2'(b) + 2'(cin);
      #(TPD - 5);
      check({cout, sum} == prev, $sformatf("outputs moved before the delay for %b", v[2:0]));
      #10;
      check({cout, sum} == expect_v, $sformatf("%b: got %b expected %b", v[2:0], {cout, sum}, expect_v));
      #(TPD);
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
