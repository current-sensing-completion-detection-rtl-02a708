// Exhaustive test of the radix-4 Booth decoder: for all eight bit triples
// the decoded digit (sign and magnitude) must equal
// -2*y[2i+1] + y[2i] + y[2i-1], and zero must flag exactly the zero digit.
module tb_booth_decoder;
  timeunit 1ps; timeprecision 1ps;
  import cscd_pkg::*;

  logic [2:0] bits = '0;
  booth_sel_t sel;
  logic       zero;
  int unsigned checks = 0, failures = 0;

  booth_decoder dut (.bits, .sel, .zero);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int d, got;
    for (int v = 0; v < 8; v++) begin
      bits = 3'(v);
      #1;
      d   = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      got = (sel.two ? 2 : sel.one ? 1 : 0) * (sel.neg ? -1 : 1);
      check(got == d, $sformatf("bits %b: digit %0d expected %0d", bits, got, d));
      check(zero == (d == 0), $sformatf("bits %b: zero flag", bits));
      check(!(sel.one && sel.two), "one and two both set");
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
