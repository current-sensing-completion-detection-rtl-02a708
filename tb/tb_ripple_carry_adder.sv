// Test of the 32-bit ripple carry adder: random operands and carry-in
// checked against the arithmetic sum once the worst-case ripple time has
// passed, the carry node vector checked against carries computed bit by bit,
// and the ripple latency of a full-length carry chain (all ones plus one)
// checked: cout must not have risen before 31 stage delays and must have
// risen after 32.
module tb_ripple_carry_adder;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W   = 32;
  localparam int unsigned TPD = 153;

  logic [W-1:0] a = '0, b = '0, sum, carry;
  logic         cin = 1'b0, cout;
  int unsigned  checks = 0, failures = 0;

  ripple_carry_adder dut (.a, .b, .cin, .sum, .cout, .carry);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W:0]   expect_v;
    logic [W-1:0] expect_c;
    logic         c;
    #((W + 2) * TPD);
    for (int k = 0; k < 300; k++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      #((W + 1) * TPD);
      expect_v = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      c = cin;
      for (int i = 0; i < W; i++) begin
        c = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
        expect_c[i] = c;
      end
      check({cout, sum} == expect_v, $sformatf("%h + %h + %b: got %h", a, b, cin, {cout, sum}));
      check(carry == expect_c, "carry nodes");
    end
    // Full-length chain.
    a = '0; b = '0; cin = 1'b0;
    #((W + 1) * TPD);
    a = '1; b = W'(1);
    #((W - 1) * TPD - 10);
    check(cout == 1'b0, "cout rose before the full chain could ripple");
    #(2 * TPD + 20);
    check(cout == 1'b1 && sum == '0, "full chain did not complete in time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
