// Carry-propagation experiment on the 32-bit ripple carry adder.
//
// 100000 random additions, each applied after resetting the adder to 0 + 0
// (all carries low). The time from applying the operands to the last change
// of any carry node is measured in stage delays and collected in a histogram
// of carry-chain lengths. Each measurement is checked against the chain
// length computed from the operands: a carry generated at bit i (a & b) and
// rippling through k following propagate bits (a ^ b) settles after k + 1
// stages; the adder's settling time is the longest such chain. The
// histogram and the mean chain length are printed.
module tb_carry_propagation;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W    = 32;
  localparam int unsigned TPD  = 153;
  localparam int unsigned NVEC = 100_000;

  logic [W-1:0] a = '0, b = '0, sum, carry;
  logic         cin = 1'b0, cout;
  longint unsigned t_last, n_events;
  int unsigned  checks = 0, failures = 0;
  int unsigned  hist [W+1];

  ripple_carry_adder dut (.a, .b, .cin, .sum, .cout, .carry);

  // Time stamp of the latest carry-node change.
  always @(carry) begin
    t_last = $time;
    n_events++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned longest_chain(input logic [W-1:0] x, input logic [W-1:0] y);
    int unsigned best = 0, run = 0;
    for (int i = 0; i < W; i++) begin
      if (x[i] & y[i])        run = 1;            // generate starts a chain
      else if (x[i] ^ y[i])   run = (run != 0) ? run + 1 : 0;  // propagate extends it
      else                    run = 0;            // kill ends it
      if (run > best) best = run;
    end
    return best;
  endfunction

  initial begin
    longint unsigned t0;
    int unsigned measured, expect_v;
    longint unsigned total;
    total = 0;
    t_last = 0;
    n_events = 0;
    foreach (hist[i]) hist[i] = 0;
    #((W + 2) * TPD);
    for (int k = 0; k < NVEC; k++) begin
      a = '0; b = '0;
      #((W + 1) * TPD);
      t0 = $time;
      a = $urandom; b = $urandom;
      #((W + 1) * TPD);
      if (t_last < t0) t_last = t0;  // no carry node moved
      measured = int'((t_last - t0) / 64'(TPD));
      expect_v = longest_chain(a, b);
      check(measured == expect_v && (t_last - t0) % 64'(TPD) == 0,
            $sformatf("%h + %h: settled after %0d ps, expected %0d stages", a, b, t_last - t0, expect_v));
      check({cout, sum} == {1'b0, a} + {1'b0, b}, "sum");
      hist[measured]++;
      total += 64'(measured);
    end
    check(n_events > 0, "no carry node ever moved");
    $display("longest carry chain over %0d random additions, mean %0.2f stages:", NVEC, real'(total) / real'(NVEC));
    for (int i = 0; i <= W; i++) if (hist[i] != 0) $display("  %2d stages: %0d", i, hist[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
