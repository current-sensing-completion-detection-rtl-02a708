// Test of the 32-bit ripple carry adder with completion sensing, run as the
// repeated-random-addition experiment: 100000 random additions at each of
// three clock settings, the padded worst-case period of 5.5 ns divided by
// 2, 3 and 4. Operands change at a rising edge of the delayed clock; at each
// later rising edge the testbench samples done, and when it is high the sum
// must be the true sum (the sensor may never report completion early). The
// number of clocks each addition took must lie between 1 and the bound set
// by the worst-case 32-stage ripple. Repeating the same operands must finish
// in one clock; a full-length carry chain must need more clocks than that.
// The total time is compared with one worst-case 4.9 ns clock per addition.
module tb_cscd_adder;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W       = 32;
  localparam int unsigned CLK2_PS = 5500;
  localparam int unsigned CLK1_PS = 4900;
  localparam int unsigned NVEC    = 100_000;
  localparam int unsigned WORST   = W * (153 + 6) + 400 + 100;

  logic         clk = 1'b0, dclk, cin = 1'b0, cout, done;
  logic [W-1:0] a = '0, b = '0, sum;
  int unsigned  half_ps = CLK2_PS / 4;
  int unsigned  checks = 0, failures = 0;
  int unsigned  n_first = 0, n_wait = 0;

  always #(half_ps) clk = ~clk;

  cscd_adder dut (.clk, .dclk, .a, .b, .cin, .sum, .cout, .done);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply operands at a delayed-clock edge and return the clocks until done.
  task automatic add(input logic [W-1:0] x, input logic [W-1:0] y, input logic c,
                     output int unsigned cyc);
    logic [W:0] expect_v;
    int unsigned bound;
    @(posedge dclk);
    a <= x; b <= y; cin <= c;
    expect_v = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    bound = (WORST + half_ps) / (2 * half_ps) + 2;
    cyc = 0;
    do begin
      @(posedge dclk);
      cyc++;
    end while (!done && cyc < bound + 1);
    check(done, $sformatf("no completion within %0d clocks", bound));
    check({cout, sum} == expect_v,
          $sformatf("%h + %h + %b: completion reported with %h", x, y, c, {cout, sum}));
    if (cyc == 1) n_first++; else n_wait++;
  endtask

  initial begin
    int unsigned cyc, cyc_same, cyc_long;
    longint unsigned total, t_old, t_new;
    for (int r = 0; r < 3; r++) begin
      half_ps = CLK2_PS / (2 * (r + 2));
      repeat (2) @(posedge clk);
      add('0, '0, 1'b0, cyc);
      add('0, '0, 1'b0, cyc_same);
      check(cyc_same == 1, $sformatf("unchanged operands took %0d clocks", cyc_same));
      add('1, W'(1), 1'b0, cyc_long);
      check(cyc_long > cyc_same, "a full-length carry chain finished as fast as no change");
      total = 0;
      for (int k = 0; k < NVEC; k++) begin
        add($urandom, $urandom, 1'($urandom), cyc);
        total += 64'(cyc);
      end
      t_new = total * 64'(2 * half_ps);
      t_old = 64'(NVEC) * 64'(CLK1_PS);
      $display("clock %0d ps: %0d additions, %0.3f clocks each, %0.1f%% time saved against %0d ps per addition",
               2 * half_ps, NVEC, real'(total) / real'(NVEC),
               100.0 * (real'(t_old) - real'(t_new)) / real'(t_old), CLK1_PS);
    end
    check(n_first > 0, "no addition completed in one clock");
    check(n_wait  > 0, "no addition had to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
