// End-to-end test of the completion-sensing radix-4 Booth multiplier at its
// default size (32 x 32 -> 64 bits).
//
// Corner operands at a clock of 1.375 ns (the padded worst-case addition
// period of 5.5 ns divided by 4), then four runs of 1000 random signed
// multiplications at 5.5 ns and at 5.5 ns / 2, / 3 and / 4. Every product is compared with the product computed by the
// testbench. The number of clocks a multiplication takes is checked against
// its own step bookkeeping: one clock per Booth step plus one per stall
// cycle. The test also counts how often each mechanism happened: skipped
// additions (zero Booth digit), additions accepted on their first clock,
// stalls waiting for the adder, and completed multiplications; each must
// occur at least once. The time per run is compared with a multiplier that
// gives every step one worst-case 4.9 ns clock.
module tb_cscd_booth_multiplier;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N        = 32;
  localparam int unsigned CLK_PS   = 1375;   // Clk2/4, used for the corner cases
  localparam int unsigned CLK2_PS  = 5500;   // 4.9 + 0.2 + 0.4 ns
  localparam int unsigned CLK1_PS  = 4900;
  localparam int unsigned RUNS     = 4;
  localparam int unsigned NMUL     = 1000;
  localparam int unsigned WATCHDOG = 800_000;

  logic           clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [N-1:0]   mcand = '0, mplier = '0;
  logic [2*N-1:0] product;
  logic           busy, done, dclk, addcomp, skip, stall;

  int unsigned checks = 0, failures = 0;
  int unsigned n_skip = 0, n_first = 0, n_stall = 0, n_mul = 0;
  longint unsigned cycles_total = 0, cyc0 = 0, t_new = 0, t_old = 0;
  int unsigned stall0 = 0, last_cycles = 0;
  int unsigned half_ps = CLK_PS / 2;
  bit pending_fresh = 1'b0;

  always #(half_ps) clk = ~clk;

  cscd_booth_multiplier dut (
    .clk, .rst_n, .start, .multiplicand(mcand), .multiplier(mplier),
    .product, .busy, .done, .dclk, .addcomp, .skip, .stall
  );

  // Mechanism counters, sampled at the active (delayed-clock) edge.
  always @(posedge dclk) begin
    if (busy) begin
      if (skip) begin
        n_skip++;
        pending_fresh = 1'b1;
      end else if (addcomp) begin
        if (pending_fresh) n_first++;
        pending_fresh = 1'b1;
      end else begin
        n_stall++;
        pending_fresh = 1'b0;
      end
    end else begin
      pending_fresh = 1'b1;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic multiply(input logic [N-1:0] a, input logic [N-1:0] b);
    longint signed  expect_p;
    int unsigned    cyc, stalls0, stalls;
    @(negedge dclk);
    mcand = a; mplier = b; start = 1'b1;
    @(negedge dclk);
    start   = 1'b0;
    stalls0 = n_stall;
    cyc     = 0;
    while (!done) begin
      @(negedge dclk);
      cyc++;
    end
    stalls   = n_stall - stalls0;
    expect_p = longint'($signed(a)) * longint'($signed(b));
    check(product == 64'(expect_p),
          $sformatf("%0d * %0d = %0d, got %0d", $signed(a), $signed(b), expect_p, $signed(product)));
    check(cyc == N / 2 + stalls,
          $sformatf("latency %0d clocks, expected %0d steps + %0d stalls", cyc, N / 2, stalls));
    cycles_total += 64'(cyc);
    last_cycles = cyc;
    n_mul++;
  endtask

  initial begin
    logic [N-1:0] corner [8];
    corner = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
               32'h5555_5555, 32'hAAAA_AAAA, 32'h0001_0000};
    #10 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) multiply(corner[i], corner[j]);
    // All-zero multiplier: every digit is zero, every step is skipped.
    stall0 = n_stall;
    multiply(32'h1234_5678, 32'h0);
    check(n_stall == stall0, "zero multiplier must not wait for the adder");
    check(last_cycles == N / 2, "zero multiplier must take exactly one clock per step");
    // One run per clock setting: Clk2, Clk2/2, Clk2/3, Clk2/4.
    for (int r = 0; r < RUNS; r++) begin
      @(negedge dclk);
      half_ps = CLK2_PS / (2 * (r + 1));
      cyc0 = cycles_total;
      for (int k = 0; k < NMUL; k++) multiply($urandom, $urandom);
      t_new = (cycles_total - cyc0) * 2 * half_ps;
      t_old = 64'(NMUL) * 64'(N / 2) * 64'(CLK1_PS);
      $display("run %0d: clock %0d ps, %0d multiplications, %0d ps against %0d ps at one 4.9 ns clock per step: %0.1f%% saved",
               r + 1, 2 * half_ps, NMUL, t_new, t_old, 100.0 * (real'(t_old) - real'(t_new)) / real'(t_old));
    end
    $display("mechanisms: skipped additions=%0d first-clock additions=%0d stall cycles=%0d multiplications=%0d",
             n_skip, n_first, n_stall, n_mul);
    check(n_skip  > 0, "no addition was skipped");
    check(n_first > 0, "no addition completed on its first clock");
    check(n_stall > 0, "the controller never waited for the adder");
    check(n_mul   > 0, "no multiplication completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
