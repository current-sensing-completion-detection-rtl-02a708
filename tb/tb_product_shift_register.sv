// Test of the Booth product load/shift register against a reference model:
// load must set {0, multiplier, 0}; each step must take next_acc and shift
// the whole register right by two arithmetically; idle cycles must hold.
// The Booth bit triple and the product view are checked every cycle.
module tb_product_shift_register;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int unsigned W = N + 2;

  logic           clk = 1'b0, rst_n = 1'b1, load = 1'b0, step = 1'b0;
  logic [N-1:0]   multiplier = '0;
  logic [W-1:0]   next_acc = '0, acc;
  logic [2:0]     booth_bits;
  logic [2*N-1:0] product;
  logic [W+N:0]   model;
  int unsigned    checks = 0, failures = 0;

  always #500 clk = ~clk;

  product_shift_register dut (.clk, .rst_n, .load, .multiplier, .step, .next_acc,
                              .acc, .booth_bits, .product);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #90;
    rst_n = 1'b1;
    model = '0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      load = ($urandom_range(0, 9) == 0);
      step = 1'($urandom);
      multiplier = $urandom;
      next_acc = {$urandom, $urandom};
      @(posedge clk);
      if (load)      model = {W'(0), multiplier, 1'b0};
      else if (step) begin
        model = {next_acc, model[N:0]};
        model = (W+N+1)'($signed(model) >>> 2);
      end
      #1;
      check(acc == model[W+N:N+1], $sformatf("cycle %0d: register", k));
      check(booth_bits == model[2:0], $sformatf("cycle %0d: booth bits", k));
      check(product == model[2*N:1], $sformatf("cycle %0d: product view", k));
    end
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
