// Test of the load register: after reset it reads zero; it takes d on a
// clock edge with load high and holds its value with load low.
module tb_load_register;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int unsigned  checks = 0, failures = 0;

  always #500 clk = ~clk;

  load_register dut (.clk, .rst_n, .load, .d, .q);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #90;
    check(q == '0, "reset value");
    rst_n = 1'b1;
    model = '0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      d = $urandom; load = 1'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      check(q == model, $sformatf("cycle %0d: q=%h expected %h", k, q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
