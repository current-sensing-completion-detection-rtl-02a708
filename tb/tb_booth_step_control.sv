// Test of the Booth step controller against a reference model. Random start,
// add-completion, skip and last-step inputs are driven; load, step, stall,
// busy and done are compared every clock: a step is taken on skip or add
// completion only while running, a stall otherwise, the last step ends the
// run with done held until the next start, and start is ignored while busy.
module tb_booth_step_control;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, addcomp = 1'b0, skip = 1'b0, last = 1'b0;
  logic load, step, stall, busy, done;
  bit   m_busy, m_done;
  int unsigned checks = 0, failures = 0, n_run = 0, n_stall = 0, n_done = 0;

  always #500 clk = ~clk;

  booth_step_control dut (.clk, .rst_n, .start, .addcomp, .skip, .last,
                          .load, .step, .stall, .busy, .done);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit e_load, e_step;
    #10 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #90;
    rst_n = 1'b1;
    m_busy = 1'b0; m_done = 1'b0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      start   = 1'($urandom);
      addcomp = 1'($urandom);
      skip    = ($urandom_range(0, 3) == 0);
      last    = ($urandom_range(0, 5) == 0);
      #1;
      e_load = !m_busy && start;
      e_step = m_busy && (skip || addcomp);
      check(load == e_load && step == e_step && stall == (m_busy && !e_step) &&
            busy == m_busy && done == m_done,
            $sformatf("cycle %0d: load %b step %b stall %b busy %b done %b", k, load, step, stall, busy, done));
      if (m_busy) n_run++;
      if (m_busy && !e_step) n_stall++;
      @(posedge clk);
      if (e_load) begin m_busy = 1'b1; m_done = 1'b0; end
      else if (e_step && last) begin m_busy = 1'b0; m_done = 1'b1; n_done++; end
    end
    check(n_stall > 0 && n_done > 0 && n_run > 0, "stall and completion both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
