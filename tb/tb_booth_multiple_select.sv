// Test of the Booth multiple selector: for random and extreme multiplicands
// and every digit -2..+2, operand + cin taken as a 34-bit two's-complement
// number must equal digit * multiplicand.
module tb_booth_multiple_select;
  timeunit 1ps; timeprecision 1ps;
  import cscd_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned W = N + 2;

  logic [N-1:0] m = '0;
  booth_sel_t   sel = '0;
  logic [W-1:0] operand;
  logic         cin;
  int unsigned  checks = 0, failures = 0;

  booth_multiple_select dut (.m, .sel, .operand, .cin);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint signed expect_v, got;
    for (int k = 0; k < 200; k++) begin
      m = (k == 0) ? 32'h8000_0000 : (k == 1) ? 32'h7FFF_FFFF : (k == 2) ? '0 : $urandom;
      for (int d = -2; d <= 2; d++) begin
        sel.neg = (d < 0);
        sel.one = (d == 1) || (d == -1);
        sel.two = (d == 2) || (d == -2);
        #1;
        expect_v = longint'(d) * longint'($signed(m));
        got      = longint'($signed(W'(operand + W'(cin))));
        check(got == expect_v, $sformatf("m=%0d d=%0d: got %0d", $signed(m), d, got));
      end
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
