// Testbench for state_machine: after a start pulse the state must be 1, 2,
// ..., 15, 0 in consecutive FCK periods and then stay 0; start pulses while
// counting are ignored.
module tb_state_machine;
  timeunit 1ns;
  timeprecision 1ps;
  import ictc_pkg::*;

  logic fck = 1'b0, rst_n = 1'b0, start = 1'b0;
  state_t state;
  int checks = 0, failures = 0;

  state_machine dut (.*);

  always #0.75 fck = ~fck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t (state %0d)", what, $time, state);
    end
  endtask

  initial begin
    repeat (2) @(negedge fck);
    check(state == 0, "reset");
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge fck);
      check(state == 0, "idle without start");
    end
    for (int run = 0; run < 3; run++) begin
      start = 1'b1;
      @(negedge fck);
      start = 1'b0;
      for (int k = 1; k <= 15; k++) begin
        check(state == state_t'(k), $sformatf("count %0d", k));
        if (run == 2) start = 1'($urandom_range(0, 1));  // ignored while counting
        @(negedge fck);
      end
      start = 1'b0;
      check(state == 0, "back to 0");
      repeat (4) begin
        @(negedge fck);
        check(state == 0, "stops at 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge fck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
