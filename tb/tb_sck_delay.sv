// Testbench for the sck_delay behavioural model: toggles sck and checks that
// sck_d still holds the old value just before DELAY_PS and the new one after.
module tb_sck_delay;
  timeunit 1ns;
  timeprecision 1ps;

  logic sck = 1'b0, sck_d;
  int checks = 0, failures = 0;

  sck_delay dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    #1;
    check(sck_d == 1'b0, "initial");
    for (int k = 0; k < 20; k++) begin
      sck = ~sck;
      #0.09;
      check(sck_d != sck, "before delay");
      #0.02;
      check(sck_d == sck, "after delay");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
