// Testbench for clock_enable_decoder: all 16 states, for the default
// FCK->SCK windows (S3 in state 3, S4 in states 3..4) and for the SCK->FCK
// windows (S3 in state 5, S4 in states 3..4).
module tb_clock_enable_decoder;
  timeunit 1ns;
  timeprecision 1ps;
  import ictc_pkg::*;

  state_t state;
  logic s3, s4, r3, r4;
  int checks = 0, failures = 0;

  clock_enable_decoder dut (.state(state), .s3(s3), .s4(s4));
  clock_enable_decoder #(
    .FCK_FIRST(4'd5), .FCK_LAST(4'd5),
    .SCK_FIRST(4'd3), .SCK_LAST(4'd4)
  ) dut_rev (.state(state), .s3(r3), .s4(r4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s state %0d", what, state);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      state = state_t'(k);
      #1;
      check(s3 == (k == 3), "S3");
      check(s4 == (k == 3 || k == 4), "S4");
      check(r3 == (k == 5), "reverse S3");
      check(r4 == (k == 3 || k == 4), "reverse S4");
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
