// Testbench for start_signal_generator: random S1/S2 stimulus compared with
// an independent "armed" model: start pulses for one FCK period at the edge
// after the first S1 = 0, S2 = 1 cycle, and then not again until S1 has been
// 1. Also covers the long capture window in which S2 repeats many times.
module tb_start_signal_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic fck = 1'b0, rst_n = 1'b0, s1 = 1'b1, s2 = 1'b0, start;
  int checks = 0, failures = 0, pulses = 0;
  logic armed = 1'b1, exp_start = 1'b0;

  start_signal_generator dut (.*);

  always #0.75 fck = ~fck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  always @(posedge fck) if (rst_n) begin
    exp_start <= armed & ~s1 & s2;
    armed     <= s1 ? 1'b1 : (armed & ~s2);
  end

  initial begin
    repeat (2) @(negedge fck);
    check(start == 1'b0, "reset");
    rst_n = 1'b1;
    // directed: S1 falls, S2 pulses every second cycle for 40 cycles
    s1 = 1'b0;
    for (int k = 0; k < 40; k++) begin
      s2 = k[0];
      @(negedge fck);
      check(start == exp_start, "directed window");
      if (start) pulses++;
    end
    check(pulses == 1, $sformatf("one start in a long window (%0d)", pulses));
    s1 = 1'b1;
    s2 = 1'b0;
    @(negedge fck);
    // random
    for (int k = 0; k < 2000; k++) begin
      s1 = ($urandom_range(0, 15) == 0);
      s2 = 1'($urandom_range(0, 1));
      @(negedge fck);
      check(start == exp_start, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge fck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
