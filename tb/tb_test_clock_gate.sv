// Testbench for test_clock_gate. en_master changes shortly after rising
// clock edges (as from a flop) and also, to test glitch freedom, in the
// middle of high phases. Each high phase of tclk must equal the enable
// sampled at the end of the preceding low phase and stay constant during the
// phase; with se = 1, tclk must follow shift_ck.
module tb_test_clock_gate;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, en_master = 1'b0, shift_ck = 1'b0, se = 1'b0;
  logic en, tclk;
  logic sampled;
  int checks = 0, failures = 0, pulses = 0;

  test_clock_gate dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  // clk period 2 ns, driven explicitly so stimulus can sit inside phases
  initial begin
    #0.5;
    rst_n = 1'b0;
    #0.5;
    check(en == 1'b0 && tclk == 1'b0, "reset");
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      // low phase: the enable may change at its start
      en_master = 1'($urandom_range(0, 1));
      #0.9;
      sampled = en_master;
      #0.1;
      clk = 1'b1;                                   // rising edge
      #0.2;
      check(tclk == sampled, "tclk at start of high phase");
      if (tclk) pulses++;
      en_master = ~en_master;                       // change while high
      #0.6;
      check(tclk == sampled, "tclk stable through high phase");
      check(en == sampled, "final enable held while high");
      #0.2;
      clk = 1'b0;
      #0.01;
      check(tclk == 1'b0, "tclk low with clk");
    end
    check(pulses > 50 && pulses < 150, $sformatf("gated pulses %0d", pulses));
    // shift mode
    se = 1'b1;
    for (int k = 0; k < 20; k++) begin
      shift_ck = ~shift_ck;
      clk = ~clk;
      en_master = 1'($urandom_range(0, 1));
      #0.5;
      check(tclk == shift_ck, "shift clock selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
