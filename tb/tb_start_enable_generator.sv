// Testbench for start_enable_generator. FCK (1.5 ns) and SCK (3 ns) rise
// together, as from one PLL; SCK is delayed 0.1 ns before sampling. The
// check: s2 is high exactly in every FCK period in which SCK is low and the
// SCK rising edge three FCK edges earlier was sampled as a 0 -> 1 step, i.e.
// one period per SCK period, always in an SCK-low period.
module tb_start_enable_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic fck = 1'b0, sck = 1'b0, sck_d, rst_n = 1'b0, s2;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, pulses = 0;
  logic [3:0] model = '0;  // independent model of the sampled history

  assign #0.1 sck_d = sck;
  start_enable_generator dut (.*);

  always #0.75 fck = ~fck;
  always @(posedge fck) if (cyc % 2 == 0) sck <= 1'b1; else sck <= 1'b0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  always @(posedge fck) begin
    cyc <= cyc + 1;
    if (rst_n) model <= {model[2:0], sck_d};
  end

  initial begin
    repeat (3) @(negedge fck);
    check(s2 == 1'b0, "reset");
    rst_n = 1'b1;
    repeat (100) begin
      @(negedge fck);
      check(s2 == (model[2] & ~model[3]), "s2 against model");
      if (s2) begin
        pulses++;
        check(sck == 1'b0, "s2 only while SCK is low");
      end
    end
    check(pulses >= 48 && pulses <= 50, $sformatf("one pulse per SCK period (%0d)", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge fck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
