// Testbench for generator_selector: all four codes of D1, D2.
module tb_generator_selector;
  timeunit 1ns;
  timeprecision 1ps;

  logic d1, d2;
  logic [3:1] ge;
  int checks = 0, failures = 0;

  generator_selector dut (.*);

  initial begin
    logic [3:1] want [4];
    want[0] = 3'b000;  // d1=0 d2=0
    want[1] = 3'b010;  // d1=0 d2=1 -> GE2
    want[2] = 3'b001;  // d1=1 d2=0 -> GE1
    want[3] = 3'b100;  // d1=1 d2=1 -> GE3
    for (int k = 0; k < 4; k++) begin
      {d1, d2} = 2'(k);
      #1;
      checks++;
      if (ge !== want[k]) begin
        failures++;
        $display("FAIL d1=%b d2=%b ge=%b", d1, d2, ge);
      end
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
