// Testbench for delay_generator: drives random scan-enable values and checks
// that s1 is se delayed by exactly N FCK edges, and 1 out of reset.
module tb_delay_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;
  logic fck = 1'b0, rst_n = 1'b0, se = 1'b1, s1;
  int checks = 0, failures = 0;
  logic [N-1:0] model = '1;

  delay_generator #(.N(N)) dut (.*);

  always #0.75 fck = ~fck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge fck);
    check(s1 == 1'b1, "reset value");
    rst_n = 1'b1;
    // a single falling SE edge: count edges until s1 falls
    se = 1'b0;
    for (int k = 1; k <= N + 2; k++) begin
      @(negedge fck);
      check(s1 == (k < N), $sformatf("s1 after %0d edges", k));
    end
    se = 1'b1;
    repeat (N + 1) @(negedge fck);
    model = '1;
    for (int k = 0; k < 300; k++) begin
      se = 1'($urandom_range(0, 1));
      @(posedge fck);
      model = {model[N-2:0], se};
      @(negedge fck);
      check(s1 == model[N-1], "random sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge fck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
