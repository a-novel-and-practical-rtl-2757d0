// Workload testbench: the six inter-clock logic blocks of the published
// application (from-clock -> to-clock in MHz: A 100->300, B 133->533,
// C 133->266, D 533->133, E 266->533, F 266->133), each with its own
// generator (8-stage delay generator, RATIO and DIR set for its clocks) and
// its own clocks. Periods are whole picoseconds with exact integer ratios:
// 533 MHz is 1876 ps, 266 MHz 3750 or 3752 ps, 133 MHz 7500 or 7504 ps,
// 300 MHz 3334 ps and 100 MHz 10002 ps. One scan enable falls for all of
// them at once. Each block must get exactly one launch pulse on its
// from-clock and one capture pulse on its to-clock, the capture one
// fast-clock period after the launch, and the launch at least 7 fast
// periods after SE falls (13 ns or more at 533 MHz).
module tb_table2_workloads;
  timeunit 1ns;
  timeprecision 1ps;
  import ictc_pkg::*;

  localparam int K = 6;
  localparam int unsigned TF [K] = '{3334, 1876, 3750, 1876, 1876, 3750};
  localparam int unsigned RT [K] = '{3, 4, 2, 4, 2, 2};
  localparam direction_t  DR [K] = '{SLOW_TO_FAST, SLOW_TO_FAST, SLOW_TO_FAST,
                                     FAST_TO_SLOW, SLOW_TO_FAST, FAST_TO_SLOW};
  localparam string       NM [K] = '{"A", "B", "C", "D", "E", "F"};

  logic rst_n = 1'b0, se = 1'b1;
  int     n_fast [K], n_slow [K];
  longint t_fast [K], t_slow [K];
  longint t_se;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < K; k++) begin : g_ch
    workload_channel #(.TF_PS(TF[k]), .RATIO(RT[k]), .DIR(DR[k])) u_ch (
      .rst_n(rst_n), .se(se),
      .n_fast(n_fast[k]), .n_slow(n_slow[k]), .t_fast(t_fast[k]), .t_slow(t_slow[k])
    );
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    #5 rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      se = 1'b1;
      #(200ns + $urandom_range(0, 30000) * 1ps);
      se = 1'b0;
      t_se = longint'($realtime / 1ps);
      #400ns;
      for (int k = 0; k < K; k++) begin
        longint launch, capture;
        launch  = (DR[k] == FAST_TO_SLOW) ? t_fast[k] : t_slow[k];
        capture = (DR[k] == FAST_TO_SLOW) ? t_slow[k] : t_fast[k];
        check(n_fast[k] == 1 && n_slow[k] == 1,
              $sformatf("block %s: one pulse per clock (%0d, %0d)", NM[k], n_fast[k], n_slow[k]));
        check(capture - launch == longint'(TF[k]),
              $sformatf("block %s: capture %0d ps after launch", NM[k], capture - launch));
        check(launch - t_se >= 7 * longint'(TF[k]),
              $sformatf("block %s: d1 = %0d ps", NM[k], launch - t_se));
        if (TF[k] == 1876) check(launch - t_se >= 13000, "d1 of at least 13 ns at 533 MHz");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
