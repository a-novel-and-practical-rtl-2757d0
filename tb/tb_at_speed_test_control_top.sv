// End-to-end testbench for at_speed_test_control_top at its default size.
//
// Pair 1: FCK1 1.5 ns / SCK1 3 ns. Pair 2: FCK2 2 ns / SCK2 4 ns. Each slow
// clock toggles on rising edges of its fast clock. The test runs through
// every mode of the controller and counts each:
//   shift      se = 1: all four test clocks follow shift_ck
//   gen1       s = 1, d1 d2 = 10: FCK1 launch, SCK1 capture one FCK1 period later
//   gen2       s = 1, d1 d2 = 01: SCK1 launch, FCK1 capture one FCK1 period later
//   gen3       s = 1, d1 d2 = 11: FCK2 launch, SCK2 capture one FCK2 period later
//   none       s = 1, d1 d2 = 00: no capture pulse at all
//   intra      s = 0: the external intra-clock enables alone decide the
//              pulses (two per clock, as in double capture), whatever d1 d2
// Every capture window must produce exactly the expected pulses on the
// expected clocks and none elsewhere; each mode must have occurred.
module tb_at_speed_test_control_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ictc_pkg::*;

  localparam realtime TF1 = 1.5ns;
  localparam realtime TF2 = 2.0ns;

  logic fck1 = 1'b0, sck1 = 1'b0, fck2 = 1'b0, sck2 = 1'b0;
  logic rst_n = 1'b0, se = 1'b1, shift_ck = 1'b0, s = 1'b1, d1 = 1'b0, d2 = 1'b0;
  en_pair_t intra_en1_master = '0, intra_en2_master = '0;
  logic tfck1, tsck1, tfck2, tsck2;
  en_pair_t en1_final, en2_final;

  int checks = 0, failures = 0;
  int n_f1, n_s1, n_f2, n_s2;
  realtime t_f1, t_s1, t_f2, t_s2;
  int seen_shift = 0, seen_gen1 = 0, seen_gen2 = 0, seen_gen3 = 0, seen_none = 0, seen_intra = 0;

  at_speed_test_control_top dut (.*);

  always #(TF1 / 2) fck1 = ~fck1;
  always #(TF2 / 2) fck2 = ~fck2;
  initial begin
    #(TF1 / 2);
    forever begin sck1 = ~sck1; #(TF1); end
  end
  initial begin
    #(TF2 / 2);
    forever begin sck2 = ~sck2; #(TF2); end
  end

  always @(posedge tfck1) if (!se) begin n_f1++; t_f1 = $realtime; end
  always @(posedge tsck1) if (!se) begin n_s1++; t_s1 = $realtime; end
  always @(posedge tfck2) if (!se) begin n_f2++; t_f2 = $realtime; end
  always @(posedge tsck2) if (!se) begin n_s2++; t_s2 = $realtime; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  // Shift: 12 shift pulses, every test clock must follow shift_ck.
  task automatic shift_phase();
    se = 1'b1;
    for (int k = 0; k < 24; k++) begin
      #5 shift_ck = ~shift_ck;
      #1;
      check(tfck1 == shift_ck && tsck1 == shift_ck && tfck2 == shift_ck && tsck2 == shift_ck,
            "shift clock on all test clocks");
    end
    shift_ck = 1'b0;
    seen_shift++;
    #5;
  endtask

  task automatic capture_window(input bit sel, input bit a, input bit b);
    s  = sel;
    d1 = a;
    d2 = b;
    #1;
    n_f1 = 0; n_s1 = 0; n_f2 = 0; n_s2 = 0;
    se = 1'b0;
    if (!sel) begin
      // intra-clock (double capture style) enables, driven like flop outputs
      fork
        begin
          repeat (12) @(posedge fck1);
          #0.1 intra_en1_master.fck = 1'b1;
          repeat (2) @(posedge fck1);
          #0.1 intra_en1_master.fck = 1'b0;
          repeat (6) @(posedge fck1);
          #0.1 intra_en1_master.sck = 1'b1;
          repeat (4) @(posedge fck1);
          #0.1 intra_en1_master.sck = 1'b0;
        end
        begin
          repeat (12) @(posedge fck2);
          #0.1 intra_en2_master = '{fck: 1'b1, sck: 1'b0};
          repeat (2) @(posedge fck2);
          #0.1 intra_en2_master = '{fck: 1'b0, sck: 1'b1};
          repeat (4) @(posedge fck2);
          #0.1 intra_en2_master = '0;
        end
      join
    end
    repeat (60) @(posedge fck1);
    if (!sel) begin
      check(n_f1 == 2 && n_s1 == 2 && n_f2 == 2 && n_s2 == 2,
            $sformatf("intra: two pulses per clock (%0d %0d %0d %0d)", n_f1, n_s1, n_f2, n_s2));
      seen_intra++;
    end else if ({a, b} == 2'b10) begin
      check(n_f1 == 1 && n_s1 == 1 && n_f2 == 0 && n_s2 == 0, "gen1 pulses");
      check(t_s1 - t_f1 == TF1, "gen1: SCK1 capture one FCK1 period after launch");
      seen_gen1++;
    end else if ({a, b} == 2'b01) begin
      check(n_f1 == 1 && n_s1 == 1 && n_f2 == 0 && n_s2 == 0, "gen2 pulses");
      check(t_f1 - t_s1 == TF1, "gen2: FCK1 capture one FCK1 period after SCK1 launch");
      seen_gen2++;
    end else if ({a, b} == 2'b11) begin
      check(n_f1 == 0 && n_s1 == 0 && n_f2 == 1 && n_s2 == 1, "gen3 pulses");
      check(t_s2 - t_f2 == TF2, "gen3: SCK2 capture one FCK2 period after launch");
      seen_gen3++;
    end else begin
      check(n_f1 + n_s1 + n_f2 + n_s2 == 0, "no generator selected: no pulses");
      seen_none++;
    end
    se = 1'b1;
    #2;
  endtask

  initial begin
    #3 rst_n = 1'b1;
    #10;
    for (int pass = 0; pass < 2; pass++) begin
      shift_phase(); capture_window(1'b1, 1'b1, 1'b0);
      shift_phase(); capture_window(1'b1, 1'b0, 1'b1);
      shift_phase(); capture_window(1'b1, 1'b1, 1'b1);
      shift_phase(); capture_window(1'b1, 1'b0, 1'b0);
      shift_phase(); capture_window(1'b0, 1'b1, 1'b0);
    end
    check(seen_shift > 0, "shift mode exercised");
    check(seen_gen1 > 0, "generator 1 exercised");
    check(seen_gen2 > 0, "generator 2 exercised");
    check(seen_gen3 > 0, "generator 3 exercised");
    check(seen_none > 0, "no-generator code exercised");
    check(seen_intra > 0, "intra-clock mode exercised");
    $display("modes: shift=%0d gen1=%0d gen2=%0d gen3=%0d none=%0d intra=%0d",
             seen_shift, seen_gen1, seen_gen2, seen_gen3, seen_none, seen_intra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
