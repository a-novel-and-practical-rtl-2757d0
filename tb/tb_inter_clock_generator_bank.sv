// Testbench for inter_clock_generator_bank at its default size. Clocks as in
// the top-level test (pair 1: 1.5/3 ns, pair 2: 2/4 ns). The testbench
// gates the clocks with its own model of the final-enable latches and, for
// each select code, checks the master enables and the resulting pulses:
// only the selected generator acts, generator 1 and 3 give launch on the
// fast clock and capture on the slow clock one fast period later,
// generator 2 the reverse, and code 00 gives nothing.
module tb_inter_clock_generator_bank;
  timeunit 1ns;
  timeprecision 1ps;
  import ictc_pkg::*;

  localparam realtime TF1 = 1.5ns;
  localparam realtime TF2 = 2.0ns;

  logic fck1 = 1'b0, sck1 = 1'b0, fck2 = 1'b0, sck2 = 1'b0;
  logic rst_n = 1'b0, se = 1'b1, d1 = 1'b0, d2 = 1'b0;
  en_pair_t en1_master, en2_master;
  logic lf1 = 1'b0, ls1 = 1'b0, lf2 = 1'b0, ls2 = 1'b0;
  int checks = 0, failures = 0;
  int n_f1, n_s1, n_f2, n_s2;
  realtime t_f1, t_s1, t_f2, t_s2;

  inter_clock_generator_bank dut (.*);

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

  always_latch if (!fck1) lf1 = en1_master.fck;
  always_latch if (!sck1) ls1 = en1_master.sck;
  always_latch if (!fck2) lf2 = en2_master.fck;
  always_latch if (!sck2) ls2 = en2_master.sck;

  always @(posedge fck1) if (lf1) begin n_f1++; t_f1 = $realtime; end
  always @(posedge sck1) if (ls1) begin n_s1++; t_s1 = $realtime; end
  always @(posedge fck2) if (lf2) begin n_f2++; t_f2 = $realtime; end
  always @(posedge sck2) if (ls2) begin n_s2++; t_s2 = $realtime; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  task automatic window(input bit a, input bit b);
    se = 1'b1;
    d1 = a;
    d2 = b;
    repeat (12) @(posedge fck1);
    #($urandom_range(10, 2900) * 1ps);
    n_f1 = 0; n_s1 = 0; n_f2 = 0; n_s2 = 0;
    se = 1'b0;
    repeat (50) @(posedge fck1);
    case ({a, b})
      2'b10: begin
        check(n_f1 == 1 && n_s1 == 1 && n_f2 == 0 && n_s2 == 0, "gen1 pulses");
        check(t_s1 - t_f1 == TF1, "gen1 timing");
      end
      2'b01: begin
        check(n_f1 == 1 && n_s1 == 1 && n_f2 == 0 && n_s2 == 0, "gen2 pulses");
        check(t_f1 - t_s1 == TF1, "gen2 timing");
      end
      2'b11: begin
        check(n_f1 == 0 && n_s1 == 0 && n_f2 == 1 && n_s2 == 1, "gen3 pulses");
        check(t_s2 - t_f2 == TF2, "gen3 timing");
      end
      default: check(n_f1 + n_s1 + n_f2 + n_s2 == 0, "no generator: no pulses");
    endcase
  endtask

  initial begin
    #3 rst_n = 1'b1;
    for (int k = 0; k < 12; k++) window(k[1], k[0]);
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
