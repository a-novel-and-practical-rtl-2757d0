// At-speed test clock controller for a clock domain with two synchronous
// clock pairs (FCK1/SCK1 and FCK2/SCK2, fast:slow = RATIO1 and RATIO2,
// 2:1 by default).
//
// Shift mode (se = 1): every test clock carries the common shift clock.
// Capture mode (se = 0): each test clock is its free-running functional
// clock gated by a final enable. The master enable of each clock is chosen
// by s: s = 0 takes it from an intra-clock enable generator (a separate
// controller, for example double capture, whose enables enter here as
// inputs); s = 1 takes it from the bank of inter-clock enable generators,
// of which d1/d2 select the one for FCK1->SCK1 (d1=1,d2=0), SCK1->FCK1
// (d1=0,d2=1) or FCK2->SCK2 (d1=1,d2=1). Each master enable then passes a
// latch transparent while its clock is low and an AND gate (test_clock_gate).
//
// Interface: fck1, sck1, fck2, sck2 (PLL clocks), rst_n (asynchronous,
// active low), se, shift_ck, s, d1, d2, and the intra-clock master enables
// in; the test clocks tfck1, tsck1, tfck2, tsck2 and the latched final
// enables en1_final, en2_final out.
// Timing: in an inter-clock capture window the selected generator issues
// exactly one launch pulse and, one FCK period later, one capture pulse,
// starting about N_DELAY + 5 FCK periods after se falls.
// The structure follows the published scheme: its basic architecture, its
// selection among several generators and its intra/inter integration. One
// shift clock for all test clocks and the per-clock shift multiplexer come
// from the basic architecture; joining the three into one top with two
// clock pairs is this design's own choice.
module at_speed_test_control_top
  import ictc_pkg::*;
#(
  parameter int unsigned N_DELAY = 8,
  parameter int unsigned RATIO1  = 2,
  parameter int unsigned RATIO2  = 2
) (
  input  logic     fck1,
  input  logic     sck1,
  input  logic     fck2,
  input  logic     sck2,
  input  logic     rst_n,
  input  logic     se,
  input  logic     shift_ck,
  input  logic     s,
  input  logic     d1,
  input  logic     d2,
  input  en_pair_t intra_en1_master,
  input  en_pair_t intra_en2_master,
  output logic     tfck1,
  output logic     tsck1,
  output logic     tfck2,
  output logic     tsck2,
  output en_pair_t en1_final,
  output en_pair_t en2_final
);
  timeunit 1ns;
  timeprecision 1ps;

  en_pair_t inter1, inter2, m1, m2;

  inter_clock_generator_bank #(
    .N_DELAY(N_DELAY), .RATIO1(RATIO1), .RATIO2(RATIO2)
  ) u_bank (
    .fck1(fck1), .sck1(sck1), .fck2(fck2), .sck2(sck2),
    .rst_n(rst_n), .se(se), .d1(d1), .d2(d2),
    .en1_master(inter1), .en2_master(inter2)
  );

  // Intra/inter selection (s = 0: intra, s = 1: inter).
  assign m1 = s ? inter1 : intra_en1_master;
  assign m2 = s ? inter2 : intra_en2_master;

  test_clock_gate u_gate_f1 (.clk(fck1), .rst_n(rst_n), .en_master(m1.fck),
                             .shift_ck(shift_ck), .se(se), .en(en1_final.fck), .tclk(tfck1));
  test_clock_gate u_gate_s1 (.clk(sck1), .rst_n(rst_n), .en_master(m1.sck),
                             .shift_ck(shift_ck), .se(se), .en(en1_final.sck), .tclk(tsck1));
  test_clock_gate u_gate_f2 (.clk(fck2), .rst_n(rst_n), .en_master(m2.fck),
                             .shift_ck(shift_ck), .se(se), .en(en2_final.fck), .tclk(tfck2));
  test_clock_gate u_gate_s2 (.clk(sck2), .rst_n(rst_n), .en_master(m2.sck),
                             .shift_ck(shift_ck), .se(se), .en(en2_final.sck), .tclk(tsck2));
endmodule
