// Bank of three inter-clock enable generators with a selector.
//
// One generator serves one inter-clock logic block. Here two synchronous
// clock pairs are covered: generator 1 tests FCK1 -> SCK1, generator 2 tests
// SCK1 -> FCK1 and generator 3 tests FCK2 -> SCK2. The selector activates
// one generator at a time from D1, D2; an idle generator holds its master
// enables at 0, so the enables of generators 1 and 2, which drive the same
// two clocks, are merged with OR gates.
//
// Interface: fck1, sck1, fck2, sck2 (free-running clocks, FCKx RATIOx times
// the frequency of SCKx, 2 by default), rst_n (asynchronous, active low), se, d1, d2 in;
// the master enables of the four clocks out, as two en_pair_t.
// Timing: as inter_clock_enable_generator. Generator 2 is the SLOW_TO_FAST
// variant (for RATIO1 = 2: state 5 for FCK1, states 3..4 for SCK1), giving
// an SCK1 launch pulse followed one FCK1 period later by an FCK1 capture.
// The three generators, the selector and the OR merging follow the published scheme;
// the decode of generator 2 is this design's own derivation.
module inter_clock_generator_bank
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
  input  logic     d1,
  input  logic     d2,
  output en_pair_t en1_master,
  output en_pair_t en2_master
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [3:1] ge;
  en_pair_t   g1, g2, g3;

  generator_selector u_sel (.d1(d1), .d2(d2), .ge(ge));

  inter_clock_enable_generator #(
    .N_DELAY(N_DELAY), .RATIO(RATIO1), .DIR(FAST_TO_SLOW)
  ) u_gen1 (
    .fck(fck1), .sck(sck1), .rst_n(rst_n), .se(se), .ge(ge[1]),
    .fck_en_master(g1.fck), .sck_en_master(g1.sck)
  );

  inter_clock_enable_generator #(
    .N_DELAY(N_DELAY), .RATIO(RATIO1), .DIR(SLOW_TO_FAST)
  ) u_gen2 (
    .fck(fck1), .sck(sck1), .rst_n(rst_n), .se(se), .ge(ge[2]),
    .fck_en_master(g2.fck), .sck_en_master(g2.sck)
  );

  inter_clock_enable_generator #(
    .N_DELAY(N_DELAY), .RATIO(RATIO2), .DIR(FAST_TO_SLOW)
  ) u_gen3 (
    .fck(fck2), .sck(sck2), .rst_n(rst_n), .se(se), .ge(ge[3]),
    .fck_en_master(g3.fck), .sck_en_master(g3.sck)
  );

  assign en1_master = g1 | g2;
  assign en2_master = g3;
endmodule
