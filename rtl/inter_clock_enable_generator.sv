// Inter-clock enable generator.
//
// Creates the two master clock enables that pick exactly one launch pulse
// from the fast clock FCK and one capture pulse from the synchronous slow
// clock SCK, so that an inter-clock logic block is tested with
// launch-on-capture at its functional timing. All flops run on FCK; SCK is
// only sampled as data. The blocks act in order:
//   A  delay_generator         SE delayed by N FCK edges      -> S1
//   -  sck_delay               SCK delayed slightly           -> sck_d
//   B  start_enable_generator  synchronize SCK, mark its fall -> S2
//   C  start_signal_generator  one pulse when S1=0 and S2=1   -> start
//   D  state_machine           counts FCK periods 1..15       -> state
//   E  clock_enable_decoder    state windows                  -> S3, S4
//   FFg, FFh                   S3, S4 delayed one FCK period  -> masters
// GE = 0 holds both master enables at 0.
//
// RATIO (FCK frequency / SCK frequency) and DIR (FAST_TO_SLOW or
// SLOW_TO_FAST) select the decode windows through the ictc_pkg functions;
// the windows can also be set directly.
//
// Interface: fck, sck (free-running synchronous functional clocks), rst_n
// (asynchronous, active low), se (scan enable), ge (generator enable) in;
// fck_en_master, sck_en_master out.
// Timing (defaults, RATIO = 2, FAST_TO_SLOW): fck_en_master is high in
// state 4 and sck_en_master in states 4 and 5. After the final-enable latches this lets through the FCK
// pulse that begins state 5 and the SCK pulse that begins state 6, one FCK
// period later.
// The block structure, the flop counts and the decode for FCK -> SCK follow
// the published scheme; the RATIO/DIR derivation of the windows, the
// placement of GE at the inputs of FFg/FFh and the reset are this design's
// own choices.
module inter_clock_enable_generator
  import ictc_pkg::*;
#(
  parameter int unsigned N_DELAY      = 8,
  parameter int unsigned SCK_DELAY_PS = 100,
  parameter int unsigned RATIO        = 2,
  parameter direction_t  DIR          = FAST_TO_SLOW,
  parameter state_t      FCK_FIRST    = fck_state(RATIO, DIR),
  parameter state_t      FCK_LAST     = fck_state(RATIO, DIR),
  parameter state_t      SCK_FIRST    = sck_first_state(RATIO),
  parameter state_t      SCK_LAST     = sck_last_state(RATIO)
) (
  input  logic fck,
  input  logic sck,
  input  logic rst_n,
  input  logic se,
  input  logic ge,
  output logic fck_en_master,
  output logic sck_en_master
);
  timeunit 1ns;
  timeprecision 1ps;

  logic   s1, s2, s3, s4, sck_d, start;
  state_t state;

  delay_generator #(.N(N_DELAY)) u_delay (
    .fck(fck), .rst_n(rst_n), .se(se), .s1(s1)
  );

  sck_delay #(.DELAY_PS(SCK_DELAY_PS)) u_sck_delay (
    .sck(sck), .sck_d(sck_d)
  );

  start_enable_generator u_start_en (
    .fck(fck), .rst_n(rst_n), .sck_d(sck_d), .s2(s2)
  );

  start_signal_generator u_start (
    .fck(fck), .rst_n(rst_n), .s1(s1), .s2(s2), .start(start)
  );

  initial assert (RATIO >= 2 && target_edge(RATIO) <= 20)
    else $error("inter_clock_enable_generator: RATIO out of range");

  state_machine u_fsm (
    .fck(fck), .rst_n(rst_n), .start(start), .state(state)
  );

  clock_enable_decoder #(
    .FCK_FIRST(FCK_FIRST), .FCK_LAST(FCK_LAST),
    .SCK_FIRST(SCK_FIRST), .SCK_LAST(SCK_LAST)
  ) u_dec (
    .state(state), .s3(s3), .s4(s4)
  );

  // FFg and FFh
  always_ff @(posedge fck or negedge rst_n) begin
    if (!rst_n) begin
      fck_en_master <= 1'b0;
      sck_en_master <= 1'b0;
    end else begin
      fck_en_master <= ge & s3;
      sck_en_master <= ge & s4;
    end
  end
endmodule
