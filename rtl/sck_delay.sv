// Behavioural model of the SCK delay element in front of the start enable
// generator. Not synthesizable logic: on silicon this is a small buffer or
// delay cell chosen at layout.
//
// The slow clock SCK has edges that coincide with FCK edges. Delaying it by
// a fraction of an FCK period before it is sampled by FCK flip-flops makes
// every sample see the SCK value from before the coincident edge, which is
// the first of two measures against metastability (the second is the
// two-flop synchronizer that follows).
//
// Interface: sck in, sck_d out. Timing: sck_d follows sck after DELAY_PS
// picoseconds. The default delay of 100 ps is this design's choice; the
// published scheme gives no value.
module sck_delay #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic sck,
  output logic sck_d
);
  timeunit 1ns;
  timeprecision 1ps;

  assign #(DELAY_PS * 1ps) sck_d = sck;
endmodule
