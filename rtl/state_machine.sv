// State machine (block D of the inter-clock enable generator).
//
// A 4-bit counter clocked by FCK. It rests in state 0. At the first FCK edge
// at which start is 1 it moves to state 1, then counts up one state per FCK
// period through state 15 and returns to state 0, where it stops until the
// next start. Because it is started at a known phase of SCK, each state
// identifies one FCK period and the SCK phase within it: odd states are
// periods in which SCK is low, even states periods in which SCK is high
// (for a 2:1 ratio), so decoding states places enables exactly.
//
// Interface: fck, rst_n (asynchronous, active low), start in; state out.
// Timing: state = 1 in the FCK period after the one in which start is 1.
// The counter, its width and its state sequence follow the published scheme; the
// reset style is this design's own choice. A start that arrives while the
// counter runs is ignored (the published scheme does not say).
module state_machine
  import ictc_pkg::*;
(
  input  logic   fck,
  input  logic   rst_n,
  input  logic   start,
  output state_t state
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge fck or negedge rst_n) begin
    if (!rst_n)                   state <= STATE_IDLE;
    else if (state != STATE_IDLE) state <= state + 1'b1;  // wraps 15 -> 0
    else if (start)               state <= state_t'(1);
  end
endmodule
