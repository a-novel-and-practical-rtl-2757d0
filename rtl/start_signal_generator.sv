// Start signal generator (block C of the inter-clock enable generator).
//
// Produces one pulse, one FCK period long, that starts the state machine.
// An AND gate combines the start enable S2 ("set") with a "reset" term that
// is low while S1 is 1 (shift mode, or SE not yet delayed through) or while
// either of the two flops FFe and FFf is set. FFe registers the AND output
// and is the start signal. FFf remembers that the pulse has been issued and
// stays set until S1 returns to 1, so that only one start pulse is issued
// per capture window even though S2 repeats every SCK period.
//
// Interface: fck, rst_n (asynchronous, active low), s1, s2 in; start out.
// Timing: start rises at the first FCK edge at which s1 = 0 and s2 = 1, and
// falls one FCK period later.
// The AND gate with set/reset inputs, the two flops and their feedback
// follow the published schematic. That FFf holds its value until S1 returns
// high (instead of being a plain one-cycle delay of FFe) is this design's
// reading of the feedback; a plain delay would restart the state machine
// every second SCK period.
module start_signal_generator (
  input  logic fck,
  input  logic rst_n,
  input  logic s1,
  input  logic s2,
  output logic start
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ff_e, ff_f;
  logic reset_n;

  // NOR of S1 and the two flop outputs: the AND gate's reset input.
  assign reset_n = ~(s1 | ff_e | ff_f);

  always_ff @(posedge fck or negedge rst_n) begin
    if (!rst_n) begin
      ff_e <= 1'b0;
      ff_f <= 1'b0;
    end else begin
      ff_e <= s2 & reset_n;
      ff_f <= ~s1 & (ff_f | ff_e);
    end
  end

  assign start = ff_e;

  // The start pulse is never longer than one FCK period.
  a_start_one_cycle: assert property (@(posedge fck) start |=> !start);
endmodule
